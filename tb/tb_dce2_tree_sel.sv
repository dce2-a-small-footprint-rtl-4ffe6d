// tb_dce2_tree_sel: checks the recursive lowest-index selector against a linear search, at the
// 64-request size of the row scheduler and at an odd size (5) that exercises uneven splits.
module tb_dce2_tree_sel;
  int checks = 0, failures = 0;
  logic [63:0] req64;
  logic        f64;
  logic [5:0]  i64;
  logic [4:0]  req5;
  logic        f5;
  logic [2:0]  i5;

  dce2_tree_sel #(.N(64)) dut64 (.req(req64), .found(f64), .idx(i64));
  dce2_tree_sel #(.N(5))  dut5  (.req(req5),  .found(f5),  .idx(i5));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  function automatic int lowest(input logic [63:0] v, input int n);
    for (int i = 0; i < n; i++) if (v[i]) return i;
    return -1;
  endfunction

  initial begin : watchdog
    #1000000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < 3000; t++) begin
      int e;
      case (t % 4)
        0: req64 = {$urandom, $urandom};
        1: req64 = 64'd1 << $urandom_range(63);
        2: req64 = {$urandom, $urandom} & {$urandom, $urandom} & {$urandom, $urandom} & {$urandom, $urandom};
        default: req64 = (t % 50 == 3) ? '0 : ({$urandom, $urandom} << $urandom_range(63));
      endcase
      req5 = 5'($urandom);
      #1;
      e = lowest(req64, 64);
      check(f64 == (e >= 0), $sformatf("found64 for %h", req64));
      if (e >= 0) check(int'(i64) == e, $sformatf("idx64 %0d exp %0d for %h", i64, e, req64));
      e = lowest(64'(req5), 5);
      check(f5 == (e >= 0), "found5");
      if (e >= 0) check(int'(i5) == e, $sformatf("idx5 %0d exp %0d", i5, e));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
