// tb_dce2_scan_reg: capture, shift and update of a 12-bit chain against a model; also that
// nothing happens while the chain is not selected.
module tb_dce2_scan_reg;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic sel, capture, shift, update, tdi, tdo, upd_pulse;
  logic [11:0] cap_data, upd_data;
  dce2_scan_reg #(.W(12)) dut (.*);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin : watchdog
    repeat (50000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [11:0] din, dout, prev;
    sel = 0; capture = 0; shift = 0; update = 0; tdi = 0; cap_data = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    prev = '0;
    for (int t = 0; t < 200; t++) begin
      cap_data = 12'($urandom);
      din = 12'($urandom);
      sel = (t % 5 != 4);
      @(negedge clk); capture = 1; @(negedge clk); capture = 0;
      for (int i = 0; i < 12; i++) begin
        @(negedge clk);
        dout[i] = tdo;
        tdi = din[i];
        shift = 1; @(negedge clk); shift = 0;
      end
      @(negedge clk); update = 1; @(negedge clk); update = 0;
      #1;
      if (sel) begin
        check(dout == cap_data, $sformatf("shifted out %h exp %h", dout, cap_data));
        check(upd_data == din, $sformatf("updated %h exp %h", upd_data, din));
        prev = din;
      end else begin
        check(upd_data == prev, "unselected chain keeps its value");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
