// tb_dce2_spy_mem: records, pixels and the stop-when-full rule.  A random mix of static records
// and pixel words is written; every address is read back and compared with the tagged word
// expected there; the word count stops at the memory size and further words set "dropped";
// clear restarts the count.
module tb_dce2_spy_mem;
  import dce2_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic clr, st_fire, px_fire, px_last, dropped;
  cluster_info_t st_data;
  out_pix_t px_data;
  logic [5:0] rd_addr;
  logic [SPW-1:0] rd_data;
  logic [6:0] wr_count;
  dce2_spy_mem dut (.*);

  logic [SPW-1:0] exp_w [$];

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
    clr = 0; st_fire = 0; px_fire = 0; px_last = 0; st_data = '0; px_data = '0; rd_addr = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int pass = 0; pass < 2; pass++) begin
      exp_w = {};
      for (int i = 0; i < 80; i++) begin
        @(negedge clk);
        st_fire = 0; px_fire = 0;
        if ($urandom_range(3) == 0) begin
          st_fire = 1; st_data = cluster_info_t'({$urandom, $urandom});
          if (exp_w.size() < 64) exp_w.push_back({1'b1, st_data});
        end else begin
          px_fire = 1; px_data = out_pix_t'($urandom); px_last = 1'($urandom);
          if (exp_w.size() < 64) exp_w.push_back({1'b0, SPY_PAYLOAD'({px_last, px_data})});
        end
        if (i == 63) begin
          @(negedge clk); st_fire = 0; px_fire = 0; #1;
          check(!dropped && wr_count == 64, "full without drop");
        end
      end
      @(negedge clk); st_fire = 0; px_fire = 0;
      #1 check(dropped && wr_count == 64, "dropped after full");
      for (int a = 0; a < 64; a++) begin
        @(negedge clk); rd_addr = 6'(a);
        @(negedge clk);
        check(rd_data == exp_w[a], $sformatf("word %0d", a));
      end
      @(negedge clk); clr = 1; @(negedge clk); clr = 0;
      #1 check(wr_count == 0 && !dropped, "clear");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
