// tb_dce2_din_fifo: random writes and pops against a queue model, at the one-row default depth
// and at depth 3.  Checks the order of rows, the valid flag and that a write into a full FIFO
// (without a simultaneous pop) is reported as a lost row and leaves the contents alone.
module tb_dce2_din_fifo;
  import dce2_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic wr1, pop1, v1, o1, wr3, pop3, v3, o3;
  row_t d1, q1, d3, q3;
  dce2_din_fifo          dut1 (.clk, .rst_n, .wr_stb(wr1), .wr_row(d1), .rd_valid(v1), .rd_row(q1), .rd_pop(pop1), .ovf_pulse(o1));
  dce2_din_fifo #(.DEPTH(3)) dut3 (.clk, .rst_n, .wr_stb(wr3), .wr_row(d3), .rd_valid(v3), .rd_row(q3), .rd_pop(pop3), .ovf_pulse(o3));

  row_t m1[$], m3[$];
  int lost1 = 0, lost3 = 0;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  function automatic row_t rnd_row();
    row_t r;
    r.row = ROWW'($urandom);
    for (int c = 0; c < NCH; c++) r.adc[c] = ADCW'($urandom);
    return r;
  endfunction

  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    wr1 = 0; pop1 = 0; wr3 = 0; pop3 = 0; d1 = '0; d3 = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int t = 0; t < 4000; t++) begin
      @(negedge clk);
      // compare outputs with the models
      check(v1 == (m1.size() > 0), "valid depth1");
      if (m1.size() > 0) check(q1 == m1[0], "data depth1");
      check(v3 == (m3.size() > 0), "valid depth3");
      if (m3.size() > 0) check(q3 == m3[0], "data depth3");
      wr1 = $urandom_range(1); pop1 = v1 && $urandom_range(2) == 0; d1 = rnd_row();
      wr3 = $urandom_range(1); pop3 = v3 && $urandom_range(2) == 0; d3 = rnd_row();
      #1;
      check(o1 == (wr1 && m1.size() == 1 && !pop1), "overflow depth1");
      check(o3 == (wr3 && m3.size() == 3 && !pop3), "overflow depth3");
      @(posedge clk);
      if (pop1) void'(m1.pop_front());
      if (wr1 && m1.size() < 1) m1.push_back(d1); else if (wr1) lost1++;
      if (pop3) void'(m3.pop_front());
      if (wr3 && m3.size() < 3) m3.push_back(d3); else if (wr3) lost3++;
    end
    check(lost1 > 0 && lost3 > 0, "overflow exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
