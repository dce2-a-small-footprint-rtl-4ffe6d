// tb_dce2_pattern_gen: replay of the pattern memory (a registered-read memory model here): rows
// 0..last with their contents and row numbers, one every ROW_CLK_RATIO clocks, the closing empty
// row numbered last+2 and the done flag; continuous replay with loop set; and the 8-channel input
// copied into the enabled groups of eight channels.
module tb_dce2_pattern_gen;
  import dce2_pkg::*;
  import dce2_jtag_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  ctrl_t ctrl;
  logic ext_stb, row_stb, busy, done;
  logic [ROWW-1:0] ext_row, row_num;
  logic [7:0][ADCW-1:0] ext_adc;
  logic [PAT_AW-1:0] pm_addr;
  logic [NCH*ADCW-1:0] pm_data;
  logic [NCH-1:0][ADCW-1:0] row_adc;
  dce2_pattern_gen dut (.*);

  logic [NCH*ADCW-1:0] pm [32];
  always_ff @(posedge clk) pm_data <= pm[pm_addr];

  int   got_num[$];
  logic [NCH*ADCW-1:0] got_adc[$];
  int   got_t[$];
  int   cyc = 0;
  always @(posedge clk) begin
    cyc++;
    if (rst_n && row_stb) begin got_num.push_back(int'(row_num)); got_adc.push_back(row_adc); got_t.push_back(cyc); end
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 32; i++) for (int w = 0; w < 16; w++) pm[i][32*w +: 32] = $urandom;
    ctrl = '0; ext_stb = 0; ext_row = '0; ext_adc = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    // single pass over rows 0..4
    @(negedge clk); ctrl.src_mem = 1; ctrl.last = 4; ctrl.run = 1;
    repeat (100) @(posedge clk);
    check(got_num.size() == 6, $sformatf("five rows and a flush row (%0d)", got_num.size()));
    for (int i = 0; i < 5 && i < got_num.size(); i++) begin
      check(got_num[i] == i && got_adc[i] == pm[i], $sformatf("row %0d", i));
      if (i > 0) check(got_t[i] - got_t[i-1] == ROW_CLK_RATIO, "row spacing");
    end
    if (got_num.size() == 6) check(got_num[5] == 6 && got_adc[5] == '0, "flush row");
    check(done && !busy, "done after pass");
    // loop
    got_num = {}; got_adc = {}; got_t = {};
    @(negedge clk); ctrl.run = 0; ctrl.loop = 1; ctrl.last = 2;
    @(negedge clk); ctrl.run = 1;
    repeat (75) @(posedge clk);
    check(got_num.size() == 8, $sformatf("loop rows %0d", got_num.size()));
    for (int i = 0; i < got_num.size(); i++) check(got_num[i] == i % 3 && got_adc[i] == pm[i % 3], "loop order");
    // 8-channel input
    got_num = {}; got_adc = {};
    @(negedge clk); ctrl.run = 0;
    @(negedge clk); ctrl.src_mem = 0; ctrl.grp_en = 8'b1010_0101; ctrl.run = 1;
    for (int s = 0; s < 3; s++) begin
      @(negedge clk);
      ext_stb = 1; ext_row = ROWW'(100 + s);
      for (int i = 0; i < 8; i++) ext_adc[i] = ADCW'($urandom);
      @(negedge clk); ext_stb = 0;
      @(negedge clk);
      check(got_num.size() == s + 1 && got_num[s] == 100 + s, "ext row number");
      for (int c = 0; c < NCH; c++)
        check(got_adc[s][ADCW*c +: ADCW] == (ctrl.grp_en[c / 8] ? ext_adc[c % 8] : '0), $sformatf("ext channel %0d", c));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
