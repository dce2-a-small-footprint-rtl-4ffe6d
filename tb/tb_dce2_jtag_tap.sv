// tb_dce2_jtag_tap: JTAG TAP through its pins (TCK = 1/8 of clk).  Reads the IDCODE after reset,
// checks the IR capture value 0001, the one-bit delay of BYPASS, that a selected user
// instruction routes dr_tdo to TDO and produces one capture and one update pulse per DR scan
// with one shift pulse per bit, and that five TMS=1 clocks return to reset (IDCODE again).
module tb_dce2_jtag_tap;
  import dce2_jtag_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic tck, tms, tdi, trst_n, tdo, tdo_en, dr_capture, dr_shift, dr_update, tdi_s, dr_tdo;
  logic [IRW-1:0] ir;
  dce2_jtag_tap dut (.*);

  // user data register model: 16-bit shift register
  logic [15:0] udr;
  int n_cap = 0, n_sh = 0, n_upd = 0;
  assign dr_tdo = udr[0];
  always @(posedge clk) begin
    if (dr_capture) begin udr <= 16'hA5C3; n_cap++; end
    if (dr_shift) begin udr <= {tdi_s, udr[15:1]}; n_sh++; end
    if (dr_update) n_upd++;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // one TCK period; returns TDO sampled before the rising edge
  task automatic tclk(input logic m, input logic d, output logic o);
    tms = m; tdi = d;
    repeat (4) @(posedge clk);
    o = tdo;
    tck = 1;
    repeat (4) @(posedge clk);
    tck = 0;
  endtask

  task automatic shift_ir(input logic [IRW-1:0] v, output logic [IRW-1:0] cap);
    logic o;
    tclk(0, 0, o); tclk(1, 0, o); tclk(1, 0, o); tclk(0, 0, o); tclk(0, 0, o); // RTI->SelDR->SelIR->CapIR->ShIR
    for (int i = 0; i < IRW; i++) begin tclk(i == IRW - 1, v[i], o); cap[i] = o; end
    tclk(1, 0, o); tclk(0, 0, o);                                                // Upd->RTI
  endtask

  task automatic shift_dr(input int n, input logic [63:0] v, output logic [63:0] got);
    logic o;
    got = '0;
    tclk(1, 0, o); tclk(0, 0, o); tclk(0, 0, o);                                 // SelDR->CapDR->ShDR
    for (int i = 0; i < n; i++) begin tclk(i == n - 1, v[i], o); got[i] = o; end
    tclk(1, 0, o); tclk(0, 0, o);
  endtask

  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic o;
    logic [IRW-1:0] irc;
    logic [63:0] got;
    tck = 0; tms = 1; tdi = 0; trst_n = 1;
    repeat (3) @(posedge clk);
    rst_n = 1;
    repeat (5) tclk(1, 0, o);
    tclk(0, 0, o);
    shift_dr(32, '0, got);
    check(got[31:0] == IDCODE, $sformatf("idcode %h", got[31:0]));
    shift_ir(IR_BYPASS, irc);
    check(irc == 4'b0001, $sformatf("IR capture %b", irc));
    check(ir == IR_BYPASS, "IR updated");
    shift_dr(16, 64'h0000_0000_0000_B3E1, got);
    check(got[0] == 1'b0 && got[15:1] == 15'h33E1, $sformatf("bypass delay %h", got[15:0]));
    shift_ir(IR_INCHAIN, irc);
    n_cap = 0; n_sh = 0; n_upd = 0;
    shift_dr(16, 64'h1234, got);
    check(got[15:0] == 16'hA5C3, $sformatf("user DR captured %h", got[15:0]));
    check(udr == 16'h1234, "user DR shifted in");
    check(n_cap == 1 && n_sh == 16 && n_upd == 1, $sformatf("pulses cap %0d sh %0d upd %0d", n_cap, n_sh, n_upd));
    repeat (5) tclk(1, 0, o);
    check(ir == IR_IDCODE, "reset to IDCODE");
    // asynchronous test reset
    shift_ir(IR_BYPASS, irc);
    trst_n = 0; repeat (4) @(posedge clk); trst_n = 1; repeat (4) @(posedge clk);
    check(ir == IR_IDCODE, "TRST");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
