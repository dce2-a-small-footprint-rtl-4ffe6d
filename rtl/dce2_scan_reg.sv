// dce2_scan_reg: one JTAG data register ("chain") of the DCE2 test chip.
//
// A W-bit shift register with a parallel capture input and a parallel update output, as used for
// the in chain, in mem chain, in pattern chain, core output chain and out mem chain.  On capture
// it loads cap_data, on each shift it moves one bit towards tdo (LSB first out, tdi enters at the
// MSB), on update the shifted word is copied to upd_data and upd_pulse fires for one clock.  The
// controls are one-clock pulses from the TAP, gated by sel (this chain's instruction is active).
// The chains follow the document's figure; their capture/shift/update form is standard JTAG.
module dce2_scan_reg #(
  parameter int unsigned W = 8
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         sel,
  input  logic         capture,
  input  logic         shift,
  input  logic         update,
  input  logic         tdi,
  output logic         tdo,
  input  logic [W-1:0] cap_data,
  output logic [W-1:0] upd_data,
  output logic         upd_pulse
);
  logic [W-1:0] sh;

  assign tdo = sh[0];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sh        <= '0;
      upd_data  <= '0;
      upd_pulse <= 1'b0;
    end else begin
      upd_pulse <= sel && update;
      if (sel && capture)     sh <= cap_data;
      else if (sel && shift)  sh <= (W > 1) ? {tdi, sh[W-1:1]} : W'(tdi);
      if (sel && update)      upd_data <= sh;
    end
  end
endmodule
