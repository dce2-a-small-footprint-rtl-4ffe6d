// dce2_din_fifo: input row FIFO ("din fifo") of the DCE2 core.
//
// Rows arrive fully parallel, NCH ADC values plus a row number, qualified by a one-cycle strobe.
// The FIFO holds DEPTH complete rows until the input scheduler takes them.  The document sets its
// depth to one row and describes it as the factor by which the number of pixels a row may carry
// grows: while the scheduler is still busy with a long row, the next row waits here.  A strobe that
// finds the FIFO full loses that row; the loss is counted (this reaction is this design's choice).
//
// Interface: wr_stb/wr_row write side; rd_valid/rd_row/rd_pop read side (first-word fall-through);
// ovf_pulse marks a lost row.  Write and pop in one cycle are allowed, also when full.
module dce2_din_fifo
  import dce2_pkg::*;
#(
  parameter int unsigned DEPTH = dce2_pkg::DIN_DEPTH
) (
  input  logic  clk,
  input  logic  rst_n,
  input  logic  wr_stb,
  input  row_t  wr_row,
  output logic  rd_valid,
  output row_t  rd_row,
  input  logic  rd_pop,
  output logic  ovf_pulse
);
  localparam int unsigned PW = (DEPTH > 1) ? $clog2(DEPTH) : 1;
  localparam int unsigned CW = $clog2(DEPTH + 1);

  row_t          mem [DEPTH];
  logic [PW-1:0] wp, rp;
  logic [CW-1:0] count;
  logic          do_pop, do_push;

  assign rd_valid  = (count != '0);
  assign rd_row    = mem[rp];
  assign do_pop    = rd_pop && rd_valid;
  assign do_push   = wr_stb && ((count != CW'(DEPTH)) || do_pop);
  assign ovf_pulse = wr_stb && !do_push;

  function automatic logic [PW-1:0] inc(input logic [PW-1:0] p);
    return (p == PW'(DEPTH - 1)) ? '0 : p + 1'b1;
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wp    <= '0;
      rp    <= '0;
      count <= '0;
    end else begin
      if (do_push) wp <= inc(wp);
      if (do_pop)  rp <= inc(rp);
      count <= count + CW'(do_push) - CW'(do_pop);
    end
  end

  always_ff @(posedge clk) begin
    if (do_push) mem[wp] <= wr_row;
  end

  // A pop is only issued when a row is present.
  a_no_underflow: assert property (@(posedge clk) disable iff (!rst_n) rd_pop |-> rd_valid);
endmodule
