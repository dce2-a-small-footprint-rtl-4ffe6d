// dce2_dpram: dual-port memory of the DCE2 test chip.
//
// Two independent read/write ports on one clock, each with a registered read (data appears one
// clock after the address).  Used as the test pattern memory (port A: JTAG writes rows, port B:
// the pattern generator reads them) and inside the spy memory (port B: core output written,
// port A: JTAG reads it).  The document calls both memories dual-ported and JTAG-accessible;
// sizes and the read latency are this design's own.  When both ports write one address in the
// same clock, port B wins.
module dce2_dpram #(
  parameter int unsigned W  = 512,
  parameter int unsigned AW = 5
) (
  input  logic          clk,
  input  logic          we_a,
  input  logic [AW-1:0] addr_a,
  input  logic [W-1:0]  wdata_a,
  output logic [W-1:0]  rdata_a,
  input  logic          we_b,
  input  logic [AW-1:0] addr_b,
  input  logic [W-1:0]  wdata_b,
  output logic [W-1:0]  rdata_b
);
  logic [W-1:0] mem [2**AW];

  always_ff @(posedge clk) begin
    if (we_a && !(we_b && addr_b == addr_a)) mem[addr_a] <= wdata_a;
    if (we_b) mem[addr_b] <= wdata_b;
    rdata_a <= mem[addr_a];
    rdata_b <= mem[addr_b];
  end
endmodule
