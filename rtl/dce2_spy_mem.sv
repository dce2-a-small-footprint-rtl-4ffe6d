// dce2_spy_mem: spy memory on the output of the DCE2 core in the test chip.
//
// Every word the core puts out is recorded: each static cluster record and each pixel of the
// pixel stream, tagged so they can be told apart.  Words are written at consecutive addresses
// until the memory is full, after which further words are counted as dropped but not written;
// clr restarts at address 0.  JTAG reads any address through the second port (one clock latency).
// The spy memory itself follows the document; the word format, the stop-when-full policy and the
// size (2**AW words) are this design's own.
//
// Word layout (SPW bits): {tag, payload}; tag 1 = static record (cluster_info_t),
// tag 0 = pixel ({last, out_pix_t}), right-aligned.
module dce2_spy_mem
  import dce2_pkg::*;
#(
  parameter int unsigned AW = dce2_jtag_pkg::SPY_AW
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 clr,
  input  logic                 st_fire,
  input  cluster_info_t        st_data,
  input  logic                 px_fire,
  input  out_pix_t             px_data,
  input  logic                 px_last,
  input  logic [AW-1:0]        rd_addr,
  output logic [SPW-1:0]       rd_data,
  output logic [AW:0]          wr_count,
  output logic                 dropped
);
  logic [SPW-1:0] wword, port_b_rd;
  logic           we, full;

  assign full = (wr_count == (AW+1)'(2**AW));
  // the core never presents both in one clock (record first, then pixels)
  assign wword = st_fire ? {1'b1, st_data} : {1'b0, SPY_PAYLOAD'({px_last, px_data})};
  assign we    = (st_fire || px_fire) && !full && !clr;

  dce2_dpram #(.W(SPW), .AW(AW)) u_ram (
    .clk,
    .we_a(1'b0), .addr_a(rd_addr), .wdata_a('0), .rdata_a(rd_data),
    .we_b(we), .addr_b(wr_count[AW-1:0]), .wdata_b(wword), .rdata_b(port_b_rd));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wr_count <= '0;
      dropped  <= 1'b0;
    end else if (clr) begin
      wr_count <= '0;
      dropped  <= 1'b0;
    end else begin
      if (we) wr_count <= wr_count + 1'b1;
      if ((st_fire || px_fire) && full) dropped <= 1'b1;
    end
  end

  a_exclusive: assert property (@(posedge clk) disable iff (!rst_n) !(st_fire && px_fire));
endmodule
