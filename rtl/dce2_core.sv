// dce2_core: the DCE2 sequential clustering core (64 channels, 8 agents).
//
// DCE2 finds clusters of neighbouring hit pixels in a pixel detector's zero-suppressed data and
// ships each cluster as one record plus its pixels, losslessly.  Instead of a clustering cell per
// pixel it works sequentially: a full row enters in parallel, an input scheduler feeds its hits one
// per core clock to clustering control, and a small pool of clustering agents, each owning one
// growing cluster, absorb them.  Free and ready agents wait in queues; the dout queue reads out
// finished clusters.  With a core clock ROW_CLK_RATIO (10) times the row clock, a row may carry
// about ten hits before the input FIFO has to absorb the excess.
//
//   row in -> din fifo -> input sched queue -> clustering control <-> agents[NAGENTS]
//                                               free agent queue / ready agent queue
//                                                                 -> dout queue -> static, fifo
//
// Interface:
//   row_stb, row_num, row_adc   one row per strobe (ADC 0 = no hit)
//   st_*                        static record of each cluster (valid/ready)
//   px_*                        the cluster's pixels after its record (valid/ready, last flag)
//   ev_*                        one-cycle event pulses for monitoring
// A cluster is complete once a row arrives whose number is neither its newest row nor the next
// one; so a frame is flushed by sending a row with a non-adjacent row number.
// The block structure follows the document; the handshakes and encodings are this design's own
// and are described in the submodules.
module dce2_core
  import dce2_pkg::*;
#(
  parameter int unsigned NA    = dce2_pkg::NAGENTS,
  parameter int unsigned PDEP  = dce2_pkg::PIXFIFO_DEPTH,
  parameter int unsigned DDEP  = dce2_pkg::DIN_DEPTH
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     row_stb,
  input  logic [ROWW-1:0]          row_num,
  input  logic [NCH-1:0][ADCW-1:0] row_adc,
  output logic                     st_valid,
  output cluster_info_t            st_data,
  input  logic                     st_ready,
  output logic                     px_valid,
  output out_pix_t                 px_data,
  output logic                     px_last,
  input  logic                     px_ready,
  output logic                     ev_row_lost,
  output logic                     ev_alloc,
  output logic                     ev_merge,
  output logic                     ev_stall,
  output logic                     ev_pix_lost,
  output logic                     ev_close
);
  localparam int unsigned IW = (NA > 1) ? $clog2(NA) : 1;

  row_t          wr_row, fifo_row;
  logic          fifo_valid, fifo_pop;
  logic          item_valid, item_ready;
  sched_item_t   item;

  agent_status_t ag [NA];
  logic [NA-1:0] c_alloc, c_add, c_mpix, c_minfo, c_close, c_release, c_pop;
  logic [NA-1:0] d_pop, d_release;
  pixel_t        c_pix, c_mpix_data;
  agent_status_t c_msrc;

  logic          free_empty, free_pop, free_push_c, free_push_d;
  logic [IW-1:0] free_head, free_idx_c, free_idx_d;
  logic          rdy_empty, rdy_pop, rdy_push;
  logic [IW-1:0] rdy_head, rdy_idx;

  assign wr_row.row = row_num;
  assign wr_row.adc = row_adc;

  dce2_din_fifo #(.DEPTH(DDEP)) u_din (
    .clk, .rst_n, .wr_stb(row_stb), .wr_row(wr_row),
    .rd_valid(fifo_valid), .rd_row(fifo_row), .rd_pop(fifo_pop), .ovf_pulse(ev_row_lost));

  dce2_input_sched u_sched (
    .clk, .rst_n, .in_valid(fifo_valid), .in_row(fifo_row), .in_pop(fifo_pop),
    .item_valid, .item, .item_ready);

  dce2_cluster_ctrl #(.NA(NA), .IW(IW)) u_ctrl (
    .clk, .rst_n, .item_valid, .item, .item_ready,
    .ag, .ag_alloc(c_alloc), .ag_add(c_add), .ag_pix(c_pix), .ag_mpix(c_mpix),
    .ag_mpix_data(c_mpix_data), .ag_minfo(c_minfo), .ag_msrc(c_msrc), .ag_close(c_close),
    .ag_release(c_release), .ag_pop(c_pop),
    .free_empty, .free_head, .free_pop, .free_push(free_push_c), .free_push_idx(free_idx_c),
    .rdy_push, .rdy_push_idx(rdy_idx),
    .ev_alloc, .ev_merge, .ev_stall, .ev_lost(ev_pix_lost), .ev_close);

  for (genvar k = 0; k < NA; k++) begin : g_agent
    dce2_agent #(.DEPTH(PDEP)) u_agent (
      .clk, .rst_n,
      .alloc(c_alloc[k]), .add(c_add[k]), .pix(c_pix),
      .mpix(c_mpix[k]), .mpix_data(c_mpix_data),
      .minfo(c_minfo[k]), .msrc(c_msrc),
      .close(c_close[k]), .release_i(c_release[k] | d_release[k]),
      .pop(c_pop[k] | d_pop[k]),
      .status(ag[k]));
  end

  dce2_agent_queue #(.N(NA), .INIT_FULL(1'b1), .IW(IW)) u_free_q (
    .clk, .rst_n, .push0(free_push_c), .idx0(free_idx_c), .push1(free_push_d), .idx1(free_idx_d),
    .pop(free_pop), .head(free_head), .empty(free_empty), .count());

  dce2_agent_queue #(.N(NA), .INIT_FULL(1'b0), .IW(IW)) u_ready_q (
    .clk, .rst_n, .push0(rdy_push), .idx0(rdy_idx), .push1(1'b0), .idx1('0),
    .pop(rdy_pop), .head(rdy_head), .empty(rdy_empty), .count());

  dce2_dout_queue #(.NA(NA), .IW(IW)) u_dout (
    .clk, .rst_n, .rdy_empty, .rdy_head, .rdy_pop, .ag,
    .ag_pop(d_pop), .ag_release(d_release), .free_push(free_push_d), .free_push_idx(free_idx_d),
    .st_valid, .st_data, .st_ready, .px_valid, .px_data, .px_last, .px_ready);
endmodule
