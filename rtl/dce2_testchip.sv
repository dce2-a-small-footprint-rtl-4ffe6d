// dce2_testchip: the DCE2 test chip, a 64-channel clustering core with JTAG test access.
//
// The chip is pad-limited, so only a few signals have pins of their own: an 8-channel row input,
// the core's two outputs (static cluster records and the pixel stream) and JTAG.  Everything else
// goes through JTAG chains:
//   in chain        captures the 8-channel input; its update sets the control word (ctrl_t)
//   in mem chain    {data, addr, wr}: writes a 64-channel row into the test pattern memory at
//                   addr when wr is set; capture returns the row stored at the last addr
//   pattern gen.    feeds the core from the pattern memory or the 8-channel input
//   in pattern ch.  captures the last row given to the core {row number, 64 ADC values}
//   core output ch. captures {last static record, last pixel word with its last flag, cluster
//                   count[16], lost rows[8], lost pixels[8], merges[8], stalled clocks[8]}
//   out mem chain   {addr}: selects a spy memory word; capture returns
//                   {dropped, word count, word, addr}
// All shift LSB first.  Chain contents and instruction codes are this design's own; the set of
// chains, the memories and the data path are those of the document's test chip figure.  The LVDS
// transmitter that shared the die is a separate design and is not part of this module.
// One clock: JTAG is oversampled (clk >= 4 x TCK).
module dce2_testchip
  import dce2_pkg::*;
  import dce2_jtag_pkg::*;
(
  input  logic                 clk,
  input  logic                 rst_n,
  // JTAG
  input  logic                 tck,
  input  logic                 tms,
  input  logic                 tdi,
  input  logic                 trst_n,
  output logic                 tdo,
  output logic                 tdo_en,
  // 8-channel input
  input  logic                 ext_stb,
  input  logic [ROWW-1:0]      ext_row,
  input  logic [7:0][ADCW-1:0] ext_adc,
  // main cluster output
  output logic                 st_valid,
  output cluster_info_t        st_data,
  input  logic                 st_ready,
  output logic                 px_valid,
  output out_pix_t             px_data,
  output logic                 px_last,
  input  logic                 px_ready,
  output logic                 pg_done
);
  localparam int unsigned RW    = NCH * ADCW;
  localparam int unsigned CW    = $bits(ctrl_t);
  localparam int unsigned W_IN  = 8 * ADCW + CW;
  localparam int unsigned W_IM  = RW + PAT_AW + 1;
  localparam int unsigned W_IP  = ROWW + RW;
  localparam int unsigned W_OC  = $bits(cluster_info_t) + 1 + $bits(out_pix_t) + 48;
  localparam int unsigned W_OM  = 1 + (SPY_AW + 1) + SPW + SPY_AW;

  // ---------------- JTAG ----------------
  logic [IRW-1:0] ir;
  logic           cap, sh, upd, tdi_s, dr_tdo;
  logic           tdo_in, tdo_im, tdo_ip, tdo_oc, tdo_om;

  dce2_jtag_tap u_tap (
    .clk, .rst_n, .tck, .tms, .tdi, .trst_n, .tdo, .tdo_en, .ir,
    .dr_capture(cap), .dr_shift(sh), .dr_update(upd), .tdi_s, .dr_tdo);

  always_comb begin
    unique case (ir)
      IR_INCHAIN:  dr_tdo = tdo_in;
      IR_INMEM:    dr_tdo = tdo_im;
      IR_INPAT:    dr_tdo = tdo_ip;
      IR_OUTCHAIN: dr_tdo = tdo_oc;
      IR_OUTMEM:   dr_tdo = tdo_om;
      default:     dr_tdo = 1'b0;
    endcase
  end

  // in chain: control word
  ctrl_t           ctrl;
  logic [W_IN-1:0] in_upd;
  logic            in_pulse;
  dce2_scan_reg #(.W(W_IN)) u_in_chain (
    .clk, .rst_n, .sel(ir == IR_INCHAIN), .capture(cap), .shift(sh), .update(upd), .tdi(tdi_s),
    .tdo(tdo_in), .cap_data({ext_adc, ctrl}), .upd_data(in_upd), .upd_pulse(in_pulse));
  assign ctrl = ctrl_t'(in_upd[CW-1:0]);

  // in mem chain and test pattern memory
  logic [W_IM-1:0]   im_upd;
  logic              im_pulse;
  logic [PAT_AW-1:0] im_addr, pg_addr;
  logic [RW-1:0]     im_rdata, pg_rdata;
  assign im_addr = im_upd[PAT_AW:1];
  dce2_scan_reg #(.W(W_IM)) u_inmem_chain (
    .clk, .rst_n, .sel(ir == IR_INMEM), .capture(cap), .shift(sh), .update(upd), .tdi(tdi_s),
    .tdo(tdo_im), .cap_data({im_rdata, im_addr, 1'b0}), .upd_data(im_upd), .upd_pulse(im_pulse));

  dce2_dpram #(.W(RW), .AW(PAT_AW)) u_pat_mem (
    .clk,
    .we_a(im_pulse && im_upd[0]), .addr_a(im_addr), .wdata_a(im_upd[W_IM-1 -: RW]), .rdata_a(im_rdata),
    .we_b(1'b0), .addr_b(pg_addr), .wdata_b('0), .rdata_b(pg_rdata));

  // ---------------- pattern generator and core ----------------
  logic                     row_stb;
  logic [ROWW-1:0]          row_num;
  logic [NCH-1:0][ADCW-1:0] row_adc;
  logic                     pg_busy;

  dce2_pattern_gen u_pgen (
    .clk, .rst_n, .ctrl, .ext_stb, .ext_row, .ext_adc,
    .pm_addr(pg_addr), .pm_data(pg_rdata),
    .row_stb, .row_num, .row_adc, .busy(pg_busy), .done(pg_done));

  // in pattern chain: last row presented to the core
  logic [W_IP-1:0] ip_last, ip_upd;
  logic            ip_pulse;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)       ip_last <= '0;
    else if (row_stb) ip_last <= {row_num, row_adc};
  end
  dce2_scan_reg #(.W(W_IP)) u_inpat_chain (
    .clk, .rst_n, .sel(ir == IR_INPAT), .capture(cap), .shift(sh), .update(upd), .tdi(tdi_s),
    .tdo(tdo_ip), .cap_data(ip_last), .upd_data(ip_upd), .upd_pulse(ip_pulse));

  logic ev_row_lost, ev_alloc, ev_merge, ev_stall, ev_pix_lost, ev_close;
  dce2_core u_core (
    .clk, .rst_n, .row_stb, .row_num, .row_adc,
    .st_valid, .st_data, .st_ready, .px_valid, .px_data, .px_last, .px_ready,
    .ev_row_lost, .ev_alloc, .ev_merge, .ev_stall, .ev_pix_lost, .ev_close);

  // ---------------- output side ----------------
  logic st_fire, px_fire;
  assign st_fire = st_valid && st_ready;
  assign px_fire = px_valid && px_ready;

  // clustering core output chain
  cluster_info_t oc_st;
  logic [$bits(out_pix_t):0] oc_px;
  logic [15:0]   n_clusters;
  logic [7:0]    n_row_lost, n_pix_lost, n_merge, n_stall;
  logic [W_OC-1:0] oc_upd;
  logic            oc_pulse;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      oc_st      <= '0;
      oc_px      <= '0;
      n_clusters <= '0;
      n_row_lost <= '0;
      n_pix_lost <= '0;
      n_merge    <= '0;
      n_stall    <= '0;
    end else begin
      if (st_fire) begin
        oc_st      <= st_data;
        n_clusters <= n_clusters + 1'b1;
      end
      if (px_fire) oc_px <= {px_last, px_data};
      if (ev_row_lost && n_row_lost != '1) n_row_lost <= n_row_lost + 1'b1;
      if (ev_pix_lost && n_pix_lost != '1) n_pix_lost <= n_pix_lost + 1'b1;
      if (ev_merge && n_merge != '1)       n_merge    <= n_merge + 1'b1;
      if (ev_stall && n_stall != '1)       n_stall    <= n_stall + 1'b1;
    end
  end
  dce2_scan_reg #(.W(W_OC)) u_out_chain (
    .clk, .rst_n, .sel(ir == IR_OUTCHAIN), .capture(cap), .shift(sh), .update(upd), .tdi(tdi_s),
    .tdo(tdo_oc), .cap_data({oc_st, oc_px, n_clusters, n_row_lost, n_pix_lost, n_merge, n_stall}),
    .upd_data(oc_upd), .upd_pulse(oc_pulse));

  // spy memory and out mem chain
  logic [SPY_AW-1:0] om_addr;
  logic [SPW-1:0]    spy_rdata;
  logic [SPY_AW:0]   spy_count;
  logic              spy_dropped;
  logic [W_OM-1:0]   om_upd;
  logic              om_pulse;
  assign om_addr = om_upd[SPY_AW-1:0];

  dce2_spy_mem #(.AW(SPY_AW)) u_spy (
    .clk, .rst_n, .clr(ctrl.spy_clr), .st_fire, .st_data, .px_fire, .px_data, .px_last,
    .rd_addr(om_addr), .rd_data(spy_rdata), .wr_count(spy_count), .dropped(spy_dropped));

  dce2_scan_reg #(.W(W_OM)) u_outmem_chain (
    .clk, .rst_n, .sel(ir == IR_OUTMEM), .capture(cap), .shift(sh), .update(upd), .tdi(tdi_s),
    .tdo(tdo_om), .cap_data({spy_dropped, spy_count, spy_rdata, om_addr}),
    .upd_data(om_upd), .upd_pulse(om_pulse));
endmodule
