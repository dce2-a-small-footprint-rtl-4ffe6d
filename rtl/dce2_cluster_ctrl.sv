// dce2_cluster_ctrl: clustering control of the DCE2 core.
//
// Takes the pixel stream from the input scheduler, one pixel per clock, and decides for each
// pixel which agent it belongs to.  A pixel (r,c) touches an open cluster when the cluster has a
// pixel at (r,c-1..c+1) or (r-1,c-1..c+1) (8-neighbourhood; since pixels arrive in raster order
// this covers every earlier neighbour).  All agents are compared in parallel; a binary tree picks
// the lowest matching agent.
//   no match    a free agent is taken from the free agent queue (alloc).  If none is free but
//               some agent will be freed by the readout, the pixel waits (stall); otherwise it is
//               dropped and counted as lost.
//   one match   the pixel is added to that agent.
//   more        the pixel is added to the lowest matching agent (primary), then the other
//               matching agents are merged into it one after the other: their stored pixels move
//               over one per clock, then their records and masks, and they return to the free
//               queue.  The scheduler is held meanwhile.
// At the first pixel of a new row r every open agent whose newest row is neither r nor r-1 can
// never grow again; it is marked for closing.  Marked agents are closed one per clock and their
// indices pushed to the ready agent queue for readout.
// The parallel compare, tree selection and the queues follow the document; the neighbourhood
// rule, the merge procedure, the stall/drop rule and the close rule are this design's own.
// Only one command goes to an agent per clock; all outputs are combinational from the inputs and
// the merge/close registers.
module dce2_cluster_ctrl
  import dce2_pkg::*;
#(
  parameter int unsigned NA = dce2_pkg::NAGENTS,
  parameter int unsigned IW = (NA > 1) ? $clog2(NA) : 1
) (
  input  logic          clk,
  input  logic          rst_n,
  // scheduler
  input  logic          item_valid,
  input  sched_item_t   item,
  output logic          item_ready,
  // agents
  input  agent_status_t ag [NA],
  output logic [NA-1:0] ag_alloc,
  output logic [NA-1:0] ag_add,
  output pixel_t        ag_pix,
  output logic [NA-1:0] ag_mpix,
  output pixel_t        ag_mpix_data,
  output logic [NA-1:0] ag_minfo,
  output agent_status_t ag_msrc,
  output logic [NA-1:0] ag_close,
  output logic [NA-1:0] ag_release,
  output logic [NA-1:0] ag_pop,
  // free agent queue
  input  logic          free_empty,
  input  logic [IW-1:0] free_head,
  output logic          free_pop,
  output logic          free_push,
  output logic [IW-1:0] free_push_idx,
  // ready agent queue
  output logic          rdy_push,
  output logic [IW-1:0] rdy_push_idx,
  // events, one-cycle pulses
  output logic          ev_alloc,
  output logic          ev_merge,
  output logic          ev_stall,
  output logic          ev_lost,
  output logic          ev_close
);
  logic [NA-1:0] match, open_v, closed_v, stale;
  logic [NA-1:0] pend_close, merge_set;
  logic          merging;
  logic [IW-1:0] primary;
  logic          m_found, c_found, s_found;
  logic [IW-1:0] m_idx, c_idx, s_idx;
  logic [ROWW-1:0] r;
  logic [COLW-1:0] c;
  logic [NA-1:0] close_now;

  assign r = item.pix.row;
  assign c = item.pix.col;

  // columns c-1, c, c+1 of a mask
  function automatic logic near(input logic [NCH-1:0] m, input logic [COLW-1:0] col);
    logic hit;
    hit = m[col];
    if (col != '0)              hit = hit | m[col - 1'b1];
    if (col != COLW'(NCH - 1))  hit = hit | m[col + 1'b1];
    return hit;
  endfunction

  always_comb begin
    for (int k = 0; k < NA; k++) begin
      open_v[k]   = (ag[k].state == AG_OPEN);
      closed_v[k] = (ag[k].state == AG_CLOSED);
      stale[k]    = open_v[k] && (ag[k].row_a != r) && (ag[k].row_a + 1'b1 != r);
      match[k]    = open_v[k] && item.has_pix &&
                    (((ag[k].row_a == r) && (near(ag[k].mask_a, c) || near(ag[k].mask_b, c))) ||
                     ((ag[k].row_a + 1'b1 == r) && near(ag[k].mask_a, c)));
    end
  end

  dce2_tree_sel #(.N(NA), .IW(IW)) u_msel (.req(match),      .found(m_found), .idx(m_idx));
  dce2_tree_sel #(.N(NA), .IW(IW)) u_csel (.req(pend_close), .found(c_found), .idx(c_idx));
  dce2_tree_sel #(.N(NA), .IW(IW)) u_ssel (.req(merge_set),  .found(s_found), .idx(s_idx));

  logic          multi;
  logic          can_wait;
  logic [NA-1:0] new_close;

  assign multi     = (match & (match - 1'b1)) != '0;
  assign can_wait  = (closed_v != '0) || (pend_close != '0) || (new_close != '0);
  // closing is decided while the first item of a row is presented (idempotent while it waits)
  assign new_close = (item_valid && item.row_start && !merging) ? stale : '0;

  always_comb begin
    item_ready    = 1'b0;
    ag_alloc      = '0;
    ag_add        = '0;
    ag_pix        = item.pix;
    ag_mpix       = '0;
    ag_mpix_data  = ag[s_idx].head;
    ag_minfo      = '0;
    ag_msrc       = ag[s_idx];
    ag_close      = '0;
    ag_release    = '0;
    ag_pop        = '0;
    free_pop      = 1'b0;
    free_push     = 1'b0;
    free_push_idx = s_idx;
    rdy_push      = 1'b0;
    rdy_push_idx  = c_idx;
    ev_alloc      = 1'b0;
    ev_merge      = 1'b0;
    ev_stall      = 1'b0;
    ev_lost       = 1'b0;
    ev_close      = 1'b0;
    close_now     = '0;

    // closing, one agent per clock
    if (c_found) begin
      ag_close[c_idx] = 1'b1;
      rdy_push        = 1'b1;
      ev_close        = 1'b1;
      close_now[c_idx] = 1'b1;
    end

    if (merging) begin
      if (s_found) begin
        if (ag[s_idx].fill != '0) begin
          ag_pop[s_idx]   = 1'b1;
          ag_mpix[primary] = 1'b1;
        end else begin
          ag_minfo[primary] = 1'b1;
          ag_release[s_idx] = 1'b1;
          free_push         = 1'b1;
        end
      end
    end else if (item_valid) begin
      if (!item.has_pix) begin
        item_ready = 1'b1;
      end else if (!m_found) begin
        if (!free_empty) begin
          ag_alloc[free_head] = 1'b1;
          free_pop            = 1'b1;
          item_ready          = 1'b1;
          ev_alloc            = 1'b1;
        end else if (can_wait) begin
          ev_stall = 1'b1;
        end else begin
          item_ready = 1'b1;
          ev_lost    = 1'b1;
        end
      end else begin
        ag_add[m_idx] = 1'b1;
        item_ready    = 1'b1;
        ev_merge      = multi;
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      pend_close <= '0;
      merge_set  <= '0;
      merging    <= 1'b0;
      primary    <= '0;
    end else begin
      pend_close <= (pend_close | new_close) & ~close_now;
      if (merging) begin
        if (!s_found) begin
          merging <= 1'b0;
        end else if (ag_release[s_idx]) begin
          merge_set[s_idx] <= 1'b0;
        end
      end else if (ev_merge) begin
        merging   <= 1'b1;
        primary   <= m_idx;
        merge_set <= match & ~(NA'(1) << m_idx);
      end
    end
  end

  a_close_open: assert property (@(posedge clk) disable iff (!rst_n)
                                 (ag_close != '0) |-> ((ag_close & open_v) == ag_close));
endmodule
