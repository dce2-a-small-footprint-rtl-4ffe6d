// dce2_dout_queue: cluster readout ("dout-queue") of the DCE2 core.
//
// Takes the next agent from the ready agent queue and reads its finished cluster out on the
// core's two outputs: first the static record (seed position, size, total energy, overflow flag)
// on the static port, then the stored pixels on the pixel FIFO stream, one per clock while the
// receiver is ready, with the last one flagged.  A pixel is sent with its row relative to the
// seed row and its absolute column, which is cheaper than two absolute coordinates.  When the
// last pixel has gone the agent is released and its index returned to the free agent queue.
// The two outputs (static information and a pixel FIFO stream) follow the document; the record
// layout, the relative row coding and the valid/ready handshakes are this design's own.
//
// Timing: one clock to fetch an agent, then the static record, then one pixel per clock.
module dce2_dout_queue
  import dce2_pkg::*;
#(
  parameter int unsigned NA = dce2_pkg::NAGENTS,
  parameter int unsigned IW = (NA > 1) ? $clog2(NA) : 1
) (
  input  logic          clk,
  input  logic          rst_n,
  // ready agent queue
  input  logic          rdy_empty,
  input  logic [IW-1:0] rdy_head,
  output logic          rdy_pop,
  // agents
  input  agent_status_t ag [NA],
  output logic [NA-1:0] ag_pop,
  output logic [NA-1:0] ag_release,
  // free agent queue
  output logic          free_push,
  output logic [IW-1:0] free_push_idx,
  // static output
  output logic          st_valid,
  output cluster_info_t st_data,
  input  logic          st_ready,
  // pixel stream output
  output logic          px_valid,
  output out_pix_t      px_data,
  output logic          px_last,
  input  logic          px_ready
);
  typedef enum logic [1:0] {D_IDLE, D_STATIC, D_PIX} dstate_e;
  dstate_e       st;
  logic [IW-1:0] cur;
  agent_status_t a;

  assign a            = ag[cur];
  assign rdy_pop      = (st == D_IDLE) && !rdy_empty;
  assign st_valid     = (st == D_STATIC);
  assign st_data      = a.info;
  assign px_valid     = (st == D_PIX) && (a.fill != '0);
  assign px_data.drow = DROWW'(a.head.row - a.info.seed_row);
  assign px_data.col  = a.head.col;
  assign px_data.adc  = a.head.adc;
  assign px_last      = (a.fill == PFW'(1));

  always_comb begin
    ag_pop        = '0;
    ag_release    = '0;
    free_push     = 1'b0;
    free_push_idx = cur;
    if (px_valid && px_ready) begin
      ag_pop[cur] = 1'b1;
      if (px_last) begin
        ag_release[cur] = 1'b1;
        free_push       = 1'b1;
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st  <= D_IDLE;
      cur <= '0;
    end else begin
      unique case (st)
        D_IDLE:   if (!rdy_empty) begin
                    cur <= rdy_head;
                    st  <= D_STATIC;
                  end
        D_STATIC: if (st_ready) st <= D_PIX;
        D_PIX:    if (px_valid && px_ready && px_last) st <= D_IDLE;
        default:  st <= D_IDLE;
      endcase
    end
  end

  a_static_stable: assert property (@(posedge clk) disable iff (!rst_n)
                                    st_valid && !st_ready |=> st_valid && $stable(st_data));
  a_closed_only: assert property (@(posedge clk) disable iff (!rst_n)
                                  (st != D_IDLE) |-> a.state == AG_CLOSED);
endmodule
