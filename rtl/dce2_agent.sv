// dce2_agent: one clustering agent of the DCE2 core.
//
// An agent owns one cluster while it grows.  It keeps what clustering control needs to decide
// whether a new pixel touches the cluster: the newest row holding a cluster pixel (row_a), the
// columns hit in that row (mask_a) and in the row before (mask_b).  It also keeps the static
// cluster record (seed position, pixel count, energy sum) and a FIFO of the cluster's pixels.  The
// FIFO depth (16) and the counter range (31) are the document's; beyond 16 stored pixels further
// pixels are still counted and summed, but not stored, and the overflow flag is set; the counter
// and the energy saturate.  That overflow policy is this design's reading of "can handle any
// shaped cluster in the limits given by the fifo depth".
//
// Commands (one-cycle pulses, at most one of alloc/add/mpix/minfo/close/release per cycle):
//   alloc   start a new cluster with pixel pix            (FREE -> OPEN)
//   add     append pixel pix to the cluster (updates the masks)
//   mpix    store pixel mpix moved over from a merged agent (FIFO only)
//   minfo   absorb record and masks of a merged agent (msrc)
//   close   cluster complete                             (OPEN -> CLOSED)
//   release agent returns to the free pool               (any -> FREE)
//   pop     drop the FIFO head (may come with any command but alloc)
// All commands take effect at the next clock edge; status is registered.
module dce2_agent
  import dce2_pkg::*;
#(
  parameter int unsigned DEPTH = dce2_pkg::PIXFIFO_DEPTH,
  parameter int unsigned MAXC  = dce2_pkg::CNT_MAX
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          alloc,
  input  logic          add,
  input  pixel_t        pix,
  input  logic          mpix,
  input  pixel_t        mpix_data,
  input  logic          minfo,
  input  agent_status_t msrc,
  input  logic          close,
  input  logic          release_i,
  input  logic          pop,
  output agent_status_t status
);
  localparam int unsigned PW = (DEPTH > 1) ? $clog2(DEPTH) : 1;
  localparam logic [ENW-1:0] EMAX = '1;

  agent_state_e    state;
  logic [ROWW-1:0] row_a;
  logic [NCH-1:0]  mask_a, mask_b;
  cluster_info_t   info;
  pixel_t          mem [DEPTH];
  logic [PW-1:0]   wp, rp;
  logic [PFW-1:0]  fill;

  logic            push;
  pixel_t          push_data;
  logic            full, do_push, do_pop;

  function automatic logic [PW-1:0] inc(input logic [PW-1:0] p);
    return (p == PW'(DEPTH - 1)) ? '0 : p + 1'b1;
  endfunction

  function automatic logic [CNTW-1:0] cnt_add(input logic [CNTW-1:0] a, input logic [CNTW-1:0] b);
    logic [CNTW:0] s;
    s = {1'b0, a} + {1'b0, b};
    return (s > (CNTW+1)'(MAXC)) ? CNTW'(MAXC) : s[CNTW-1:0];
  endfunction

  function automatic logic cnt_sat(input logic [CNTW-1:0] a, input logic [CNTW-1:0] b);
    return ({1'b0, a} + {1'b0, b}) > (CNTW+1)'(MAXC);
  endfunction

  function automatic logic [ENW-1:0] en_add(input logic [ENW-1:0] a, input logic [ENW-1:0] b);
    logic [ENW:0] s;
    s = {1'b0, a} + {1'b0, b};
    return s[ENW] ? EMAX : s[ENW-1:0];
  endfunction

  assign push      = alloc || add || mpix;
  assign push_data = mpix ? mpix_data : pix;
  assign full      = (fill == PFW'(DEPTH));
  assign do_pop    = pop && (fill != '0);
  assign do_push   = push && (!full || do_pop);

  assign status.state  = state;
  assign status.row_a  = row_a;
  assign status.mask_a = mask_a;
  assign status.mask_b = mask_b;
  assign status.info   = info;
  assign status.fill   = fill;
  assign status.head   = mem[rp];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state  <= AG_FREE;
      row_a  <= '0;
      mask_a <= '0;
      mask_b <= '0;
      info   <= '0;
      wp     <= '0;
      rp     <= '0;
      fill   <= '0;
    end else if (release_i) begin
      state  <= AG_FREE;
      mask_a <= '0;
      mask_b <= '0;
      info   <= '0;
      wp     <= '0;
      rp     <= '0;
      fill   <= '0;
    end else begin
      // pixel FIFO
      if (alloc) begin
        wp   <= inc('0);
        rp   <= '0;
        fill <= PFW'(1);
      end else begin
        if (do_push) wp <= inc(wp);
        if (do_pop)  rp <= inc(rp);
        fill <= fill + PFW'(do_push) - PFW'(do_pop);
      end

      if (alloc) begin
        state         <= AG_OPEN;
        row_a         <= pix.row;
        mask_a        <= NCH'(1) << pix.col;
        mask_b        <= '0;
        info.seed_row <= pix.row;
        info.seed_col <= pix.col;
        info.size     <= CNTW'(1);
        info.energy   <= ENW'(pix.adc);
        info.overflow <= 1'b0;
      end else if (add) begin
        if (pix.row == row_a) begin
          mask_a <= mask_a | (NCH'(1) << pix.col);
        end else begin
          mask_b <= (pix.row == row_a + 1'b1) ? mask_a : '0;
          mask_a <= NCH'(1) << pix.col;
          row_a  <= pix.row;
        end
        info.size     <= cnt_add(info.size, CNTW'(1));
        info.energy   <= en_add(info.energy, ENW'(pix.adc));
        info.overflow <= info.overflow || !do_push || cnt_sat(info.size, CNTW'(1));
      end else if (mpix) begin
        info.overflow <= info.overflow || !do_push;
      end else if (minfo) begin
        // align the other cluster's masks to this agent's newest row
        if (msrc.row_a == row_a) begin
          mask_a <= mask_a | msrc.mask_a;
          mask_b <= mask_b | msrc.mask_b;
        end else if (msrc.row_a + 1'b1 == row_a) begin
          mask_b <= mask_b | msrc.mask_a;
        end
        if ({msrc.info.seed_row, msrc.info.seed_col} < {info.seed_row, info.seed_col}) begin
          info.seed_row <= msrc.info.seed_row;
          info.seed_col <= msrc.info.seed_col;
        end
        info.size     <= cnt_add(info.size, msrc.info.size);
        info.energy   <= en_add(info.energy, msrc.info.energy);
        info.overflow <= info.overflow || msrc.info.overflow || cnt_sat(info.size, msrc.info.size);
      end else if (close) begin
        state <= AG_CLOSED;
      end
    end
  end

  always_ff @(posedge clk) begin
    if (do_push) mem[alloc ? '0 : wp] <= push_data;
  end

  a_one_cmd: assert property (@(posedge clk) disable iff (!rst_n)
                              $onehot0({alloc, add, mpix, minfo, close, release_i}));
  a_alloc_free: assert property (@(posedge clk) disable iff (!rst_n) alloc |-> state == AG_FREE);
endmodule
