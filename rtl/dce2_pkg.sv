// dce2_pkg: shared sizes and record types of the DCE2 sequential clustering core.
//
// The core takes one detector row of NCH channels at a time, picks out the hit pixels one per
// core clock and hands each to a small pool of clustering agents.  The numbers below that carry a
// paper value are the main configuration of DCE2: 64 channels, 8 agents, a 16-entry pixel FIFO
// per agent, a pixel counter that counts to 31, an input FIFO one row deep and a core clock ten
// times the row clock.  ADC width, row-number width and the output encodings are this design's
// own choices.
package dce2_pkg;

  // --- sizes given for the main configuration ---
  localparam int unsigned NCH           = 64;  // channels of the core
  localparam int unsigned NAGENTS       = 8;   // clustering agents
  localparam int unsigned PIXFIFO_DEPTH = 16;  // pixel FIFO entries per agent
  localparam int unsigned CNT_MAX       = 31;  // largest value of the pixel counter
  localparam int unsigned DIN_DEPTH     = 1;   // rows held by the input FIFO
  localparam int unsigned ROW_CLK_RATIO = 10;  // core clocks per row clock

  // --- this design's own widths ---
  localparam int unsigned ADCW  = 8;                       // ADC value per pixel
  localparam int unsigned ROWW  = 10;                      // row number
  localparam int unsigned COLW  = $clog2(NCH);             // column number
  localparam int unsigned AGW   = $clog2(NAGENTS);         // agent index
  localparam int unsigned CNTW  = $clog2(CNT_MAX + 1);     // pixel counter, 5 bits
  localparam int unsigned ENW   = ADCW + CNTW;             // energy sum
  localparam int unsigned DROWW = CNTW;                    // row offset inside a cluster
  localparam int unsigned PFW   = $clog2(PIXFIFO_DEPTH + 1); // pixel FIFO fill level

  // One hit pixel as it travels from the scheduler to an agent.
  typedef struct packed {
    logic [ROWW-1:0] row;
    logic [COLW-1:0] col;
    logic [ADCW-1:0] adc;
  } pixel_t;

  // One row as it enters the core.
  typedef struct packed {
    logic [ROWW-1:0]           row;
    logic [NCH-1:0][ADCW-1:0]  adc;   // 0 means "no hit"
  } row_t;

  // Item from the input scheduler to clustering control.
  typedef struct packed {
    logic   row_start;  // first item of a new row (carries the row number in pix.row)
    logic   has_pix;    // pix holds a hit pixel; 0 only for an empty row
    pixel_t pix;
  } sched_item_t;

  // Static cluster record ("static" output).
  typedef struct packed {
    logic [ROWW-1:0] seed_row;  // row of the first pixel in raster order
    logic [COLW-1:0] seed_col;  // column of that pixel
    logic [CNTW-1:0] size;      // pixel count, saturates at CNT_MAX
    logic [ENW-1:0]  energy;    // sum of ADC values, saturating
    logic            overflow;  // pixels were counted but not stored
  } cluster_info_t;

  // One pixel of the "fifo" output stream, addressed relative to the seed row.
  typedef struct packed {
    logic [DROWW-1:0] drow;
    logic [COLW-1:0]  col;
    logic [ADCW-1:0]  adc;
  } out_pix_t;

  // Spy memory word: {tag, payload}, see dce2_spy_mem.
  localparam int unsigned SPY_PAYLOAD = $bits(cluster_info_t);
  localparam int unsigned SPW         = SPY_PAYLOAD + 1;

  typedef enum logic [1:0] {AG_FREE = 2'd0, AG_OPEN = 2'd1, AG_CLOSED = 2'd2} agent_state_e;

  // What an agent shows to clustering control and the dout queue.
  typedef struct packed {
    agent_state_e    state;
    logic [ROWW-1:0] row_a;    // newest row holding a pixel of the cluster
    logic [NCH-1:0]  mask_a;   // columns hit in row_a
    logic [NCH-1:0]  mask_b;   // columns hit in row_a-1
    cluster_info_t   info;
    logic [PFW-1:0]  fill;     // pixel FIFO fill level
    pixel_t          head;     // oldest stored pixel
  } agent_status_t;

endpackage
