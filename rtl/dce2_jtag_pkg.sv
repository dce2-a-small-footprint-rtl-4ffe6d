// dce2_jtag_pkg: instruction codes and control word of the DCE2 test chip's JTAG access.
//
// The test chip is driven entirely through JTAG: test rows are written into a pattern memory,
// replayed into the clustering core, and the core's output is read back from a spy memory.  The
// instruction codes and the control word layout are this design's own; the document names the
// chains but not their contents.
package dce2_jtag_pkg;
  localparam int unsigned IRW = 4;

  typedef enum logic [IRW-1:0] {
    IR_IDCODE   = 4'h1,
    IR_INCHAIN  = 4'h2,   // in chain: 8-channel input capture + control word
    IR_INMEM    = 4'h3,   // in mem chain: pattern memory write/read
    IR_INPAT    = 4'h4,   // in pattern chain: row presented to the core
    IR_OUTCHAIN = 4'h5,   // clustering core output chain
    IR_OUTMEM   = 4'h6,   // out mem chain: spy memory read
    IR_BYPASS   = 4'hF
  } ir_e;

  localparam logic [31:0] IDCODE = 32'h0DCE_2001;

  localparam int unsigned PAT_AW = 5;   // pattern memory: 32 rows
  localparam int unsigned SPY_AW = 6;   // spy memory: 64 words

  // Control word, written through the in chain.
  typedef struct packed {
    logic              run;      // start the pattern generator (rising edge) / enable
    logic              src_mem;  // 1: rows from the pattern memory, 0: from the 8-channel input
    logic              loop;     // replay the pattern memory continuously
    logic [PAT_AW-1:0] last;     // index of the last pattern row
    logic [7:0]        grp_en;   // 8-channel input copied into these groups of 8 channels
    logic              spy_clr;  // clear the spy memory write pointer
  } ctrl_t;
endpackage
