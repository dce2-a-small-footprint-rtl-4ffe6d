// dce2_input_sched: input scheduler queue of the DCE2 core.
//
// Turns one parallel row of NCH channels into a sequence of hit pixels, one per core clock, so the
// clustering logic behind it handles pixels one at a time instead of a whole row at once (the
// core idea of DCE2).  A channel is a hit when its ADC value is non-zero.  The current row is kept
// in a register together with a mask of the hits still to be sent; a recursive binary tree picks
// the lowest remaining column each cycle.  When the last hit of a row is taken the next row is
// loaded from the input FIFO in the same cycle, so a row with k hits takes k core clocks (one for
// an empty row).  With a core clock ten times the row clock this handles ten pixels per row, the
// figure the document gives.
//
// Output: an item stream (item_valid/item_ready).  The first item of each row has row_start set;
// an empty row produces a single item with has_pix cleared, so that clustering control still sees
// the row go by.  Column order inside a row and the empty-row item are this design's choices.
module dce2_input_sched
  import dce2_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  // from the input FIFO
  input  logic        in_valid,
  input  row_t        in_row,
  output logic        in_pop,
  // to clustering control
  output logic        item_valid,
  output sched_item_t item,
  input  logic        item_ready
);
  row_t            cur;
  logic [NCH-1:0]  pend;     // hits of cur not yet sent
  logic            loaded;   // cur holds a row
  logic            first;    // next item is the first of cur
  logic            found;
  logic [COLW-1:0] col;
  logic [NCH-1:0]  hits_in;
  logic            last_item;

  always_comb begin
    for (int c = 0; c < NCH; c++) hits_in[c] = (in_row.adc[c] != '0);
  end

  dce2_tree_sel #(.N(NCH)) u_sel (.req(pend), .found(found), .idx(col));

  assign item_valid      = loaded;
  assign item.row_start  = first;
  assign item.has_pix    = found;
  assign item.pix.row    = cur.row;
  assign item.pix.col    = col;
  assign item.pix.adc    = cur.adc[col];

  // the item leaving now is the last one of the row
  assign last_item = loaded && item_ready && ((pend & ~(NCH'(1) << col)) == '0);
  assign in_pop    = in_valid && (!loaded || last_item);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cur    <= '0;
      pend   <= '0;
      loaded <= 1'b0;
      first  <= 1'b0;
    end else if (in_pop) begin
      cur    <= in_row;
      pend   <= hits_in;
      loaded <= 1'b1;
      first  <= 1'b1;
    end else if (loaded && item_ready) begin
      pend  <= pend & ~(NCH'(1) << col);
      first <= 1'b0;
      if (last_item) loaded <= 1'b0;
    end
  end
endmodule
