// tb_dce2_input_sched: rows of random occupancy are offered to the scheduler and the item stream
// is compared with the expected one: per row the hit columns in ascending order with their ADC
// values, row_start on the first item, one item without pixel for an empty row.  Back-pressure
// is random.  A separate phase without back-pressure checks the rate: a row of k hits leaves in
// k clocks, rows following each other without a gap.
module tb_dce2_input_sched;
  import dce2_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic        in_valid, in_pop, item_valid, item_ready;
  row_t        in_row;
  sched_item_t item;
  dce2_input_sched dut (.*);

  row_t        rows[$];
  sched_item_t exp_q[$];
  int          bp = 30;
  int          n_items = 0;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  function automatic row_t rnd_row(input int num, input int permille);
    row_t r;
    r.row = ROWW'(num);
    for (int c = 0; c < NCH; c++) r.adc[c] = ($urandom_range(999) < permille) ? ADCW'($urandom_range(255, 1)) : '0;
    return r;
  endfunction

  task automatic expect_row(input row_t r);
    bit first = 1;
    sched_item_t it;
    for (int c = 0; c < NCH; c++) if (r.adc[c] != 0) begin
      it.row_start = first; it.has_pix = 1; it.pix.row = r.row; it.pix.col = COLW'(c); it.pix.adc = r.adc[c];
      exp_q.push_back(it); first = 0;
    end
    if (first) begin
      it.row_start = 1; it.has_pix = 0; it.pix.row = r.row; it.pix.col = '0; it.pix.adc = r.adc[0];
      exp_q.push_back(it);
    end
  endtask

  // source: a row queue in front (stands in for the input FIFO)
  assign in_valid = rows.size() > 0;
  assign in_row   = (rows.size() > 0) ? rows[0] : '0;
  always @(posedge clk) if (rst_n && in_pop) void'(rows.pop_front());

  always @(posedge clk) begin
    if (rst_n && item_valid && item_ready) begin
      sched_item_t e;
      n_items++;
      check(exp_q.size() > 0, "unexpected item");
      if (exp_q.size() > 0) begin
        e = exp_q.pop_front();
        check(item.row_start == e.row_start && item.has_pix == e.has_pix && item.pix.row == e.pix.row,
              $sformatf("item flags/row: got %b%b %0d exp %b%b %0d", item.row_start, item.has_pix, item.pix.row,
                        e.row_start, e.has_pix, e.pix.row));
        if (e.has_pix) check(item.pix.col == e.pix.col && item.pix.adc == e.pix.adc,
                             $sformatf("pixel col %0d adc %0d exp %0d %0d", item.pix.col, item.pix.adc, e.pix.col, e.pix.adc));
      end
    end
    item_ready <= ($urandom_range(99) >= bp);
  end

  initial begin : watchdog
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int t0, hits, k;
    row_t x;
    item_ready = 1;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int r = 0; r < 300; r++) begin
      x = rnd_row(r, (r % 5 == 0) ? 0 : ((r % 7 == 0) ? 400 : 60));
      rows.push_back(x); expect_row(x);
      while (rows.size() > 2) @(posedge clk);
    end
    while (exp_q.size() > 0) @(posedge clk);
    // rate: no back-pressure, 20 rows queued, total items = sum(max(k,1))
    bp = 0;
    repeat (3) @(posedge clk);
    hits = 0;
    for (int r = 0; r < 20; r++) begin
      x = rnd_row(500 + r, 150);
      k = 0;
      for (int c = 0; c < NCH; c++) if (x.adc[c] != 0) k++;
      hits += (k == 0) ? 1 : k;
      rows.push_back(x); expect_row(x);
    end
    t0 = n_items;
    @(posedge clk);
    repeat (hits) @(posedge clk);
    repeat (1) @(posedge clk);
    check(n_items - t0 == hits, $sformatf("rate: %0d items in %0d clocks", n_items - t0, hits));
    check(exp_q.size() == 0, "all items delivered");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
