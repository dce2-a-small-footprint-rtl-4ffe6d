// tb_dce2_occupancy: the DCE2 core at its default sizes under the load it was sized for, a sensor
// filled to 5 % with particle-like hit groups and at most 19 hits in one row.
//
// Each frame of 40 rows is filled with random groups: a seed pixel and up to four more pixels that
// each touch one already placed, so touching groups also occur and must be merged.  Pixels are
// added until 5 % of the frame is hit; a pixel is not added to a row that already holds 19.
// Frames follow each other at one row every ROW_CLK_RATIO clocks, under random output
// back-pressure.  Every cluster that comes out is compared with a flood-fill reference (seed,
// size, energy, overflow, pixels).  A reference cluster may be missing only in a frame where the
// core reported a lost pixel or a lost row; such a frame is counted and not compared.  Lost pixels must stay below 1 % of all hits; that
// bound is this testbench's own acceptance figure.  It also reports the output volume: 35 bits per
// cluster record plus 19 per pixel, against 24 bits (row, column, ADC) per hit sent one by one.
module tb_dce2_occupancy;
  import dce2_pkg::*;

  localparam int MAXR = 48;
  localparam int ROWS = 40;
  localparam int FRAMES = 30;
  localparam int MAXROW = 19;
  int frames_lossy = 0;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  logic                     row_stb;
  logic [ROWW-1:0]          row_num;
  logic [NCH-1:0][ADCW-1:0] row_adc;
  logic st_valid, st_ready, px_valid, px_last, px_ready;
  cluster_info_t st_data;
  out_pix_t      px_data;
  logic ev_row_lost, ev_alloc, ev_merge, ev_stall, ev_pix_lost, ev_close;

  dce2_core dut (.*);

  int checks = 0, failures = 0;
  int n_row_lost = 0, n_alloc = 0, n_merge = 0, n_stall = 0, n_pix_lost = 0, n_close = 0;
  int n_ovf = 0, n_clusters = 0;
  int bp_percent = 0;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  // ---------------- frame image and reference ----------------
  int img [MAXR][NCH];
  int nrows;
  int base = 0;

  typedef struct {
    int seed_row, seed_col, size, energy;
    bit ovf;
    int pr[$], pc[$], pa[$];
  } clus_t;

  clus_t rx[$];
  clus_t cur_rx;
  bit    in_cluster = 0;

  always @(posedge clk) if (rst_n) begin
    n_row_lost += int'(ev_row_lost);
    n_alloc    += int'(ev_alloc);
    n_merge    += int'(ev_merge);
    n_stall    += int'(ev_stall);
    n_pix_lost += int'(ev_pix_lost);
    n_close    += int'(ev_close);
  end

  // receiver
  always @(posedge clk) begin
    st_ready <= ($urandom_range(99) >= bp_percent);
    px_ready <= ($urandom_range(99) >= bp_percent);
    if (rst_n && st_valid && st_ready) begin
      cur_rx.seed_row = int'(st_data.seed_row);
      cur_rx.seed_col = int'(st_data.seed_col);
      cur_rx.size     = int'(st_data.size);
      cur_rx.energy   = int'(st_data.energy);
      cur_rx.ovf      = st_data.overflow;
      cur_rx.pr.delete(); cur_rx.pc.delete(); cur_rx.pa.delete();
      in_cluster = 1;
    end
    if (rst_n && px_valid && px_ready) begin
      cur_rx.pr.push_back(cur_rx.seed_row + int'(px_data.drow));
      cur_rx.pc.push_back(int'(px_data.col));
      cur_rx.pa.push_back(int'(px_data.adc));
      if (px_last) begin
        rx.push_back(cur_rx);
        in_cluster = 0;
      end
    end
  end

  // flood fill reference: lab[r][c] = cluster id
  int lab [MAXR][NCH];
  clus_t ref_c[$];

  task automatic build_ref();
    int q_r[$], q_c[$];
    ref_c = {};
    for (int r = 0; r < MAXR; r++) for (int c = 0; c < NCH; c++) lab[r][c] = -1;
    for (int r = 0; r < nrows; r++) for (int c = 0; c < NCH; c++) begin
      if (img[r][c] != 0 && lab[r][c] < 0) begin
        clus_t k;
        int id = ref_c.size();
        k.seed_row = base + r; k.seed_col = c; k.size = 0; k.energy = 0; k.ovf = 0;
        lab[r][c] = id;
        q_r = {r}; q_c = {c};
        while (q_r.size() > 0) begin
          int rr = q_r.pop_front();
          int cc = q_c.pop_front();
          k.size++; k.energy += img[rr][cc];
          k.pr.push_back(base + rr); k.pc.push_back(cc); k.pa.push_back(img[rr][cc]);
          for (int dr = -1; dr <= 1; dr++) for (int dc = -1; dc <= 1; dc++) begin
            int nr = rr + dr, nc = cc + dc;
            if (nr >= 0 && nr < nrows && nc >= 0 && nc < NCH && img[nr][nc] != 0 && lab[nr][nc] < 0) begin
              lab[nr][nc] = id; q_r.push_back(nr); q_c.push_back(nc);
            end
          end
        end
        ref_c.push_back(k);
      end
    end
  endtask

  // ---------------- stimulus ----------------
  task automatic send_row(input int num, input int r, input int gap);
    @(posedge clk);
    row_stb <= 1'b1;
    row_num <= ROWW'(num);
    for (int c = 0; c < NCH; c++) row_adc[c] <= (r >= 0) ? ADCW'(img[r][c]) : '0;
    @(posedge clk);
    row_stb <= 1'b0;
    repeat (gap - 2) @(posedge clk);
  endtask

  task automatic drain();
    int quiet = 0;
    while (quiet < 200) begin
      @(posedge clk);
      if (st_valid || px_valid || dut.item_valid || dut.fifo_valid) quiet = 0; else quiet++;
    end
  endtask

  // send the frame, flush it, wait and compare; expect_lost = clusters allowed missing
  task automatic run_frame(input int gap, input bit compare, input int expect_missing);
    int matched = 0;
    int lost_before = n_pix_lost;
    int rl_before = n_row_lost;
    rx = {};
    build_ref();
    for (int r = 0; r < nrows; r++) send_row(base + r, r, gap);
    send_row(base + nrows + 2, -1, gap);   // non-adjacent empty row closes everything
    drain();
    if (n_pix_lost != lost_before || n_row_lost != rl_before) frames_lossy++;
    else if (compare) begin
      foreach (rx[i]) begin
        int f = -1;
        foreach (ref_c[j]) if (ref_c[j].seed_row == rx[i].seed_row && ref_c[j].seed_col == rx[i].seed_col) f = j;
        check(f >= 0, $sformatf("cluster with seed (%0d,%0d) not in reference", rx[i].seed_row, rx[i].seed_col));
        if (f >= 0) begin
          clus_t e = ref_c[f];
          int esz = (e.size > CNT_MAX) ? CNT_MAX : e.size;
          int een = (e.energy > (1 << ENW) - 1) ? (1 << ENW) - 1 : e.energy;
          bit eovf = e.size > PIXFIFO_DEPTH;
          int enp = eovf ? PIXFIFO_DEPTH : e.size;
          matched++;
          n_clusters++;
          if (rx[i].ovf) n_ovf++;
          check(rx[i].size == esz, $sformatf("size %0d exp %0d seed (%0d,%0d)", rx[i].size, esz, e.seed_row, e.seed_col));
          check(rx[i].energy == een, $sformatf("energy %0d exp %0d", rx[i].energy, een));
          check(rx[i].ovf == eovf, $sformatf("overflow %0d exp %0d", rx[i].ovf, eovf));
          check(rx[i].pr.size() == enp, $sformatf("stored pixels %0d exp %0d", rx[i].pr.size(), enp));
          foreach (rx[i].pr[p]) begin
            int rr = rx[i].pr[p] - base;
            bit ok = rr >= 0 && rr < nrows && lab[rr][rx[i].pc[p]] == f && img[rr][rx[i].pc[p]] == rx[i].pa[p];
            check(ok, $sformatf("pixel (%0d,%0d,%0d) not part of cluster", rx[i].pr[p], rx[i].pc[p], rx[i].pa[p]));
          end
        end
      end
      check(ref_c.size() - matched == expect_missing,
            $sformatf("%0d reference clusters missing, expected %0d", ref_c.size() - matched, expect_missing));
    end
    base = base + nrows + 10;
    if (base > 900) base = 0;
  endtask

  task automatic clear_img(input int n);
    nrows = n;
    for (int r = 0; r < MAXR; r++) for (int c = 0; c < NCH; c++) img[r][c] = 0;
  endtask

  int rowcnt [MAXR];
  int hits_total = 0;

  function automatic bit place(input int r, input int c);
    if (r < 0 || r >= nrows || c < 0 || c >= NCH) return 0;
    if (img[r][c] != 0 || rowcnt[r] >= MAXROW) return 0;
    img[r][c] = $urandom_range(255, 1);
    rowcnt[r]++;
    return 1;
  endfunction

  task automatic occupancy_img(input int n, input int percent);
    int target, placed = 0, tries = 0;
    clear_img(n);
    for (int r = 0; r < MAXR; r++) rowcnt[r] = 0;
    target = n * NCH * percent / 100;
    while (placed < target && tries < 100000) begin
      int r = $urandom_range(n - 1), c = $urandom_range(NCH - 1);
      int sz = $urandom_range(5, 1);
      int pr[$], pc[$];
      tries++;
      if (!place(r, c)) continue;
      placed++; pr.push_back(r); pc.push_back(c);
      for (int k = 1; k < sz && placed < target; k++) begin
        int j = $urandom_range(pr.size() - 1);
        int nr = pr[j] + $urandom_range(2) - 1, nc = pc[j] + $urandom_range(2) - 1;
        if (place(nr, nc)) begin placed++; pr.push_back(nr); pc.push_back(nc); end
      end
    end
    hits_total += placed;
  endtask

  initial begin : watchdog
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int lost0, rl0, n_bits_out, max_row;
    row_stb = 1'b0; row_num = '0; row_adc = '0;
    st_ready = 1'b1; px_ready = 1'b1;
    repeat (4) @(posedge clk);
    rst_n = 1'b1;
    n_bits_out = 0; max_row = 0;
    for (int f = 0; f < FRAMES; f++) begin
      lost0 = n_pix_lost; rl0 = n_row_lost;
      occupancy_img(ROWS, 5);
      for (int r = 0; r < ROWS; r++) if (rowcnt[r] > max_row) max_row = rowcnt[r];
      run_frame(ROW_CLK_RATIO, 1, 0);
      foreach (rx[i]) n_bits_out += $bits(cluster_info_t) + $bits(out_pix_t) * rx[i].pr.size();
    end
    $display("occupancy: hits=%0d clusters=%0d merges=%0d stalls=%0d pix_lost=%0d row_lost=%0d max hits/row=%0d frames with loss=%0d",
             hits_total, n_clusters, n_merge, n_stall, n_pix_lost, n_row_lost, max_row, frames_lossy);
    $display("volume: clustered %0d bits, single hits %0d bits", n_bits_out, 24 * hits_total);
    check(hits_total >= FRAMES * ROWS * NCH * 5 / 100, "5 % occupancy reached");
    check(n_merge > 0, "touching groups merged");
    check(n_pix_lost * 100 < hits_total, $sformatf("lost pixels %0d of %0d hits", n_pix_lost, hits_total));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
