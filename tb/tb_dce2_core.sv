// tb_dce2_core: end-to-end check of the DCE2 clustering core.
//
// Frames of pixel rows are sent one row every ROW_CLK_RATIO clocks.  For every frame a reference
// clustering is computed here by flood fill (8-neighbourhood) and every cluster the core puts out
// (static record plus pixel stream) is compared with it: seed, size, energy, overflow flag and the
// stored pixels.  Directed frames make each mechanism happen: merges of clusters that meet late, a
// cluster larger than the pixel FIFO, more simultaneous clusters than agents (lost pixel), a
// stall while agents wait for readout, rows arriving faster than they drain (lost row), and the
// ten-pixels-per-row rate at which no row may be lost.  Receivers apply random back-pressure.
module tb_dce2_core;
  import dce2_pkg::*;

  localparam int MAXR = 48;

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
  int bp_percent = 20;

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
    rx = {};
    build_ref();
    for (int r = 0; r < nrows; r++) send_row(base + r, r, gap);
    send_row(base + nrows + 2, -1, gap);   // non-adjacent empty row closes everything
    drain();
    if (compare) begin
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

  // random rows; a row is redrawn while it and the row before hold more than NAGENTS hits,
  // so that no pixel can find all agents busy
  task automatic random_img(input int n, input int permille);
    int prev = 0, cnt;
    clear_img(n);
    for (int r = 0; r < n; r++) begin
      do begin
        cnt = 0;
        for (int c = 0; c < NCH; c++) begin
          img[r][c] = ($urandom_range(999) < permille) ? $urandom_range(255, 1) : 0;
          if (img[r][c] != 0) cnt++;
        end
      end while (prev + cnt > NAGENTS);
      prev = cnt;
    end
  endtask

  initial begin : watchdog
    repeat (400000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int lost0, rl0;
    row_stb = 1'b0; row_num = '0; row_adc = '0;
    st_ready = 1'b1; px_ready = 1'b1;
    repeat (4) @(posedge clk);
    rst_n = 1'b1;

    // 1. U-shape: two arms meet at the bottom -> merge
    clear_img(6);
    for (int r = 0; r < 5; r++) begin img[r][3] = 10 + r; img[r][7] = 20 + r; end
    for (int c = 3; c <= 7; c++) img[5][c] = 30 + c;
    img[0][20] = 5; img[1][21] = 6;                // separate diagonal pair
    run_frame(ROW_CLK_RATIO, 1, 0);

    // 2. cluster larger than the pixel FIFO (overflow), 3 wide x 8 rows = 24 pixels
    clear_img(8);
    for (int r = 0; r < 8; r++) for (int c = 30; c < 33; c++) img[r][c] = 100;
    run_frame(ROW_CLK_RATIO, 1, 0);

    // 3. nine isolated pixels in one row: the ninth finds no agent -> lost
    clear_img(1);
    for (int c = 0; c < 9; c++) img[0][4 * c] = 50 + c;
    lost0 = n_pix_lost;
    run_frame(ROW_CLK_RATIO, 1, 1);
    check(n_pix_lost - lost0 == 1, "exactly one lost pixel for nine clusters");

    // 4. eight clusters, then eight new ones two rows later while readout is slow -> stall
    bp_percent = 90;
    clear_img(4);
    for (int c = 0; c < 8; c++) begin img[0][6 * c] = 1 + c; img[3][6 * c + 1] = 11 + c; end
    run_frame(ROW_CLK_RATIO, 1, 0);
    bp_percent = 20;

    // 5. rate: ten hits per row at one row per ROW_CLK_RATIO clocks loses no row
    clear_img(20);
    for (int r = 0; r < 20; r++) for (int k = 0; k < 5; k++) begin
      img[r][12 * k] = 3; img[r][12 * k + 1] = 4;
    end
    bp_percent = 0;
    rl0 = n_row_lost;
    run_frame(ROW_CLK_RATIO, 1, 0);
    check(n_row_lost == rl0, "no row lost at ten pixels per row");

    // 6. eleven hits per row at the same rate overruns the input FIFO -> lost rows
    clear_img(20);
    for (int r = 0; r < 20; r++) begin
      for (int k = 0; k < 5; k++) begin img[r][12 * k] = 3; img[r][12 * k + 1] = 4; end
      img[r][63] = 7;
    end
    run_frame(ROW_CLK_RATIO, 0, 0);
    check(n_row_lost > rl0, "rows lost at eleven pixels per row");
    bp_percent = 20;

    // 7. random frames at 3 % occupancy, fully compared
    for (int f = 0; f < 12; f++) begin
      lost0 = n_pix_lost; rl0 = n_row_lost;
      random_img(40, 30);
      run_frame(ROW_CLK_RATIO, 1, 0);
      check(n_pix_lost == lost0 && n_row_lost == rl0, "random frame lost nothing");
    end

    $display("events: alloc=%0d merge=%0d stall=%0d pix_lost=%0d row_lost=%0d close=%0d clusters=%0d overflow=%0d",
             n_alloc, n_merge, n_stall, n_pix_lost, n_row_lost, n_close, n_clusters, n_ovf);
    check(n_alloc > 0, "alloc happened");
    check(n_merge > 0, "merge happened");
    check(n_stall > 0, "stall happened");
    check(n_pix_lost > 0, "pixel loss happened");
    check(n_row_lost > 0, "row loss happened");
    check(n_close > 0, "close happened");
    check(n_ovf > 0, "pixel FIFO overflow happened");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
