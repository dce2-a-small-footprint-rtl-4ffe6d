// tb_dce2_testchip: the whole test chip, driven only through its pins, at its default sizes.
//
// Run A (checked cluster by cluster): a frame is written row by row into the pattern memory over
// JTAG (in mem chain, read back once), the control word starts a single replay, and the clusters
// leaving on the output pins are compared with a flood-fill reference clustering of the frame:
// seed, size, energy, overflow flag and stored pixels.  The spy memory is then read over JTAG
// (out mem chain) and must hold exactly the words seen on the pins; the core output chain must
// report the last record and the cluster count.
// Run B (stress): a frame that makes the core run out of agents while the receiver is held off
// (stall), meet more simultaneous clusters than agents (lost pixel) and receive rows with more hits
// than the row clock allows (lost row); the counters in the core output chain must show each.
// Run C: the 8-channel input, copied into two channel groups, must produce the expected clusters.
// Run D: the pattern memory replayed in loop mode must give one cluster per pass and never end.
// The JTAG bypass register is checked once.  A count of each mechanism (bypass, overflow, merge,
// stall, lost pixel, lost row, loop pass) is printed, and each one that never happened is a failure.
module tb_dce2_testchip;
  import dce2_pkg::*;
  import dce2_jtag_pkg::*;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic tck, tms, tdi, trst_n, tdo, tdo_en;
  logic ext_stb;
  logic [ROWW-1:0] ext_row;
  logic [7:0][ADCW-1:0] ext_adc;
  logic st_valid, st_ready, px_valid, px_last, px_ready, pg_done;
  cluster_info_t st_data;
  out_pix_t px_data;

  dce2_testchip dut (.*);

  localparam int W_IN = 8 * ADCW + $bits(ctrl_t);
  localparam int W_IM = NCH * ADCW + PAT_AW + 1;
  localparam int W_OC = $bits(cluster_info_t) + 1 + $bits(out_pix_t) + 48;
  localparam int W_OM = 1 + (SPY_AW + 1) + SPW + SPY_AW;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // ---------------- JTAG driver (TCK = clk / 8) ----------------
  task automatic tclk(input logic m, input logic d, output logic o);
    tms = m; tdi = d;
    repeat (4) @(posedge clk);
    o = tdo;
    tck = 1;
    repeat (4) @(posedge clk);
    tck = 0;
  endtask

  task automatic shift_ir(input logic [IRW-1:0] v);
    logic o;
    tclk(1, 0, o); tclk(1, 0, o); tclk(0, 0, o); tclk(0, 0, o);
    for (int i = 0; i < IRW; i++) tclk(i == IRW - 1, v[i], o);
    tclk(1, 0, o); tclk(0, 0, o);
  endtask

  task automatic shift_dr(input int n, input logic [1023:0] v, output logic [1023:0] got);
    logic o;
    got = '0;
    tclk(1, 0, o); tclk(0, 0, o); tclk(0, 0, o);
    for (int i = 0; i < n; i++) begin tclk(i == n - 1, v[i], o); got[i] = o; end
    tclk(1, 0, o); tclk(0, 0, o);
  endtask

  task automatic set_ctrl(input ctrl_t c);
    logic [1023:0] g;
    shift_ir(IR_INCHAIN);
    shift_dr(W_IN, 1024'(c), g);
  endtask

  // ---------------- frame and reference ----------------
  localparam int MAXR = 32;
  int img [MAXR][NCH];
  int nrows;

  typedef struct { int seed_row, seed_col, size, energy; bit ovf; int pr[$], pc[$], pa[$]; } clus_t;
  clus_t rx[$], cur_rx, ref_c[$];
  int lab [MAXR][NCH];
  logic [SPW-1:0] pin_words[$];

  task automatic clear_img(input int n);
    nrows = n;
    for (int r = 0; r < MAXR; r++) for (int c = 0; c < NCH; c++) img[r][c] = 0;
  endtask

  task automatic build_ref();
    int q_r[$], q_c[$];
    ref_c = {};
    for (int r = 0; r < MAXR; r++) for (int c = 0; c < NCH; c++) lab[r][c] = -1;
    for (int r = 0; r < nrows; r++) for (int c = 0; c < NCH; c++)
      if (img[r][c] != 0 && lab[r][c] < 0) begin
        clus_t k;
        int id = ref_c.size();
        k.seed_row = r; k.seed_col = c; k.size = 0; k.energy = 0; k.ovf = 0;
        lab[r][c] = id; q_r = {r}; q_c = {c};
        while (q_r.size() > 0) begin
          int rr = q_r.pop_front();
          int cc = q_c.pop_front();
          k.size++; k.energy += img[rr][cc];
          for (int dr = -1; dr <= 1; dr++) for (int dc = -1; dc <= 1; dc++) begin
            int nr = rr + dr, nc = cc + dc;
            if (nr >= 0 && nr < nrows && nc >= 0 && nc < NCH && img[nr][nc] != 0 && lab[nr][nc] < 0) begin
              lab[nr][nc] = id; q_r.push_back(nr); q_c.push_back(nc);
            end
          end
        end
        ref_c.push_back(k);
      end
  endtask

  task automatic load_pattern();
    logic [1023:0] v, g;
    shift_ir(IR_INMEM);
    for (int r = 0; r < nrows; r++) begin
      v = '0;
      v[0] = 1'b1;
      v[PAT_AW:1] = PAT_AW'(r);
      for (int c = 0; c < NCH; c++) v[PAT_AW + 1 + ADCW * c +: ADCW] = ADCW'(img[r][c]);
      shift_dr(W_IM, v, g);
    end
    // read back row 1: select it without writing, then capture
    v = '0; v[PAT_AW:1] = PAT_AW'(1);
    shift_dr(W_IM, v, g);
    shift_dr(W_IM, v, g);
    for (int c = 0; c < NCH; c++)
      check(int'(g[PAT_AW + 1 + ADCW * c +: ADCW]) == img[1][c], $sformatf("pattern read back ch %0d", c));
  endtask

  // ---------------- output pins ----------------
  bit hold = 0;
  always @(posedge clk) begin
    st_ready <= !hold && ($urandom_range(99) >= 10);
    px_ready <= !hold && ($urandom_range(99) >= 10);
    if (rst_n && st_valid && st_ready) begin
      cur_rx.seed_row = int'(st_data.seed_row); cur_rx.seed_col = int'(st_data.seed_col);
      cur_rx.size = int'(st_data.size); cur_rx.energy = int'(st_data.energy); cur_rx.ovf = st_data.overflow;
      cur_rx.pr.delete(); cur_rx.pc.delete(); cur_rx.pa.delete();
      pin_words.push_back({1'b1, st_data});
    end
    if (rst_n && px_valid && px_ready) begin
      cur_rx.pr.push_back(cur_rx.seed_row + int'(px_data.drow));
      cur_rx.pc.push_back(int'(px_data.col));
      cur_rx.pa.push_back(int'(px_data.adc));
      pin_words.push_back({1'b0, SPY_PAYLOAD'({px_last, px_data})});
      if (px_last) rx.push_back(cur_rx);
    end
  end

  task automatic compare_frame(input int expect_missing);
    int matched = 0;
    foreach (rx[i]) begin
      int f = -1;
      foreach (ref_c[j]) if (ref_c[j].seed_row == rx[i].seed_row && ref_c[j].seed_col == rx[i].seed_col) f = j;
      check(f >= 0, $sformatf("cluster seed (%0d,%0d) not in reference", rx[i].seed_row, rx[i].seed_col));
      if (f >= 0) begin
        clus_t e = ref_c[f];
        bit eovf = e.size > PIXFIFO_DEPTH;
        matched++;
        check(rx[i].size == ((e.size > CNT_MAX) ? CNT_MAX : e.size), $sformatf("size %0d exp %0d", rx[i].size, e.size));
        check(rx[i].energy == e.energy, $sformatf("energy %0d exp %0d", rx[i].energy, e.energy));
        check(rx[i].ovf == eovf, "overflow flag");
        check(rx[i].pr.size() == (eovf ? PIXFIFO_DEPTH : e.size), "stored pixel count");
        foreach (rx[i].pr[p]) begin
          int rr = rx[i].pr[p];
          check(rr >= 0 && rr < nrows && lab[rr][rx[i].pc[p]] == f && img[rr][rx[i].pc[p]] == rx[i].pa[p],
                $sformatf("pixel (%0d,%0d) of cluster", rr, rx[i].pc[p]));
        end
      end
    end
    check(ref_c.size() - matched == expect_missing, $sformatf("%0d clusters missing", ref_c.size() - matched));
  endtask

  task automatic run_pattern();
    ctrl_t c;
    c = '0; c.spy_clr = 1;
    set_ctrl(c);
    c.spy_clr = 0; c.src_mem = 1; c.last = PAT_AW'(nrows - 1);
    set_ctrl(c);
    c.run = 1;
    set_ctrl(c);
    wait (pg_done);
    repeat (400) @(posedge clk);
    while (hold) @(posedge clk);
    repeat (400) @(posedge clk);
    c.run = 0;
    set_ctrl(c);
  endtask

  function automatic int field(input logic [1023:0] g, input int lsb, input int w);
    return int'((g >> lsb) & ((1024'(1) << w) - 1));
  endfunction

  initial begin : watchdog
    repeat (3000000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [1023:0] g, v;
    int n_cl, n_rl, n_pl, n_mg, n_st, cnt;
    int n_ovf = 0, n_byp = 0, n_loop = 0;
    ctrl_t c;
    tck = 0; tms = 1; tdi = 0; trst_n = 1; ext_stb = 0; ext_row = '0; ext_adc = '0;
    repeat (4) @(posedge clk);
    rst_n = 1;
    begin logic o; repeat (5) tclk(1, 0, o); tclk(0, 0, o); end
    shift_dr(32, '0, g);
    check(g[31:0] == IDCODE, "IDCODE");
    // bypass: one-bit register, captures 0, delays TDI by one TCK
    shift_ir(IR_BYPASS);
    shift_dr(16, 1024'(16'hB5C3), g);
    check(g[15:0] == 16'h6B86, $sformatf("bypass delays by one bit (%h)", g[15:0]));
    n_byp++;

    // ---- run A ----
    clear_img(14);
    for (int r = 0; r < 5; r++) begin img[r][3] = 10 + r; img[r][7] = 20 + r; end      // U shape, merges
    for (int cc = 3; cc <= 7; cc++) img[5][cc] = 30 + cc;
    for (int r = 2; r < 9; r++) for (int cc = 40; cc < 43; cc++) img[r][cc] = 60 + r;  // 21 pixels, overflow
    img[0][20] = 5; img[1][21] = 6; img[12][63] = 200; img[13][0] = 1;
    build_ref();
    load_pattern();
    rx = {}; pin_words = {};
    run_pattern();
    compare_frame(0);
    foreach (rx[i]) n_ovf += int'(rx[i].ovf);
    check(n_ovf > 0, "overflow record seen");
    // spy memory holds what the pins saw
    shift_ir(IR_OUTMEM);
    cnt = 0;
    for (int a = 0; a < pin_words.size() && a < 64; a++) begin
      v = 1024'(a);
      shift_dr(W_OM, v, g);
      shift_dr(W_OM, v, g);
      cnt = field(g, SPY_AW + SPW, SPY_AW + 1);
      check(g[SPY_AW +: SPW] == pin_words[a], $sformatf("spy word %0d", a));
    end
    check(cnt == pin_words.size(), $sformatf("spy count %0d exp %0d", cnt, pin_words.size()));
    // core output chain
    shift_ir(IR_OUTCHAIN);
    shift_dr(W_OC, '0, g);
    n_cl = field(g, 32, 16);
    n_mg = field(g, 8, 8);
    check(n_cl == rx.size(), $sformatf("cluster counter %0d", n_cl));
    check(n_mg > 0, "merge counted");
    check(g[W_OC - 1 -: $bits(cluster_info_t)] == pin_words[pin_words.size() - 1 - rx[rx.size() - 1].pr.size()][SPY_PAYLOAD-1:0],
          "last record in output chain");
    // in pattern chain: last row given to the core is the closing empty row, number nrows+1
    shift_ir(IR_INPAT);
    shift_dr(ROWW + NCH * ADCW, '0, g);
    check(field(g, NCH * ADCW, ROWW) == nrows + 1, "in pattern chain row number");

    // ---- run B: stall, lost pixel, lost row ----
    clear_img(30);   // rows 22..29 stay empty so the end of the frame still reaches the core
    for (int k = 0; k < 8; k++) begin img[0][8 * k] = 9; img[3][8 * k + 2] = 9; end  // 8 + 8 clusters
    for (int k = 0; k < 9; k++) img[10][5 * k] = 4;                                   // 9 clusters in one row
    for (int r = 14; r < 22; r++) for (int cc = 0; cc < 24; cc += 2) img[r][cc] = 3;  // 12 hits per row
    load_pattern();
    fork
      run_pattern();
      begin hold = 1; repeat (300) @(posedge clk); hold = 0; end
    join
    shift_ir(IR_OUTCHAIN);
    shift_dr(W_OC, '0, g);
    n_rl = field(g, 24, 8); n_pl = field(g, 16, 8); n_st = field(g, 0, 8);
    $display("counters: clusters=%0d row_lost=%0d pix_lost=%0d merge=%0d stall=%0d", field(g, 32, 16), n_rl, n_pl, field(g, 8, 8), n_st);
    check(n_st > 0, "stall happened");
    check(n_pl > 0, "lost pixel happened");
    check(n_rl > 0, "lost row happened");

    // ---- run C: 8-channel input into groups 1 and 6 ----
    rx = {};
    c = '0; c.src_mem = 0; c.grp_en = 8'b0100_0010; c.run = 1;
    set_ctrl(c);
    for (int r = 0; r < 3; r++) begin
      @(negedge clk);
      ext_stb = 1; ext_row = ROWW'(200 + r);
      ext_adc = '0; ext_adc[2] = ADCW'(10 + r); ext_adc[3] = ADCW'(20 + r);
      @(negedge clk); ext_stb = 0;
      repeat (ROW_CLK_RATIO) @(negedge clk);
    end
    @(negedge clk); ext_stb = 1; ext_row = ROWW'(300); ext_adc = '0;
    @(negedge clk); ext_stb = 0;
    repeat (300) @(posedge clk);
    check(rx.size() == 2, $sformatf("two clusters from the 8-channel input (%0d)", rx.size()));
    foreach (rx[i]) begin
      check(rx[i].seed_row == 200 && (rx[i].seed_col == 10 || rx[i].seed_col == 50), "ext cluster seed");
      check(rx[i].size == 6 && rx[i].energy == 10+11+12+20+21+22, "ext cluster record");
    end

    // ---- run D: pattern memory in loop mode ----
    // one pixel in row 0 of a four-row pattern; every pass closes it again at row 2
    c.run = 0;
    set_ctrl(c);
    clear_img(4);
    img[0][5] = 77;
    load_pattern();
    rx = {};
    c = '0; c.src_mem = 1; c.loop = 1; c.last = PAT_AW'(3);
    set_ctrl(c);
    c.run = 1;
    set_ctrl(c);
    repeat (2000) @(posedge clk);
    c.run = 0;
    set_ctrl(c);
    repeat (200) @(posedge clk);
    n_loop = rx.size();
    check(!pg_done, "loop mode never ends a pass with done");
    foreach (rx[i]) check(rx[i].seed_row == 0 && rx[i].seed_col == 5 && rx[i].size == 1 && rx[i].energy == 77,
                          "looped cluster record");
    check(n_loop >= 40, $sformatf("clusters from repeated passes: %0d", n_loop));

    $display("mechanisms: bypass=%0d overflow=%0d merge=%0d stall=%0d pix_lost=%0d row_lost=%0d loop_passes=%0d",
             n_byp, n_ovf, n_mg, n_st, n_pl, n_rl, n_loop);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
