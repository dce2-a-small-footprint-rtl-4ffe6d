// tb_dce2_dout_queue: readout of finished clusters.  The testbench builds clusters directly in
// real agents, closes them and queues their indices; the dout queue must send for each one the
// static record and then exactly the stored pixels, oldest first, with the row relative to the
// seed and the last flag on the final pixel, under random back-pressure, and then release the
// agent and return its index to the free queue.  Also checks one pixel per clock without
// back-pressure.
module tb_dce2_dout_queue;
  import dce2_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  agent_status_t ag [8];
  logic [7:0]    t_alloc, t_add, t_close, d_pop, d_release;
  pixel_t        t_pix;
  logic          rdy_empty, rdy_pop, q_push;
  logic [2:0]    rdy_head, q_idx, free_idx;
  logic          free_push;
  logic [3:0]    rdy_count;
  logic          st_valid, st_ready, px_valid, px_last, px_ready;
  cluster_info_t st_data;
  out_pix_t      px_data;
  int            bp = 40;

  for (genvar k = 0; k < 8; k++) begin : g_ag
    dce2_agent u (.clk, .rst_n, .alloc(t_alloc[k]), .add(t_add[k]), .pix(t_pix), .mpix(1'b0),
                  .mpix_data('0), .minfo(1'b0), .msrc('0), .close(t_close[k]),
                  .release_i(d_release[k]), .pop(d_pop[k]), .status(ag[k]));
  end
  dce2_agent_queue #(.N(8), .INIT_FULL(1'b0)) u_rdy (.clk, .rst_n, .push0(q_push), .idx0(q_idx),
    .push1(1'b0), .idx1(3'd0), .pop(rdy_pop), .head(rdy_head), .empty(rdy_empty), .count(rdy_count));

  dce2_dout_queue dut (.clk, .rst_n, .rdy_empty, .rdy_head, .rdy_pop, .ag, .ag_pop(d_pop),
    .ag_release(d_release), .free_push, .free_push_idx(free_idx),
    .st_valid, .st_data, .st_ready, .px_valid, .px_data, .px_last, .px_ready);

  typedef struct { int r, c, a; } p_t;
  p_t  exp_px[$];
  cluster_info_t exp_st[$];
  int  exp_seed[$];
  int  freed[$];
  int  n_px = 0, n_st = 0;
  bit  expect_pix = 0;
  int  cur_seed = 0;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic build(input int k, input int r0, input int c0, input int n);
    cluster_info_t ci;
    ci = '0;
    ci.seed_row = ROWW'(r0); ci.seed_col = COLW'(c0);
    for (int i = 0; i < n; i++) begin
      int r = r0 + i / 3, c = c0 + i % 3, a = 1 + ((k * 37 + i * 11) % 250);
      @(negedge clk);
      t_pix.row = ROWW'(r); t_pix.col = COLW'(c); t_pix.adc = ADCW'(a);
      if (i == 0) t_alloc[k] = 1; else t_add[k] = 1;
      @(negedge clk);
      t_alloc = '0; t_add = '0;
      exp_px.push_back('{r, c, a});
      ci.size = ci.size + 1'b1; ci.energy = ci.energy + ENW'(a);
    end
    exp_st.push_back(ci);
    @(negedge clk); t_close[k] = 1; q_push = 1; q_idx = 3'(k);
    @(negedge clk); t_close = '0; q_push = 0;
  endtask

  always @(posedge clk) begin
    st_ready <= ($urandom_range(99) >= bp);
    px_ready <= ($urandom_range(99) >= bp);
    if (rst_n) begin
      if (st_valid && st_ready) begin
        n_st++;
        check(exp_st.size() > 0 && st_data == exp_st[0], "static record");
        check(!expect_pix, "record only after the previous cluster's last pixel");
        if (exp_st.size() > 0) void'(exp_st.pop_front());
        expect_pix = 1;
        cur_seed = int'(st_data.seed_row);
      end
      if (px_valid && px_ready) begin
        p_t e;
        n_px++;
        check(expect_pix, "pixel after its record");
        e = exp_px.pop_front();
        check(int'(px_data.col) == e.c && int'(px_data.adc) == e.a, $sformatf("pixel col/adc %0d/%0d exp %0d/%0d", px_data.col, px_data.adc, e.c, e.a));
        check(int'(px_data.drow) == e.r - cur_seed, $sformatf("relative row %0d exp %0d", px_data.drow, e.r - cur_seed));
        if (px_last) expect_pix = 0;
      end
      if (free_push) freed.push_back(int'(free_idx));
    end
  end

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int t0;
    t_alloc = '0; t_add = '0; t_close = '0; t_pix = '0; q_push = 0; q_idx = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    build(3, 100, 10, 7);
    build(5, 7, 60, 1);
    build(0, 20, 0, 16);
    repeat (400) @(posedge clk);
    check(n_st == 3 && n_px == 24, $sformatf("all clusters read: %0d records %0d pixels", n_st, n_px));
    check(freed.size() == 3 && freed[0] == 3 && freed[1] == 5 && freed[2] == 0, "agents returned in order");
    check(ag[3].state == AG_FREE && ag[5].state == AG_FREE && ag[0].state == AG_FREE, "agents released");
    // rate: no back-pressure, 10 pixels: record + 10 pixels within 13 clocks of queueing
    bp = 0;
    repeat (3) @(posedge clk);
    build(2, 50, 20, 10);
    t0 = n_px;
    repeat (13) @(posedge clk);
    check(n_px - t0 == 10, $sformatf("ten pixels in 13 clocks (%0d)", n_px - t0));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
