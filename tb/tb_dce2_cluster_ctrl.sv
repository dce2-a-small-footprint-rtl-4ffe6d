// tb_dce2_cluster_ctrl: clustering control with eight real agents and the two agent queues around
// it; the testbench plays the input scheduler and the readout.  Directed items check: allocation
// of free agents in order, adding to the matching agent, the merge of two clusters that meet (the
// second agent's pixels and record end up in the first, the second returns to the free queue),
// closing of clusters that can no longer grow and their order in the ready queue, the stall while
// all agents are busy but one waits for readout, the loss of a pixel when all agents are open, and a
// pixel that touches its cluster only through the cluster's previous row.
module tb_dce2_cluster_ctrl;
  import dce2_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic          item_valid, item_ready;
  sched_item_t   item;
  agent_status_t ag [8];
  logic [7:0]    c_alloc, c_add, c_mpix, c_minfo, c_close, c_release, c_pop, tb_release;
  pixel_t        c_pix, c_mpix_data;
  agent_status_t c_msrc;
  logic          free_empty, free_pop, free_push, tb_free_push;
  logic [2:0]    free_head, free_idx, tb_free_idx;
  logic          rdy_push, rdy_empty, rdy_pop;
  logic [2:0]    rdy_idx, rdy_head;
  logic [3:0]    rdy_count, free_count;
  logic          ev_alloc, ev_merge, ev_stall, ev_lost, ev_close;

  dce2_cluster_ctrl dut (
    .clk, .rst_n, .item_valid, .item, .item_ready, .ag,
    .ag_alloc(c_alloc), .ag_add(c_add), .ag_pix(c_pix), .ag_mpix(c_mpix), .ag_mpix_data(c_mpix_data),
    .ag_minfo(c_minfo), .ag_msrc(c_msrc), .ag_close(c_close), .ag_release(c_release), .ag_pop(c_pop),
    .free_empty, .free_head, .free_pop, .free_push, .free_push_idx(free_idx),
    .rdy_push, .rdy_push_idx(rdy_idx), .ev_alloc, .ev_merge, .ev_stall, .ev_lost, .ev_close);

  for (genvar k = 0; k < 8; k++) begin : g_ag
    dce2_agent u (.clk, .rst_n, .alloc(c_alloc[k]), .add(c_add[k]), .pix(c_pix), .mpix(c_mpix[k]),
                  .mpix_data(c_mpix_data), .minfo(c_minfo[k]), .msrc(c_msrc), .close(c_close[k]),
                  .release_i(c_release[k] | tb_release[k]), .pop(c_pop[k]), .status(ag[k]));
  end
  dce2_agent_queue #(.N(8), .INIT_FULL(1'b1)) u_free (.clk, .rst_n, .push0(free_push), .idx0(free_idx),
    .push1(tb_free_push), .idx1(tb_free_idx), .pop(free_pop), .head(free_head), .empty(free_empty), .count(free_count));
  dce2_agent_queue #(.N(8), .INIT_FULL(1'b0)) u_rdy (.clk, .rst_n, .push0(rdy_push), .idx0(rdy_idx),
    .push1(1'b0), .idx1(3'd0), .pop(rdy_pop), .head(rdy_head), .empty(rdy_empty), .count(rdy_count));

  int n_alloc = 0, n_merge = 0, n_stall = 0, n_lost = 0, n_close = 0;
  always @(posedge clk) if (rst_n) begin
    n_alloc += int'(ev_alloc); n_merge += int'(ev_merge); n_stall += int'(ev_stall);
    n_lost += int'(ev_lost); n_close += int'(ev_close);
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // present one item and wait until it is taken (or max clocks)
  task automatic send(input bit rs, input bit hp, input int r, input int c, input int a, input int maxclk = 50);
    int n = 0;
    @(negedge clk);
    item_valid = 1; item.row_start = rs; item.has_pix = hp;
    item.pix.row = ROWW'(r); item.pix.col = COLW'(c); item.pix.adc = ADCW'(a);
    #1;
    while (!item_ready && n < maxclk) begin @(negedge clk); #1; n++; end
    @(posedge clk);
    @(negedge clk);
    item_valid = 0;
  endtask

  task automatic settle(input int n);
    repeat (n) @(negedge clk);
  endtask

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    item_valid = 0; item = '0; tb_release = '0; tb_free_push = 0; tb_free_idx = 0; rdy_pop = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    // two separate clusters in row 0
    send(1, 1, 0, 5, 11);
    send(0, 1, 0, 10, 12);
    check(ag[0].state == AG_OPEN && ag[0].info.seed_col == 5, "agent 0 allocated");
    check(ag[1].state == AG_OPEN && ag[1].info.seed_col == 10, "agent 1 allocated");
    // row 1 continues both
    send(1, 1, 1, 6, 13);
    send(0, 1, 1, 9, 14);
    check(ag[0].info.size == 2 && ag[1].info.size == 2, "pixels added to matching agents");
    check(ag[2].state == AG_FREE, "no extra agent");
    // row 2: (2,7) joins agent 0, (2,8) touches both -> merge into agent 0
    send(1, 1, 2, 7, 15);
    send(0, 1, 2, 8, 16);
    settle(8);
    check(n_merge == 1, "one merge");
    check(ag[1].state == AG_FREE, "merged agent released");
    check(ag[0].info.size == 6 && ag[0].info.energy == 11+12+13+14+15+16, "merged record");
    check(ag[0].fill == 6, "merged pixels stored");
    check(ag[0].mask_a == (64'd3 << 7) && ag[0].mask_b == ((64'd1 << 6) | (64'd1 << 9)), "merged masks");
    check(free_count == 7, "free queue refilled");
    // row 5: cluster 0 can no longer grow -> closed
    send(1, 0, 5, 0, 0);
    settle(3);
    check(ag[0].state == AG_CLOSED && !rdy_empty && rdy_head == 0, "stale cluster closed and queued");
    // row 10: seven isolated pixels use the seven free agents, the eighth waits
    for (int i = 0; i < 7; i++) send(i == 0, 1, 10, 4 * i, 1 + i);
    check(free_empty, "all agents in use");
    fork
      send(0, 1, 10, 40, 99, 1000);
      begin
        settle(10);
        check(n_stall >= 5 && ag[0].state == AG_CLOSED, "pixel waits while an agent awaits readout");
        // readout of agent 0
        @(negedge clk); rdy_pop = 1; tb_release[0] = 1; tb_free_push = 1; tb_free_idx = 0;
        @(negedge clk); rdy_pop = 0; tb_release = '0; tb_free_push = 0;
      end
    join
    check(ag[0].state == AG_OPEN && ag[0].info.seed_col == 40, "waiting pixel took the freed agent");
    // ninth pixel: all eight agents open, none closing -> lost
    send(0, 1, 10, 50, 7);
    check(n_lost == 1, "pixel lost when all agents open");
    // row 20 closes all eight, in index order
    send(1, 0, 20, 0, 0);
    settle(12);
    check(n_close == 9 && rdy_count == 8, $sformatf("eight closes queued (%0d, %0d)", n_close, rdy_count));
    check(rdy_head == 0, "ready order starts at lowest index");
    check(n_alloc == 10, $sformatf("allocations %0d", n_alloc));
    // read out and free all eight
    for (int k = 0; k < 8; k++) begin
      int h;
      @(negedge clk); h = int'(rdy_head);
      rdy_pop = 1; tb_release[h] = 1; tb_free_push = 1; tb_free_idx = 3'(h);
      @(negedge clk); rdy_pop = 0; tb_release = '0; tb_free_push = 0;
    end
    check(free_count == 8 && rdy_empty, "all agents free again");
    // (30,5), then (31,4) and (31,6): the last touches the cluster only through its previous row
    send(1, 1, 30, 5, 1);
    send(1, 1, 31, 4, 2);
    send(0, 1, 31, 6, 3);
    settle(3);
    check(n_alloc == 11, $sformatf("one allocation for a diagonal V (%0d)", n_alloc - 10));
    check(free_count == 7, "seven agents still free");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
