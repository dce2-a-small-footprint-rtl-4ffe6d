// tb_dce2_agent: drives one agent through its commands and checks its status after each:
// allocation, additions in the same and the next row (mask shifting), a row gap (mask_b
// cleared), FIFO contents in order, overflow past 16 stored pixels, counter saturation at 31 and
// the energy sum, merging another cluster's record (mask alignment, seed minimum, size/energy
// sums), closing and release.
module tb_dce2_agent;
  import dce2_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic alloc, add, mpix, minfo, close, release_i, pop;
  pixel_t pix, mpix_data;
  agent_status_t msrc, status;
  dce2_agent dut (.*);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic idle();
    alloc = 0; add = 0; mpix = 0; minfo = 0; close = 0; release_i = 0; pop = 0;
  endtask

  task automatic cmd_pix(input bit is_alloc, input int r, input int c, input int a);
    @(negedge clk);
    idle();
    pix.row = ROWW'(r); pix.col = COLW'(c); pix.adc = ADCW'(a);
    if (is_alloc) alloc = 1; else add = 1;
    @(negedge clk);
    idle();
  endtask

  initial begin : watchdog
    repeat (10000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int esum;
    idle(); pix = '0; mpix_data = '0; msrc = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    check(status.state == AG_FREE && status.fill == 0, "free after reset");

    cmd_pix(1, 10, 5, 20);
    check(status.state == AG_OPEN, "open after alloc");
    check(status.row_a == 10 && status.mask_a == (64'd1 << 5) && status.mask_b == 0, "masks after alloc");
    check(status.info.seed_row == 10 && status.info.seed_col == 5 && status.info.size == 1 && status.info.energy == 20, "record after alloc");
    cmd_pix(0, 10, 6, 30);
    check(status.mask_a == (64'd3 << 5) && status.row_a == 10, "same-row add");
    cmd_pix(0, 11, 7, 40);
    check(status.row_a == 11 && status.mask_a == (64'd1 << 7) && status.mask_b == (64'd3 << 5), "next-row add shifts masks");
    check(status.info.size == 3 && status.info.energy == 90, "size/energy after adds");
    check(status.fill == 3 && status.head.row == 10 && status.head.col == 5 && status.head.adc == 20, "fifo head");
    cmd_pix(0, 13, 7, 1);
    check(status.row_a == 13 && status.mask_b == 0, "row gap clears mask_b");

    // merge info from another cluster whose newest row is one less
    @(negedge clk);
    msrc = '0;
    msrc.row_a = 12; msrc.mask_a = 64'hF0; msrc.mask_b = 64'hFF00;
    msrc.info.seed_row = 9; msrc.info.seed_col = 40; msrc.info.size = 5; msrc.info.energy = 500;
    minfo = 1;
    @(negedge clk); idle();
    check(status.mask_b == 64'hF0 && status.mask_a == (64'd1 << 7), "merge aligns masks");
    check(status.info.seed_row == 9 && status.info.seed_col == 40, "merge keeps earlier seed");
    check(status.info.size == 9 && status.info.energy == 591 && !status.info.overflow, "merge sums");
    // moved pixel
    @(negedge clk);
    mpix = 1; mpix_data.row = 9; mpix_data.col = 40; mpix_data.adc = 77;
    @(negedge clk); idle();
    check(status.fill == 5 && status.info.size == 9, "moved pixel stored, not counted");

    // read the FIFO in order
    begin
      int er[5] = '{10, 10, 11, 13, 9};
      int ec[5] = '{5, 6, 7, 7, 40};
      for (int i = 0; i < 5; i++) begin
        check(status.head.row == ROWW'(er[i]) && status.head.col == COLW'(ec[i]), $sformatf("fifo order %0d", i));
        @(negedge clk); pop = 1; @(negedge clk); idle();
      end
      check(status.fill == 0, "fifo empty");
    end

    // close and release
    @(negedge clk); close = 1; @(negedge clk); idle();
    check(status.state == AG_CLOSED, "closed");
    @(negedge clk); release_i = 1; @(negedge clk); idle();
    check(status.state == AG_FREE && status.info.size == 0, "released");

    // overflow: 40 pixels of adc 200 in one cluster
    cmd_pix(1, 0, 0, 200);
    esum = 200;
    for (int i = 1; i < 40; i++) begin
      cmd_pix(0, i / 8, i % 8, 200);
      esum += 200;
      if (i == 15) check(status.fill == 16 && !status.info.overflow, "16 pixels fit");
      if (i == 16) check(status.fill == 16 && status.info.overflow, "17th pixel overflows");
      if (i == 30) check(status.info.size == 31, "counter reaches 31");
    end
    check(status.info.size == 31 && status.info.overflow, "counter saturates");
    check(int'(status.info.energy) == ((esum > 8191) ? 8191 : esum), $sformatf("energy %0d", status.info.energy));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
