// tb_dce2_agent_queue: the free-queue configuration must leave reset holding 0..N-1 in order;
// then random single and double pushes and pops are compared with a queue model (indices are
// kept unique so the queue can never overflow, as in the core).  A second instance checks that
// the ready-queue configuration starts empty.
module tb_dce2_agent_queue;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic       push0, push1, pop, empty, e2;
  logic [2:0] idx0, idx1, head, h2;
  logic [3:0] count, c2;
  dce2_agent_queue #(.N(8), .INIT_FULL(1'b1)) dut (.clk, .rst_n, .push0, .idx0, .push1, .idx1, .pop, .head, .empty, .count);
  dce2_agent_queue #(.N(8), .INIT_FULL(1'b0)) dut2 (.clk, .rst_n, .push0(1'b0), .idx0(3'd0), .push1(1'b0), .idx1(3'd0),
                                                    .pop(1'b0), .head(h2), .empty(e2), .count(c2));
  int m[$];
  int outside[$];   // indices not in the queue

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int n_double = 0;
    push0 = 0; push1 = 0; pop = 0; idx0 = 0; idx1 = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < 8; i++) m.push_back(i);
    @(negedge clk);
    check(e2 && c2 == 0, "ready queue starts empty");
    for (int t = 0; t < 5000; t++) begin
      @(negedge clk);
      check(empty == (m.size() == 0), "empty");
      check(int'(count) == m.size(), $sformatf("count %0d exp %0d", count, m.size()));
      if (m.size() > 0) check(int'(head) == m[0], $sformatf("head %0d exp %0d", head, m[0]));
      pop = (m.size() > 0) && $urandom_range(1);
      push0 = 0; push1 = 0;
      if (outside.size() > 0 && $urandom_range(1)) begin
        push0 = 1; idx0 = 3'(outside.pop_front());
        if (outside.size() > 0 && $urandom_range(1)) begin push1 = 1; idx1 = 3'(outside.pop_front()); n_double++; end
      end
      @(posedge clk);
      if (pop) outside.push_back(m.pop_front());
      if (push0) m.push_back(int'(idx0));
      if (push1) m.push_back(int'(idx1));
    end
    check(n_double > 0, "double pushes exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
