// tb_dce2_dpram: random writes and reads on both ports against an array model, with the read
// data checked one clock after the address, at the pattern-memory size (512 x 32).
module tb_dce2_dpram;
  logic clk = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic we_a, we_b;
  logic [4:0] addr_a, addr_b;
  logic [511:0] wdata_a, wdata_b, rdata_a, rdata_b;
  dce2_dpram dut (.*);

  logic [511:0] m [32];
  bit           known [32];

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  function automatic logic [511:0] rnd();
    logic [511:0] v;
    for (int i = 0; i < 16; i++) v[32*i +: 32] = $urandom;
    return v;
  endfunction

  initial begin : watchdog
    repeat (50000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [4:0] pa, pb;
    bit ka, kb;
    logic [511:0] ea, eb;
    for (int i = 0; i < 32; i++) known[i] = 0;
    we_a = 0; we_b = 0; addr_a = 0; addr_b = 0; wdata_a = '0; wdata_b = '0;
    for (int t = 0; t < 3000; t++) begin
      @(negedge clk);
      we_a = $urandom_range(2) == 0; we_b = $urandom_range(2) == 0;
      addr_a = 5'($urandom); addr_b = 5'($urandom);
      wdata_a = rnd(); wdata_b = rnd();
      pa = addr_a; pb = addr_b;
      ka = known[pa]; kb = known[pb]; ea = m[pa]; eb = m[pb];
      @(posedge clk);
      if (we_a && !(we_b && addr_b == addr_a)) begin m[addr_a] = wdata_a; known[addr_a] = 1; end
      if (we_b) begin m[addr_b] = wdata_b; known[addr_b] = 1; end
      @(negedge clk);
      if (ka) check(rdata_a == ea, "port A read");
      if (kb) check(rdata_b == eb, "port B read");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
