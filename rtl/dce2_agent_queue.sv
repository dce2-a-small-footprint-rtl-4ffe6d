// dce2_agent_queue: waiting queue of clustering-agent indices.
//
// The DCE2 core keeps its agents in two queues: free agents waiting for a new cluster, and ready
// agents whose cluster is complete and waits for readout.  Both are this FIFO of agent indices.
// Since there are only N agents and each index is in at most one place, a depth of N can never
// overflow.  With INIT_FULL set the queue leaves reset holding 0..N-1 (the free queue); otherwise
// it starts empty (the ready queue).  Two push ports let two agents be returned in one cycle
// (push0 is written first); the queues themselves follow the document, the ports are this
// design's choice.
//
// Interface: push0/push1 with indices, pop of the head (first-word fall-through), empty, count.
module dce2_agent_queue #(
  parameter int unsigned N         = 8,
  parameter bit          INIT_FULL = 1'b0,
  parameter int unsigned IW        = (N > 1) ? $clog2(N) : 1
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          push0,
  input  logic [IW-1:0] idx0,
  input  logic          push1,
  input  logic [IW-1:0] idx1,
  input  logic          pop,
  output logic [IW-1:0] head,
  output logic          empty,
  output logic [IW:0]   count
);
  logic [IW-1:0] mem [N];
  logic [IW-1:0] wp, rp;

  function automatic logic [IW-1:0] inc(input logic [IW-1:0] p);
    return (p == IW'(N - 1)) ? '0 : p + 1'b1;
  endfunction

  assign head  = mem[rp];
  assign empty = (count == '0);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wp    <= '0;
      rp    <= '0;
      count <= INIT_FULL ? (IW+1)'(N) : '0;
      for (int i = 0; i < N; i++) mem[i] <= INIT_FULL ? IW'(i) : '0;
    end else begin
      if (push0 && push1) begin
        mem[wp]      <= idx0;
        mem[inc(wp)] <= idx1;
        wp           <= inc(inc(wp));
      end else if (push0 || push1) begin
        mem[wp] <= push0 ? idx0 : idx1;
        wp      <= inc(wp);
      end
      if (pop && !empty) rp <= inc(rp);
      count <= count + (IW+1)'(push0) + (IW+1)'(push1) - (IW+1)'(pop && !empty);
    end
  end

  a_no_overflow: assert property (@(posedge clk) disable iff (!rst_n)
                                  (count + (IW+1)'(push0) + (IW+1)'(push1)) <= (IW+1)'(N) + (IW+1)'(pop && !empty));
  a_no_underflow: assert property (@(posedge clk) disable iff (!rst_n) pop |-> !empty);
endmodule
