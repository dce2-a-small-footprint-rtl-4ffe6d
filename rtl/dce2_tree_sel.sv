// dce2_tree_sel: binary tree selection of the lowest-indexed active request.
//
// The DCE2 core uses one selection primitive everywhere it must pick one of many: the next hit
// channel of a row, the first matching agent for a pixel, the next agent to close or to merge.
// It is written as a recursive binary tree: the request vector is split into a lower and an upper
// half, each half is resolved by a smaller copy of this module, and the lower half wins.  Depth is
// log2(N) levels of a 2:1 choice.  The recursive tree follows the document; the lowest-index
// priority is this design's choice.
//
// Interface: req[N-1:0] in, found = |req, idx = index of the lowest set bit (0 when none).
// Purely combinational.
//
// Linting this module alone as the top makes Verilator report found_l/found_h/idx_l/idx_h as
// undriven. It does not expand the recursion at the top, so the outputs of u_lo and u_hi are not
// seen. In any design that instantiates the tree, and in simulation, all four are driven by the
// sub-trees. The warning stands because the recursion is intended.
module dce2_tree_sel #(
  parameter int unsigned N  = 64,
  parameter int unsigned IW = (N > 1) ? $clog2(N) : 1
) (
  input  logic [N-1:0]  req,
  output logic          found,
  output logic [IW-1:0] idx
);
  if (N == 1) begin : g_leaf
    assign found = req[0];
    assign idx   = '0;
  end else begin : g_node
    localparam int unsigned NL = N / 2;
    localparam int unsigned NH = N - NL;
    logic                       found_l, found_h;
    logic [IW-1:0]              idx_l, idx_h;
    dce2_tree_sel #(.N(NL), .IW(IW)) u_lo (.req(req[NL-1:0]), .found(found_l), .idx(idx_l));
    dce2_tree_sel #(.N(NH), .IW(IW)) u_hi (.req(req[N-1:NL]), .found(found_h), .idx(idx_h));
    assign found = found_l | found_h;
    assign idx   = found_l ? idx_l : IW'(idx_h + IW'(NL));
  end
endmodule
