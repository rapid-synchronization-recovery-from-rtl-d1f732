// hs_select_tree: binary tree that picks one locked head seeker.
//
// The N lock flags (padded with zeros to a power of two) form the leaves of
// a binary tree of two-input nodes. Each node passes on whether either of
// its children holds a locked seeker and, if so, the index coming from its
// left (lower-numbered) child when that one is locked, else from its right
// child. After ceil(log2 N) levels the root holds the lowest-numbered locked
// seeker, so the tree grows with the number of seekers the way the HSn
// scheme is generated from its single parameter. Which of several
// simultaneously locked seekers wins is left open by the scheme; lowest
// index is this design's choice.
//
// Interface: purely combinational. any_o is high when some locked_i bit is
// set, and idx_o is then the index of the lowest such bit (0 otherwise).
module hs_select_tree #(
  parameter int unsigned N     = 8,
  parameter int unsigned IDX_W = (N > 1) ? $clog2(N) : 1
) (
  input  logic [N-1:0]     locked_i,
  output logic             any_o,
  output logic [IDX_W-1:0] idx_o
);

  localparam int LEVELS = (N > 1) ? $clog2(N) : 0;
  localparam int LEAVES = 1 << LEVELS;

  always_comb begin
    // Node values of the level being built, reduced in place: node k of a
    // level is made from nodes 2k and 2k+1 of the level below.
    logic             node_any [LEAVES];
    logic [IDX_W-1:0] node_idx [LEAVES];
    for (int k = 0; k < LEAVES; k++) begin
      node_any[k] = (k < N) ? locked_i[k] : 1'b0;
      node_idx[k] = IDX_W'(k);
    end
    for (int l = 0; l < LEVELS; l++) begin
      for (int k = 0; k < (LEAVES >> (l + 1)); k++) begin
        node_idx[k] = node_any[2*k] ? node_idx[2*k] : node_idx[2*k+1];
        node_any[k] = node_any[2*k] | node_any[2*k+1];
      end
    end
    any_o = node_any[0];
    idx_o = node_any[0] ? node_idx[0] : '0;
  end

endmodule
