// ks_prefix_tree: Kogge-Stone prefix network, used for the odd-indexed bits
// of the hybrid adder.
//
// Element j of the input is the intermediate pair of bit 2j+1. At level l
// (1-based) every element j >= 2^(l-1) is combined with element j - 2^(l-1)
// of the previous level (recursive doubling). After l levels element j holds
// the prefix of elements max(0, j-2^l+1) .. j; after ceil(log2 N) levels
// every element holds the prefix down to element 0. Every node drives at
// most two nodes of the next level (unity lateral fan-out) at the cost of
// more nodes and longer wires.
//
// LEVELS selects how many levels are built, so that the parent can replace
// the last level by its own cells; elements without a node at a level pass
// through (the white circles). Purely combinational. The node positions
// follow the published 16- and 32-bit adders; making the tree a module of
// its own with a LEVELS parameter is this implementation's choice.
module ks_prefix_tree #(
  parameter int unsigned N      = 16,                       // elements (odd bits of a 32-bit word)
  parameter int unsigned LEVELS = ling_pkg::tree_levels(N)  // levels to build
) (
  input  ling_pkg::gp_t [N-1:0] x,
  output ling_pkg::gp_t [N-1:0] y
);

  ling_pkg::gp_t [N-1:0] lvl [LEVELS+1];

  assign lvl[0] = x;

  for (genvar l = 1; l <= LEVELS; l++) begin : g_level
    localparam int unsigned SPAN = 1 << (l - 1);
    for (genvar j = 0; j < N; j++) begin : g_elem
      if (j >= SPAN) begin : g_node
        prefix_node u_node (
          .hi(lvl[l-1][j]),
          .lo(lvl[l-1][j-SPAN]),
          .y (lvl[l][j])
        );
      end else begin : g_pass
        assign lvl[l][j] = lvl[l-1][j];
      end
    end
  end

  assign y = lvl[LEVELS];

endmodule
