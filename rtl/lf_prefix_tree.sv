// lf_prefix_tree: Ladner-Fischer (minimum-depth) prefix network, used for the
// even-indexed bits of the hybrid adder.
//
// Element j of the input is the intermediate pair of bit 2j. At level l
// (1-based) the elements are grouped into blocks of 2^l; every element in the
// upper half of a block is combined with the last (most significant)
// element of the lower half of its block. After l levels element j therefore
// holds the prefix of elements (j with its low l bits cleared) .. j, and
// after ceil(log2 N) levels every element holds the prefix down to element 0.
// This is the minimum-depth shape: one node drives up to 2^(l-1) nodes of the
// next level, which is the fan-out the hybrid scheme halves by running the
// odd bits through a separate tree.
//
// LEVELS selects how many levels are built, so that the parent can replace
// the last level by its own cells; elements without a node at a level pass
// through (the white circles). Purely combinational. The node positions
// follow the published 16- and 32-bit adders; making the tree a module of
// its own with a LEVELS parameter is this implementation's choice.
module lf_prefix_tree #(
  parameter int unsigned N      = 16,                       // elements (even bits of a 32-bit word)
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
      if ((j / SPAN) % 2 == 1) begin : g_node
        // last element of the lower half of this block of 2^l
        localparam int unsigned SRC = (j / (2 * SPAN)) * (2 * SPAN) + SPAN - 1;
        prefix_node u_node (
          .hi(lvl[l-1][j]),
          .lo(lvl[l-1][SRC]),
          .y (lvl[l][j])
        );
      end else begin : g_pass
        assign lvl[l][j] = lvl[l-1][j];
      end
    end
  end

  assign y = lvl[LEVELS];

endmodule
