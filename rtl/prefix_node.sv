// prefix_node: black prefix cell (the black circle and star nodes).
//
// Computes the group generate and group propagate of the span formed by a
// more significant group (hi = G_i:k, P_i:k) and the adjacent less
// significant group (lo = G_k-1:j, P_k-1:j):
//   G_i:j = G_i:k | P_i:k & G_k-1:j      (AND then OR)
//   P_i:j = P_i:k & P_k-1:j              (AND)
// In the Ling trees the same cell works unchanged on (pseudo generate,
// shifted propagate) pairs. Two AND gates and one OR gate, combinational.
// The cell is the standard published one; the packed {g, p} struct ports are
// this implementation's choice.
module prefix_node (
  input  ling_pkg::gp_t hi,
  input  ling_pkg::gp_t lo,
  output ling_pkg::gp_t y
);

  always_comb begin
    y.g = hi.g | (hi.p & lo.g);
    y.p = hi.p & lo.p;
  end

endmodule
