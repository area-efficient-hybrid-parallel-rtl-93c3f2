// mod_carry_node: modified last-level cell for the upper half of the word
// (the pentagon node).
//
// For a bit i in the upper half, the tree delivers the Ling group pair of the
// upper span, hi = (H_i:k, P_i-1:k-1), and the lower half delivers the
// complete Ling pseudo carry H_k-1 of the bit just below that span. The
// Ling pseudo carry of bit i would be H_i = H_i:k | P_i-1:k-1 & H_k-1; this
// cell instead multiplies the bit propagate p_i in, so that it delivers the
// real carry directly:
//   c_i = (p_i & H_i:k) | ((p_i & P_i-1:k-1) & H_k-1)
// Three AND gates and one OR gate, arranged as drawn for the cell: one AND
// forms p_i & P, one forms p_i & H_i:k, a third ANDs the first with the lower
// carry, and an OR merges the two products. Because the sum stage then gets
// real carries it needs only XOR gates instead of multiplexers.
// Combinational. The gate arrangement is the published one; the published
// cell drawing labels the propagate input P_i-1:k+1, while the Ling
// expansion (and the tree that feeds the cell) gives P_i-1:k-1, which is
// what is used here.
module mod_carry_node (
  input  ling_pkg::gp_t hi,     // upper span: g = H_i:k, p = P_i-1:k-1
  input  logic          h_lo,   // H_k-1, complete pseudo carry from below
  input  logic          p_i,    // bit propagate of position i
  output logic          c_i     // real carry out of bit i
);

  logic pp, pg, ppg;

  always_comb begin
    pp  = p_i & hi.p;
    pg  = p_i & hi.g;
    ppg = pp & h_lo;
    c_i = pg | ppg;
  end

endmodule
