// and_carry_node: last-level cell for the lower half of the word (the "A"
// node).
//
// In the lower half the Ling pseudo carry H_i is already complete when the
// last level is reached. The real carry follows from the Ling identity
// c_i = p_i & H_i, one AND gate. Combinational. This is the published cell.
module and_carry_node (
  input  logic h_i,   // complete Ling pseudo carry of bit i
  input  logic p_i,   // bit propagate of bit i
  output logic c_i    // real carry out of bit i
);

  always_comb c_i = h_i & p_i;

endmodule
