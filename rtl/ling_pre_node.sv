// ling_pre_node: first-level node of the Ling prefix tree (black square).
//
// Merges two adjacent bit positions into the intermediate pair used by the
// Ling recurrence:
//   G*_i     = g_i | g_(i-1)         (OR gate; the Ling generate of bits i..i-1)
//   P*_(i-1) = p_(i-1) & p_(i-2)     (AND gate)
// The propagate output is one position lower than the generate output; the
// pair (G*_i, P*_(i-1)) is what the prefix trees combine. At the bottom of the
// word the missing inputs (g_-1, p_-1, p_-2) are tied to 0 by the parent.
// One OR and one AND gate, combinational. Gates and signal names follow the
// published cell; tying the missing inputs to 0 is how this RTL builds bit 0.
module ling_pre_node (
  input  logic g_i,     // bit generate of position i
  input  logic g_im1,   // bit generate of position i-1
  input  logic p_im1,   // bit propagate of position i-1
  input  logic p_im2,   // bit propagate of position i-2
  output ling_pkg::gp_t gp  // {G*_i, P*_(i-1)}
);

  always_comb begin
    gp.g = g_i | g_im1;
    gp.p = p_im1 & p_im2;
  end

endmodule
