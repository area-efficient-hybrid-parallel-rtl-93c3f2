// gpd_stage: pre-processing stage of a parallel-prefix adder.
//
// For every bit position i it forms the bit generate g_i = a_i & b_i, the
// bit propagate p_i = a_i | b_i (the inclusive-OR form, which the Ling
// equations need) and the half sum d_i = a_i ^ b_i. These are the standard
// pre-processing equations of a prefix adder. Purely combinational, no
// clock; WIDTH is the adder word size (32 here, 16 in the other
// configuration). The equations are those of the published design; the
// vector form as one module is this implementation's packaging.
module gpd_stage #(
  parameter int unsigned WIDTH = 32
) (
  input  logic [WIDTH-1:0] a,
  input  logic [WIDTH-1:0] b,
  output logic [WIDTH-1:0] g,
  output logic [WIDTH-1:0] p,
  output logic [WIDTH-1:0] d
);

  always_comb begin
    g = a & b;
    p = a | b;
    d = a ^ b;
  end

endmodule
