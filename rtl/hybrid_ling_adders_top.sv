// hybrid_ling_adders_top: the two configurations of the modified-Ling hybrid
// parallel-prefix adder side by side.
//
// One 16-bit and one 32-bit modified_ling_adder, each with its own operands,
// sum and carry-out; the two do not interact. Both are purely combinational:
// a result is valid one propagation delay after its operands change, there
// is no clock, reset or handshake. The two sizes are the ones the design
// was published in; putting them side by side in one top is this
// implementation's packaging.
module hybrid_ling_adders_top #(
  parameter int unsigned W16 = 16,   // word size of the smaller adder
  parameter int unsigned W32 = 32    // word size of the larger adder
) (
  input  logic [W16-1:0] a16,
  input  logic [W16-1:0] b16,
  output logic [W16-1:0] s16,
  output logic           cout16,
  input  logic [W32-1:0] a32,
  input  logic [W32-1:0] b32,
  output logic [W32-1:0] s32,
  output logic           cout32
);

  modified_ling_adder #(.WIDTH(W16)) u_add16 (
    .a(a16), .b(b16), .s(s16), .cout(cout16)
  );

  modified_ling_adder #(.WIDTH(W32)) u_add32 (
    .a(a32), .b(b32), .s(s32), .cout(cout32)
  );

endmodule
