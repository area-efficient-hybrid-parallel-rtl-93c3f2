// xor_sum_stage: post-processing stage of the adder.
//
// With real carries available for every bit, each sum bit is the half sum
// XORed with the carry out of the next lower bit:
//   S_i = d_i ^ c_(i-1),   S_0 = d_0 (the adder has no carry input)
// and the carry-out of the word is c_(WIDTH-1). One XOR per bit, no
// multiplexers. Combinational; WIDTH is the word size. XOR sums follow the
// published design; S_0 = d_0 follows from this RTL having no carry input.
module xor_sum_stage #(
  parameter int unsigned WIDTH = 32
) (
  input  logic [WIDTH-1:0] d,     // half sums a ^ b
  input  logic [WIDTH-1:0] c,     // real carries out of each bit
  output logic [WIDTH-1:0] s,     // sum
  output logic             cout   // carry out of the word
);

  always_comb begin
    s    = d ^ {c[WIDTH-2:0], 1'b0};
    cout = c[WIDTH-1];
  end

endmodule
