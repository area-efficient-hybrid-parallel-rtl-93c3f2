// modified_ling_adder: hybrid parallel-prefix adder built on the modified
// Ling equations.
//
// Idea. A Ling adder carries the pseudo carry H_i = g_i | c_(i-1) through its
// prefix tree instead of the real carry c_i = p_i & H_i; the first tree level
// then only needs an OR for the generate. Pairing bits i and i-1 into
// (G*_i, P*_(i-1)) = (g_i | g_(i-1), p_(i-1) & p_(i-2)) splits the carry
// computation into two independent prefix problems: H of an even bit depends
// only on the pairs of even bits below it, H of an odd bit only on the pairs
// of odd bits. Each half-size problem gets its own tree:
//   even bits: Ladner-Fischer (minimum depth),
//   odd bits : Kogge-Stone (unity fan-out).
// The last tree level is replaced so that real carries come out directly:
//   lower half (bits 0 .. WIDTH/2-1): H_i is complete one level early, and an
//     AND cell forms c_i = p_i & H_i;
//   upper half (bits WIDTH/2 .. WIDTH-1): a modified cell forms
//     c_i = p_i & H_i:k | p_i & P_i-1:k-1 & H_k-1, where H_k-1 is the lower
//     pseudo carry the last tree level would have merged in (bit WIDTH/2-2
//     for even i, bit i-WIDTH/2 for odd i).
// With real carries the sums are plain XORs, S_i = d_i ^ c_(i-1), and the
// carry-out is c_(WIDTH-1) with no extra gate.
//
// Structure, top to bottom: gpd_stage (g, p, d), one ling_pre_node per bit,
// lf_prefix_tree and ks_prefix_tree with log2(WIDTH/2)-1 levels each, the
// last level of and_carry_node / mod_carry_node cells, xor_sum_stage. For
// WIDTH = 16 this is 2 tree levels plus the last level, for WIDTH = 32 it is 3
// plus the last level. The bit-0 pre-processing node is built like all others
// with its missing inputs (g_-1, p_-1, p_-2) tied to 0, so G*_0 = g_0 and
// P*_-1 = 0. There is no carry input.
//
// Interface: a, b in; s, cout out. Purely combinational, no clock or reset.
// WIDTH must be a power of two of at least 4; 32 and 16 are the sizes the
// design was presented in. The equations, tree shapes and last-level cells
// follow the published design; the missing carry input, the uniform bit-0
// node and the generalisation to any power-of-two WIDTH are this RTL's own.
module modified_ling_adder #(
  parameter int unsigned WIDTH = 32
) (
  input  logic [WIDTH-1:0] a,
  input  logic [WIDTH-1:0] b,
  output logic [WIDTH-1:0] s,
  output logic             cout
);

  localparam int unsigned HALF  = WIDTH / 2;                    // elements per tree
  localparam int unsigned TLVLS = ling_pkg::tree_levels(HALF) - 1; // levels before the last

  if (WIDTH < 4 || (WIDTH & (WIDTH - 1)) != 0) begin : g_bad_width
    $error("modified_ling_adder: WIDTH must be a power of two >= 4");
  end

  // ---------------------------------------------------------------- pre-processing
  logic [WIDTH-1:0] g, p, d;

  gpd_stage #(.WIDTH(WIDTH)) u_gpd (
    .a(a), .b(b), .g(g), .p(p), .d(d)
  );

  // g_ext[i+1] = g_i, p_ext[i+1] = p_(i-1), with g_-1 = p_-1 = p_-2 = 0
  logic [WIDTH:0]   g_ext;
  logic [WIDTH:0]   p_ext;
  assign g_ext = {g, 1'b0};
  assign p_ext = {p[WIDTH-2:0], 2'b00};

  ling_pkg::gp_t [WIDTH-1:0] pre;   // pre[i] = {G*_i, P*_(i-1)}

  for (genvar i = 0; i < WIDTH; i++) begin : g_pre
    ling_pre_node u_pre (
      .g_i  (g_ext[i+1]),
      .g_im1(g_ext[i]),
      .p_im1(p_ext[i+1]),
      .p_im2(p_ext[i]),
      .gp   (pre[i])
    );
  end

  // ---------------------------------------------------------------- prefix trees
  ling_pkg::gp_t [HALF-1:0] ev_in, od_in, ev_out, od_out;

  for (genvar j = 0; j < HALF; j++) begin : g_split
    assign ev_in[j] = pre[2*j];
    assign od_in[j] = pre[2*j+1];
  end

  lf_prefix_tree #(.N(HALF), .LEVELS(TLVLS)) u_even (.x(ev_in), .y(ev_out));
  ks_prefix_tree #(.N(HALF), .LEVELS(TLVLS)) u_odd  (.x(od_in), .y(od_out));

  // ---------------------------------------------------------------- last level: real carries
  logic [WIDTH-1:0] c;

  for (genvar i = 0; i < WIDTH; i++) begin : g_carry
    if (i < HALF) begin : g_low
      // pseudo carry already complete: c_i = p_i & H_i
      and_carry_node u_and (
        .h_i((i % 2 == 0) ? ev_out[i/2].g : od_out[i/2].g),
        .p_i(p[i]),
        .c_i(c[i])
      );
    end else if (i % 2 == 0) begin : g_high_even
      // Ladner-Fischer last level would merge the pair of bit HALF-2
      mod_carry_node u_mod (
        .hi  (ev_out[i/2]),
        .h_lo(ev_out[HALF/2-1].g),
        .p_i (p[i]),
        .c_i (c[i])
      );
    end else begin : g_high_odd
      // Kogge-Stone last level would merge the pair of bit i-HALF
      mod_carry_node u_mod (
        .hi  (od_out[i/2]),
        .h_lo(od_out[(i-HALF)/2].g),
        .p_i (p[i]),
        .c_i (c[i])
      );
    end
  end

  // ---------------------------------------------------------------- sums
  xor_sum_stage #(.WIDTH(WIDTH)) u_sum (
    .d(d), .c(c), .s(s), .cout(cout)
  );

endmodule
