# Hybrid parallel-prefix adder on modified Ling equations

This is a combinational binary adder for 16- and 32-bit words. It aims at a
small area for a given speed. It is built from three ideas:

1. **Ling pseudo carries.** The prefix tree carries `H_i = g_i | c_(i-1)`
   instead of the real carry `c_i`. The two are related by `c_i = p_i & H_i`.
   Carrying `H` makes the first tree level cheaper: the generate half of a
   first-level node is a single OR.
2. **Even/odd split.** Adjacent bits are paired into
   `(G*_i, P*_(i-1)) = (g_i | g_(i-1), p_(i-1) & p_(i-2))`. With these pairs,
   the pseudo carry of an even bit depends only on the pairs of the even bits
   below it. Likewise, the pseudo carry of an odd bit depends only on the
   odd pairs. So one WIDTH-bit prefix problem becomes two independent
   problems of WIDTH/2 elements each. Each half-size tree has half the
   fan-out, and each can have its own shape. Here the even bits use a
   **Ladner-Fischer** tree, which has minimum depth. The odd bits use a
   **Kogge-Stone** tree, which has unity fan-out.
3. **Real carries from the last level.** A plain Ling adder produces pseudo
   carries. It then needs a 2:1 multiplexer per sum bit, plus an extra AND
   gate for the carry-out. In this design the last tree level is rebuilt so
   that it outputs real carries directly. The sums then need only XOR gates,
   and the carry-out is simply the carry of the top bit. This is where the
   area saving comes from.

All RTL is SystemVerilog-2017 in `rtl/`. The self-checking testbenches are in
`tb/`.

## The arithmetic

The standard pre-processing equations give, per bit:

    g_i = a_i & b_i      p_i = a_i | b_i      d_i = a_i ^ b_i

A prefix pair `(G, P)` describes a span of bits. Two pairs merge with the
usual associative operator:

    (G, P) o (G', P') = (G | P & G', P & P')

In the Ling form, the generate half of a pair covers bits `i..k` and the
propagate half covers bits `i-1..k-1`: it is shifted down by one bit. Call
such a pair `(H_i:k, P_i-1:k-1)`. The first-level pair `(G*_i, P*_(i-1))` is
`(H_i:i-1, P_i-1:i-2)`. The identity that everything rests on is:

    H_i = H_i:k | P_i-1:k-1 & H_k-1                        (any k <= i)

Merging the pairs of bits `i, i-2, i-4, ...` with `o` therefore produces the
full pseudo carry `H_i`. The missing inputs below bit 0 are zero:
`g_-1 = p_-1 = p_-2 = 0`. There is no carry input.

### Last level, lower half (`and_carry_node`)

For bits `0 .. WIDTH/2-1`, both trees finish one level before the last.
Each real carry then takes one AND gate: `c_i = p_i & H_i`.

### Last level, upper half (`mod_carry_node`)

For bits `WIDTH/2 .. WIDTH-1`, the tree hands over the pair of the upper
span, `(H_i:k, P_i-1:k-1)`. The last tree level would merge this pair with
the complete pseudo carry `H_k-1` from lower down. The pentagon cell does
that merge and multiplies by `p_i` in the same step:

    c_i = (p_i & H_i:k) | ((p_i & P_i-1:k-1) & H_k-1)

This takes three AND gates and one OR gate. The product `p_i & P_i-1:k-1` is
formed while the lower carry is still on its way. So the critical path
through the cell is one AND plus one OR, the same as a normal prefix node.

The pseudo carry merged in depends on the parity of the bit:

| bit i (upper half) | lower pseudo carry used | tree that would have merged it |
|---|---|---|
| even | `H_(WIDTH/2-2)`, the same for all even bits | Ladner-Fischer: top element of the lower half |
| odd  | `H_(i-WIDTH/2)` | Kogge-Stone: the element WIDTH/4 places down |

For even bits, `H_(WIDTH/2-1)` would also give correct results, because
overlapping spans are harmless for an idempotent operator. The RTL uses the
one the tree structure prescribes.

### Sums (`xor_sum_stage`)

    S_0 = d_0,   S_i = d_i ^ c_(i-1),   cout = c_(WIDTH-1)

## Tree maps

The nodes of each level, written as *bit ← bit it merges with* (the node
combines its own pair with the pair of the named lower bit).

16-bit adder (`WIDTH = 16`: two tree levels, then the last level):

| level | even bits (Ladner-Fischer) | odd bits (Kogge-Stone) |
|---|---|---|
| 0 | first-level pair node on every bit | |
| 1 | 2←0, 6←4, 10←8, 14←12 | i←i-2 for i = 3..15 |
| 2 | 4←2, 6←2, 12←10, 14←10 | i←i-4 for i = 5..15 |
| last | 8, 10, 12, 14 ← H_6 (pentagon); 0..6: AND | 9←H_1, 11←H_3, 13←H_5, 15←H_7 (pentagon); 1..7: AND |

32-bit adder (`WIDTH = 32`: three tree levels, then the last level):

| level | even bits (Ladner-Fischer) | odd bits (Kogge-Stone) |
|---|---|---|
| 1 | 2←0, 6←4, 10←8, ..., 30←28 | i←i-2, i = 3..31 |
| 2 | 4,6←2; 12,14←10; 20,22←18; 28,30←26 | i←i-4, i = 5..31 |
| 3 | 8..14←6; 24..30←22 | i←i-8, i = 9..31 |
| last | 16..30 ← H_14 (pentagon); 0..14: AND | i←H_(i-16), i = 17..31 (pentagon); 1..15: AND |

Node counts: the 16-bit adder has 21 prefix nodes, 8 pentagon cells and
8 AND cells. The 32-bit adder has 65 prefix nodes, 16 pentagon cells and
16 AND cells.

## Timing

The adders are purely combinational. They have no clock, reset, handshake
or pipeline registers: a result is valid one propagation delay after the
operands settle. Counted in gates from an operand bit:

| width | gates to the last carry | gates to the last sum |
|---|---|---|
| 8  | 6  | 7  |
| 16 | 8  | 9  |
| 32 | 10 | 11 |

These counts are the longest topological path through the elaborated
AND/OR/XOR cells, before any technology mapping. In general the carries take
`2*log2(WIDTH)` gates, and the sum takes one more XOR. A Ling adder that
stops at pseudo carries saves one of these gates, but then needs a
multiplexer in every sum bit.

For reference, the published implementation of this design was synthesized
in 0.18 µm CMOS. Against hybrid adders built on the conventional Ling
equations, it reported:

- 741 ps, 620 µm² and 14.5 µW at 16 bits;
- 999 ps, 1409 µm² and 33.8 µW at 32 bits;
- about 10 % less area, 22-25 % less delay and 15 % less power.

No such figures were measured for this RTL.

## Modules

| module | role | parameters |
|---|---|---|
| `hybrid_ling_adders_top` | a 16-bit and a 32-bit adder side by side, independent ports `a16 b16 s16 cout16`, `a32 b32 s32 cout32` | `W16 = 16`, `W32 = 32` |
| `modified_ling_adder` | one complete adder: `a`, `b` → `s`, `cout` | `WIDTH = 32` (a power of two ≥ 4) |
| `gpd_stage` | g, p, d per bit | `WIDTH` |
| `ling_pre_node` | first-level pair `(G*_i, P*_(i-1))`: one OR, one AND | – |
| `prefix_node` | the `o` operator: two AND, one OR | – |
| `lf_prefix_tree` | Ladner-Fischer tree over the even pairs | `N = 16`, `LEVELS = log2(N)` |
| `ks_prefix_tree` | Kogge-Stone tree over the odd pairs | `N = 16`, `LEVELS = log2(N)` |
| `mod_carry_node` | upper-half last-level cell: real carry | – |
| `and_carry_node` | lower-half last-level cell: `c = p & H` | – |
| `xor_sum_stage` | sums and carry-out | `WIDTH` |
| `ling_pkg` | `gp_t` struct `{g, p}`, `tree_levels` | – |

The trees take a `LEVELS` parameter. This lets the adder build all tree
levels except the last and supply the last level from its own cells. With
the default `LEVELS`, a tree computes complete prefixes on its own.

The RTL is written structurally: one module instance per node. This keeps
the node placement visible and lets a synthesis flow preserve it. A
synthesis tool is free to restructure the logic if the hierarchy is
flattened.

## Design choices and departures

- **No carry input.** The equations fix the inputs below bit 0 at zero, so
  the adders compute `a + b` only. A carry input would need an extra
  generate term at bit 0.
- **Bit 0 first-level node.** One drawing of the 16-bit adder shows bit 0
  as a pass-through, while the 32-bit drawing has a full first-level node
  there. Both give `G*_0 = g_0` and `P*_-1 = 0`. The RTL places a node on
  every bit and ties its missing inputs to 0.
- **Index of the pentagon's propagate input.** The cell drawing labels this
  input `P_i-1:k+1`. The Ling expansion it implements needs `P_i-1:k-1`,
  which is what the tree provides, and that is what is used. The exhaustive
  8-bit test and the random 16-, 32- and 64-bit tests confirm that the
  result is correct.
- **Lower input of the pentagon.** The pentagon takes the pseudo carry `H`
  from the tree, not the real carry from the lower-half AND cells. Both
  would work (`P_i-1:k-1 & H_k-1 = P_i-1:k & c_k-1`). The pseudo carry is
  ready one gate earlier.
- **What is not included.** The conventional hybrid Ling adder is the
  reference design the area and delay savings are measured against. It
  takes its sums from a multiplexer, `S_i = H_(i-1) ? d_i ^ p_(i-1) : d_i`,
  and is not part of this RTL. No technology-specific area, power or delay
  results are reproduced here.

## Verification

Every module has a self-checking testbench `tb/tb_<module>.sv`. Each
testbench compares the outputs with values computed independently in the
testbench. Each ends with a line `TB_RESULT checks=N failures=M`, and each
has a watchdog.

- Cells (`ling_pre_node`, `prefix_node`, `mod_carry_node`,
  `and_carry_node`): exhaustive over their inputs.
- `gpd_stage` and `xor_sum_stage`: random and corner vectors, checked bit
  by bit.
- Trees: random pairs with propagates biased towards 1. Each output is
  compared with a serial fold over the span the tree is supposed to cover
  after `LEVELS` levels. The full trees and the trees stopped one level
  early are both tested.
- `modified_ling_adder`: the 4- and 8-bit instances are checked
  exhaustively. For the 8-bit instance this includes the internal real
  carries and the lower-half pseudo carries. The 16-, 32- and 64-bit
  instances get corner vectors and 20,000 random vectors, including
  operands built to give long carry chains.
- `hybrid_ling_adders_top` at its default sizes: corner and random vectors.
  It also counts the carry mechanisms exercised, and fails if any count is
  zero. The mechanisms are: carry-out, a full-width ripple, an upper-half
  carry that exists only through the lower pseudo carry merged by a pentagon
  cell (counted separately for even and odd bits), and lower-half carries.

To run a testbench with Verilator 5:

    verilator --binary --timing --assert -Irtl -Itb rtl/ling_pkg.sv \
        tb/tb_hybrid_ling_adders_top.sv --top-module tb_hybrid_ling_adders_top
    ./obj_dir/Vtb_hybrid_ling_adders_top

To lint:

    verilator --lint-only -Wall -Irtl rtl/ling_pkg.sv rtl/hybrid_ling_adders_top.sv

To build an adder of another width, instantiate `modified_ling_adder` with
`WIDTH` set to a power of two of 4 or more. For a width between powers of
two, build the next power of two up and tie the unused upper operand bits
to zero. The carry-out is then the sum bit just above the used width.
