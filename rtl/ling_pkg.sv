// ling_pkg: the prefix-pair type and a helper shared by the hybrid Ling adder.
//
// A prefix-tree signal is a (generate, propagate) pair. In the Ling form used
// here the generate half of a pair is a pseudo (Ling) group generate and the
// propagate half is shifted down by one bit against it: the pair at bit i
// spans generates i..k and propagates i-1..k-1.
//
// The operator combines a more significant pair (hi) with the adjacent less
// significant pair (lo):  (G,P) o (G',P') = (G | P & G', P & P').
// It is associative, so any tree of it yields the same result; only the
// number of levels and the fan-out differ between tree shapes. The operator
// itself is the cell prefix_node. The pair type and the level count are
// this implementation's own packaging.
package ling_pkg;

  typedef struct packed {
    logic g;  // group generate (pseudo generate in the Ling trees)
    logic p;  // group propagate
  } gp_t;

  // Number of prefix levels a tree of n elements needs (ceil(log2 n)).
  function automatic int unsigned tree_levels(int unsigned n);
    return (n <= 1) ? 0 : $clog2(n);
  endfunction

endpackage
