// vlppla_pkg: types and helper functions shared by the variable latency
// parallel prefix Ling adder (VLPPLA).
//
// A prefix node carries a (generate, propagate) pair. In the Ling network the
// "generate" is the intermediate signal alpha and the "propagate" is beta,
// and nodes are merged with the usual associative operator
//   (G, P) o (G~, P~) = (G + P G~, P P~).
// The helper functions derive the Brent-Kung geometry from the adder width N
// and the maximum carry chain length L (L = 2^m - 1, counted in elements of
// one even or odd Ling chain).
package vlppla_pkg;

  typedef struct packed {
    logic g;  // block alpha (Ling group generate)
    logic p;  // block beta  (Ling group propagate)
  } gp_t;

  // Associative prefix operator; hi is the more significant span.
  function automatic gp_t gp_combine(gp_t hi, gp_t lo);
    gp_t r;
    r.g = hi.g | (hi.p & lo.g);
    r.p = hi.p & lo.p;
    return r;
  endfunction

  // Elements per speculation group in one chain: (L+1)/2.
  function automatic int unsigned group_size(int unsigned l);
    return (l + 1) / 2;
  endfunction

  // Brent-Kung levels kept in the speculative up-sweep: log2((L+1)/2).
  function automatic int unsigned spec_levels(int unsigned l);
    return $clog2((l + 1) / 2);
  endfunction

  // Number of blocks (BEDS outputs) of an N-bit adder: N / (L+1).
  function automatic int unsigned num_blocks(int unsigned n, int unsigned l);
    return n / (l + 1);
  endfunction

endpackage
