// ksa_pkg: types and the prefix operator shared by the Kogge-Stone adders.
//
// A (generate, propagate) pair describes a group of bits: g says the group
// produces a carry by itself, p says it passes an incoming carry through.
// gp_combine is the "black dot" of a prefix tree: it merges a more
// significant group (hi) with the adjacent less significant group (lo),
//   G = g_hi | (p_hi & g_lo),   P = p_hi & p_lo.
// This is the textbook parallel-prefix operator; the code is purely
// combinational and shared by the full and the sparse carry trees.
package ksa_pkg;

  typedef struct packed {
    logic g;  // group generates a carry
    logic p;  // group propagates an incoming carry
  } gp_t;

  function automatic gp_t gp_combine(input gp_t hi, input gp_t lo);
    gp_t r;
    r.g = hi.g | (hi.p & lo.g);
    r.p = hi.p & lo.p;
    return r;
  endfunction

endpackage
