// prefix_pkg: types shared by the parallel-prefix adders.
//
// A generate/propagate pair (g, p) describes a span of bits: g says the span
// produces a carry by itself, p says it passes an incoming carry through.
// Propagate is taken as a XOR b, so a single bit is either generate (1,0),
// propagate (0,1) or kill (0,0), never (1,1).
package prefix_pkg;

  typedef struct packed {
    logic g;
    logic p;
  } gp_t;

  // True when n is a power of two of at least min_n; used by the adders'
  // elaboration-time width checks.
  function automatic bit is_pow2_at_least(int n, int min_n);
    return (n >= min_n) && ((n & (n - 1)) == 0);
  endfunction

endpackage
