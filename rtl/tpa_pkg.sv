// tpa_pkg: shared definitions of the three-operand Ladner-Fischer adder.
//
// Holds the default operand width (64 bits, the width the adder is
// characterised at) and the generate/propagate pair type with the prefix
// operator "o" that every black cell applies:
//   (G,P)(i:j) = (G(i:k) | P(i:k) & G(k-1:j),  P(i:k) & P(k-1:j))
// The operator is associative but not commutative; the first argument is the
// more significant group. The struct and function are this design's own
// packaging of the standard prefix-adder equations.
package tpa_pkg;

  // Default operand width of the adder.
  localparam int unsigned TPA_WIDTH = 64;

  // Group generate / group propagate of a span of bit positions.
  typedef struct packed {
    logic g;
    logic p;
  } pg_t;

  // Prefix operator: hi is the more significant span, lo the adjacent less
  // significant one. The result covers both spans.
  function automatic pg_t pg_combine(input pg_t hi, input pg_t lo);
    pg_t r;
    r.g = hi.g | (hi.p & lo.g);
    r.p = hi.p & lo.p;
    return r;
  endfunction

endpackage
