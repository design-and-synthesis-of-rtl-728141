// pg_black_cell: black cell of the prefix network.
//
// Merges the generate/propagate of a more significant span (i:k) with the
// adjacent less significant span (k-1:j) into the span (i:j):
//   G(i:j) = G(i:k) | P(i:k) & G(k-1:j)
//   P(i:j) = P(i:k) & P(k-1:j)
// This is the standard black cell of parallel prefix adders, as used by the
// published design.
//
// Timing: purely combinational, one AND-OR level.
module pg_black_cell
  import tpa_pkg::*;
(
  input  logic g_hi,   // G(i:k)
  input  logic p_hi,   // P(i:k)
  input  logic g_lo,   // G(k-1:j)
  input  logic p_lo,   // P(k-1:j)
  output logic g_out,  // G(i:j)
  output logic p_out   // P(i:j)
);

  pg_t r;

  always_comb begin
    r     = pg_combine('{g: g_hi, p: p_hi}, '{g: g_lo, p: p_lo});
    g_out = r.g;
    p_out = r.p;
  end

endmodule
