// pg_grey_cell: grey cell of the prefix network.
//
// Used where the merged span reaches bit 0: only the group generate, which
// is then the carry out of position i, is needed:
//   G(i:0) = G(i:k) | P(i:k) & G(k-1:0)
// This is the standard grey cell of parallel prefix adders, as used by the
// published design.
//
// Timing: purely combinational, one AND-OR level.
module pg_grey_cell (
  input  logic g_hi,   // G(i:k)
  input  logic p_hi,   // P(i:k)
  input  logic g_lo,   // G(k-1:0)
  output logic g_out   // G(i:0)
);

  always_comb g_out = g_hi | (p_hi & g_lo);

endmodule
