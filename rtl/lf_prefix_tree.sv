// lf_prefix_tree: Ladner-Fischer carry-generation network.
//
// Computes, for every position i of a W-bit generate/propagate vector, the
// group generate G(i:0), which is the carry out of position i. The network
// works divide-and-conquer: level k (k = 0 .. ceil(log2 W)-1) splits the
// positions into blocks of 2^(k+1); every position in the upper half of a
// block is merged with the top position of the lower half, whose span
// already starts at the block boundary. After level k every position holds
// the prefix from the start of its 2^(k+1) block, so after ceil(log2 W)
// levels every position holds G(i:0). The top of a lower half drives the
// whole upper half, so the fan-out doubles at each level, reaching
// W/2 + 1 at the last one.
//
// A merge whose span reaches bit 0 needs only the generate and uses a grey
// cell; the others use black cells. Positions that are not merged at a level
// pass straight through.
//
// The divide-and-conquer structure, the log2 depth and the fan-out are the
// published design's; the black/grey assignment is the usual one.
//
// Interface: g_in, p_in: bit-level G_i, P_i; g_out: G(i:0). All W bits.
// Timing: purely combinational, ceil(log2 W) cell levels (7 for W = 65).
module lf_prefix_tree #(
  parameter int unsigned W = tpa_pkg::TPA_WIDTH + 1
) (
  input  logic [W-1:0] g_in,
  input  logic [W-1:0] p_in,
  output logic [W-1:0] g_out
);

  localparam int unsigned LEVELS = (W > 1) ? $clog2(W) : 1;

  // gs[k], ps[k]: generate/propagate of every position before level k.
  logic [W-1:0] gs [LEVELS+1];
  logic [W-1:0] ps [LEVELS+1];

  assign gs[0] = g_in;
  assign ps[0] = p_in;

  for (genvar k = 0; k < LEVELS; k++) begin : g_level
    for (genvar i = 0; i < W; i++) begin : g_pos
      // Start of the 2^(k+1) block holding i, and the top of its lower half.
      localparam int unsigned BLOCK = (i >> (k + 1)) << (k + 1);
      localparam int unsigned PARTNER = BLOCK + (1 << k) - 1;

      if (((i >> k) & 1) == 0) begin : g_pass
        assign gs[k+1][i] = gs[k][i];
        assign ps[k+1][i] = ps[k][i];
      end else if (BLOCK == 0) begin : g_grey
        pg_grey_cell u_grey (
          .g_hi (gs[k][i]),
          .p_hi (ps[k][i]),
          .g_lo (gs[k][PARTNER]),
          .g_out(gs[k+1][i])
        );
        // Span complete: its propagate is never read again.
        assign ps[k+1][i] = ps[k][i];
      end else begin : g_black
        pg_black_cell u_black (
          .g_hi (gs[k][i]),
          .p_hi (ps[k][i]),
          .g_lo (gs[k][PARTNER]),
          .p_lo (ps[k][PARTNER]),
          .g_out(gs[k+1][i]),
          .p_out(ps[k+1][i])
        );
      end
    end
  end

  assign g_out = gs[LEVELS];

endmodule
