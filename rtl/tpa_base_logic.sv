// tpa_base_logic: base-logic phase of the three-operand adder.
//
// N+1 saltire cells turn the carry-save pair (S', cy) from the bit-addition
// row into bit-level generate/propagate signals for positions 0..N:
//   position 0      : S'_0 with the carry-in Cin
//   position i (1..N-1): S'_i with cy_(i-1)
//   position N      : S'_N = 0 with cy_(N-1), so G_N = 0 and P_N = cy_(N-1)
// The count of N+1 cells follows the published design; treating the missing
// S'_N as zero is this design's reading of it (the top carry of the
// carry-save row has weight 2^N and still has to be added in).
//
// Interface: s1, c1 are N bits, cin 1 bit; g, p are N+1 bits.
// Timing: purely combinational.
module tpa_base_logic #(
  parameter int unsigned N = tpa_pkg::TPA_WIDTH
) (
  input  logic [N-1:0] s1,
  input  logic [N-1:0] c1,
  input  logic         cin,
  output logic [N:0]   g,
  output logic [N:0]   p
);

  // Operand pairs of the N+1 cells: S' extended with a zero on top, and the
  // carries shifted one place left with Cin entering at position 0.
  logic [N:0] s_ext;
  logic [N:0] cy_shift;

  assign s_ext    = {1'b0, s1};
  assign cy_shift = {c1, cin};

  for (genvar i = 0; i <= N; i++) begin : g_cell
    saltire_cell u_cell (
      .s_i    (s_ext[i]),
      .cy_prev(cy_shift[i]),
      .g      (g[i]),
      .p      (p[i])
    );
  end

endmodule
