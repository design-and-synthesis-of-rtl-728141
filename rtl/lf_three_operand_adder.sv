// lf_three_operand_adder: three-operand binary adder with a Ladner-Fischer
// carry-prefix network.
//
// Computes sum = a + b + c + cin for N-bit operands in a single
// combinational pass of four phases:
//   1. bit addition  (tpa_bit_addition): a carry-save row of full adders
//      reduces the three operands to S' and cy;
//   2. base logic    (tpa_base_logic): N+1 saltire cells pair S'_i with
//      cy_(i-1) (Cin at bit 0) into bit-level G_i, P_i;
//   3. PG logic      (lf_prefix_tree): a Ladner-Fischer prefix network of
//      black and grey cells computes every carry G(i:0) in ceil(log2(N+1))
//      levels;
//   4. sum logic     (tpa_sum_logic): S_i = P_i ^ G(i-1:0), Cout = G(N:0).
// Only one carry-propagation network is needed, instead of the two of a
// pair of cascaded two-operand adders. The four phases and the Ladner-
// Fischer network follow the published design; bringing the intermediate
// vectors out as ports is this design's choice (s1, c1, p and g carry the
// names used in the design's reference simulation).
//
// Interface: a, b, c (N bits), cin; sum (N+2 bits, sum[N+1] = Cout,
// sum[N-1:0] = the modulo-2^N result); observation ports s1, c1 (N bits),
// p, g and carry (N+1 bits; carry[i] = G(i:0), the carry out of bit i).
// Timing: purely combinational, no clock and no registers.
module lf_three_operand_adder #(
  parameter int unsigned N = tpa_pkg::TPA_WIDTH
) (
  input  logic [N-1:0] a,
  input  logic [N-1:0] b,
  input  logic [N-1:0] c,
  input  logic         cin,
  output logic [N+1:0] sum,
  output logic [N-1:0] s1,
  output logic [N-1:0] c1,
  output logic [N:0]   p,
  output logic [N:0]   g,
  output logic [N:0]   carry
);

  tpa_bit_addition #(.N(N)) u_bit_add (
    .a (a),
    .b (b),
    .c (c),
    .s1(s1),
    .c1(c1)
  );

  tpa_base_logic #(.N(N)) u_base (
    .s1 (s1),
    .c1 (c1),
    .cin(cin),
    .g  (g),
    .p  (p)
  );

  lf_prefix_tree #(.W(N + 1)) u_prefix (
    .g_in (g),
    .p_in (p),
    .g_out(carry)
  );

  tpa_sum_logic #(.N(N)) u_sum (
    .p   (p),
    .gpre(carry),
    .sum (sum)
  );

endmodule
