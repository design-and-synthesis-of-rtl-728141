// tpa_bit_addition: bit-addition phase of the three-operand adder.
//
// A row of N full adders with no connection between them (a carry-save
// row): every bit position i reduces the three operand bits to a sum bit
// S'_i = a_i ^ b_i ^ c_i and a carry bit cy_i = majority(a_i, b_i, c_i).
// The carry bit has weight 2^(i+1); the next phase (base logic) pairs it with
// the sum bit one place to the left. The equations follow the published
// four-phase three-operand adder.
//
// Interface: a, b, c are N-bit operands; s1 = S', c1 = cy, both N bits.
// Timing: purely combinational, one full-adder delay.
module tpa_bit_addition #(
  parameter int unsigned N = tpa_pkg::TPA_WIDTH
) (
  input  logic [N-1:0] a,
  input  logic [N-1:0] b,
  input  logic [N-1:0] c,
  output logic [N-1:0] s1,
  output logic [N-1:0] c1
);

  always_comb begin
    s1 = a ^ b ^ c;
    c1 = (a & b) | (b & c) | (c & a);
  end

endmodule
