// tpa_sum_logic: sum phase of the three-operand adder.
//
// Each result bit is the bit-level propagate XOR the carry into that
// position, which the prefix network delivers as G(i-1:0):
//   S_0 = P_0,   S_i = P_i ^ G(i-1:0) for i = 1..N,   Cout = G(N:0)
// The result is N+2 bits, {Cout, S_N .. S_0}, enough for the largest sum of
// three N-bit operands and a carry-in. The low N bits are the modulo-2^N sum.
// Equations as in the published design.
//
// Interface: p and gpre (G(i:0)) are N+1 bits; sum is N+2 bits.
// Timing: purely combinational, one XOR level.
module tpa_sum_logic #(
  parameter int unsigned N = tpa_pkg::TPA_WIDTH
) (
  input  logic [N:0]   p,
  input  logic [N:0]   gpre,
  output logic [N+1:0] sum
);

  always_comb begin
    sum[0]     = p[0];
    sum[N:1]   = p[N:1] ^ gpre[N-1:0];
    sum[N+1]   = gpre[N];
  end

endmodule
