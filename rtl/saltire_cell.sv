// saltire_cell: one base-logic cell of the three-operand adder.
//
// Combines the bit-addition sum bit S'_i of position i with the carry bit
// cy_(i-1) produced one position to the right (the adder's carry-in at
// position 0) into the bit-level generate and propagate of position i:
//   G_i = S'_i & cy_(i-1)        P_i = S'_i ^ cy_(i-1)
// i.e. a half adder. The equations are those of the published design's base
// logic.
//
// Timing: purely combinational, one gate delay.
module saltire_cell (
  input  logic s_i,      // S'_i
  input  logic cy_prev,  // cy_(i-1), or Cin at position 0
  output logic g,        // G_i
  output logic p         // P_i
);

  always_comb begin
    g = s_i & cy_prev;
    p = s_i ^ cy_prev;
  end

endmodule
