// tb_saltire_cell: exhaustive check of the base-logic half-adder cell.
// All four input pairs are applied; G must be the AND and P the XOR, which
// is checked against the arithmetic sum s_i + cy_prev = 2*G + P.
module tb_saltire_cell;
  logic s_i, cy_prev, g, p;
  int checks = 0, failures = 0;
  logic clk = 0;

  saltire_cell dut (.s_i(s_i), .cy_prev(cy_prev), .g(g), .p(p));

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (1000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 4; v++) begin
      {s_i, cy_prev} = 2'(v);
      @(posedge clk);
      checks++;
      if ({g, p} != 2'(int'(s_i) + int'(cy_prev))) begin
        failures++;
        $display("FAIL s=%0b cy=%0b g=%0b p=%0b", s_i, cy_prev, g, p);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
