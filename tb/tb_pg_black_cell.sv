// tb_pg_black_cell: exhaustive check of the black prefix cell.
// Expected values come from the meaning of the signals: the merged span
// generates if the upper span generates, or propagates a generate of the
// lower one; it propagates only if both spans propagate.
module tb_pg_black_cell;
  logic g_hi, p_hi, g_lo, p_lo, g_out, p_out;
  int checks = 0, failures = 0;
  logic clk = 0;

  pg_black_cell dut (.*);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (1000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic exp_g, exp_p;
    for (int v = 0; v < 16; v++) begin
      {g_hi, p_hi, g_lo, p_lo} = 4'(v);
      @(posedge clk);
      exp_g = (g_hi == 1'b1) ? 1'b1 : ((p_hi == 1'b1) ? g_lo : 1'b0);
      exp_p = (p_hi == 1'b1) && (p_lo == 1'b1);
      checks += 2;
      if (g_out != exp_g) begin
        failures++;
        $display("FAIL G in=%04b g=%0b exp=%0b", 4'(v), g_out, exp_g);
      end
      if (p_out != exp_p) begin
        failures++;
        $display("FAIL P in=%04b p=%0b exp=%0b", 4'(v), p_out, exp_p);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
