// tb_pg_grey_cell: exhaustive check of the grey prefix cell (generate only).
module tb_pg_grey_cell;
  logic g_hi, p_hi, g_lo, g_out;
  int checks = 0, failures = 0;
  logic clk = 0;

  pg_grey_cell dut (.*);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (1000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic exp_g;
    for (int v = 0; v < 8; v++) begin
      {g_hi, p_hi, g_lo} = 3'(v);
      @(posedge clk);
      exp_g = (g_hi == 1'b1) ? 1'b1 : ((p_hi == 1'b1) ? g_lo : 1'b0);
      checks++;
      if (g_out != exp_g) begin
        failures++;
        $display("FAIL in=%03b g=%0b exp=%0b", 3'(v), g_out, exp_g);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
