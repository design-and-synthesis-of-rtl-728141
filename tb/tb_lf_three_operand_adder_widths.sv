// tb_lf_three_operand_adder_widths: exhaustive test of the three-operand
// adder at small widths (N = 1, 2, 3 and 4): every combination of the three
// operands and the carry-in is applied and the result compared with
// a + b + c + cin. This covers the prefix network's edge cases (widths that
// are and are not one less than a power of two).
module tb_lf_three_operand_adder_widths;
  localparam int NW = 4;
  localparam int WIDTHS [NW] = '{1, 2, 3, 4};

  int checks = 0, failures = 0;
  int done = 0;
  logic clk = 0;

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  for (genvar w = 0; w < NW; w++) begin : g_width
    localparam int N = WIDTHS[w];
    logic [N-1:0] a, b, c, s1, c1;
    logic         cin;
    logic [N+1:0] sum;
    logic [N:0]   p, g, carry;

    lf_three_operand_adder #(.N(N)) dut (.*);

    initial begin
      for (int v = 0; v < (1 << (3 * N + 1)); v++) begin
        {cin, c, b, a} = (3*N+1)'(v);
        @(posedge clk);
        checks++;
        if (int'(sum) != int'(a) + int'(b) + int'(c) + int'(cin)) begin
          failures++;
          if (failures < 20)
            $display("FAIL N=%0d a=%0d b=%0d c=%0d cin=%0b sum=%0d", N, a, b, c, cin, sum);
        end
      end
      done++;
    end
  end

  initial begin
    wait (done == NW);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
