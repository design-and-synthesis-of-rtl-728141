// tb_lf_three_operand_adder_reference: the published reference simulation
// of the 64-bit adder, reproduced for the bits it shows.
//
// That simulation lists only the 12 most significant bits of each vector
// (bits 63..52), with cin = 0. For the operands a, b, c and the
// intermediate vectors s1 (S'), c1 (cy), p and g the listed bits depend on
// the operands' bits 63..51 only, and they agree with the four-phase
// equations; the testbench checks them exactly. Bits 51..0 of the operands
// are filled with random values in which at most one of a[51], b[51],
// c[51] is set, because the listed P_52 = 0 with S'_52 = 0 requires
// cy_51 = 0. The listed sum bits are not checked against the listing: they
// do not equal the top bits of a + b + c for any carry from the lower bits,
// so the sum is checked against a + b + c + cin instead.
module tb_lf_three_operand_adder_reference;
  localparam int N = 64;

  localparam logic [11:0] A_TOP   = 12'b110110101101;
  localparam logic [11:0] B_TOP   = 12'b001010111100;
  localparam logic [11:0] C_TOP   = 12'b101111010001;
  localparam logic [11:0] S1_TOP  = 12'b010011000000;
  localparam logic [11:0] C1_TOP  = 12'b101110111101;
  localparam logic [11:0] P_TOP   = 12'b001110111010;
  localparam logic [11:0] G_TOP   = 12'b010001000000;

  logic [N-1:0] a, b, c, s1, c1;
  logic         cin;
  logic [N+1:0] sum;
  logic [N:0]   p, g, carry;

  int checks = 0, failures = 0;
  logic clk = 0;

  lf_three_operand_adder dut (.*);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input string what, input logic [11:0] got, exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s got=%b expected=%b", what, got, exp);
    end
  endtask

  initial begin
    logic [51:0] la, lb, lc;
    for (int t = 0; t < 200; t++) begin
      la = {$urandom, $urandom};
      lb = {$urandom, $urandom};
      lc = {$urandom, $urandom};
      // At most one operand bit set at position 51: no carry-save carry.
      case ($urandom_range(3))
        0: begin la[51] = 1'b0; lb[51] = 1'b0; end
        1: begin lb[51] = 1'b0; lc[51] = 1'b0; end
        2: begin la[51] = 1'b0; lc[51] = 1'b0; end
        default: begin la[51] = 1'b0; lb[51] = 1'b0; lc[51] = 1'b0; end
      endcase
      a = {A_TOP, la};
      b = {B_TOP, lb};
      c = {C_TOP, lc};
      cin = 1'b0;
      @(posedge clk);
      check("s1", s1[63:52], S1_TOP);
      check("c1", c1[63:52], C1_TOP);
      check("p", p[63:52], P_TOP);
      check("g", g[63:52], G_TOP);
      checks++;
      if (sum != (N+2)'(a) + (N+2)'(b) + (N+2)'(c)) begin
        failures++;
        $display("FAIL sum=%h a=%h b=%h c=%h", sum, a, b, c);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
