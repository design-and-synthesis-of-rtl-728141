// tb_tpa_bit_addition: checks the carry-save row at its default width (64).
// For random and corner operands, every bit position must satisfy
// a_i + b_i + c_i = 2*cy_i + S'_i, and the whole row must keep the value:
// a + b + c = S' + 2*cy.
module tb_tpa_bit_addition;
  localparam int N = 64;
  logic [N-1:0] a, b, c, s1, c1;
  int checks = 0, failures = 0;
  logic clk = 0;

  tpa_bit_addition dut (.*);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [N-1:0] rnd();
    return {$urandom, $urandom};
  endfunction

  task automatic apply(input logic [N-1:0] va, vb, vc);
    logic [N+1:0] lhs, rhs;
    int bit_bad;
    a = va; b = vb; c = vc;
    @(posedge clk);
    bit_bad = 0;
    for (int i = 0; i < N; i++)
      if (2 * int'(c1[i]) + int'(s1[i]) != int'(a[i]) + int'(b[i]) + int'(c[i]))
        bit_bad++;
    lhs = (N+2)'(a) + (N+2)'(b) + (N+2)'(c);
    rhs = (N+2)'(s1) + ((N+2)'(c1) << 1);
    checks += 2;
    if (bit_bad != 0) begin
      failures++;
      $display("FAIL bitwise %0d positions a=%h b=%h c=%h", bit_bad, a, b, c);
    end
    if (lhs != rhs) begin
      failures++;
      $display("FAIL value a=%h b=%h c=%h s1=%h c1=%h", a, b, c, s1, c1);
    end
  endtask

  initial begin
    apply('0, '0, '0);
    apply('1, '1, '1);
    apply('1, '0, '0);
    apply('1, '1, '0);
    for (int t = 0; t < 500; t++) apply(rnd(), rnd(), rnd());
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
