// tb_tpa_base_logic: checks the N+1 saltire cells at the default width (64).
// Each position i must satisfy S'_i + cy_(i-1) = 2*G_i + P_i, with Cin at
// position 0 and S'_N = 0 at the top; the value P + 2*G must therefore equal
// S' + 2*cy + Cin.
module tb_tpa_base_logic;
  localparam int N = 64;
  logic [N-1:0] s1, c1;
  logic         cin;
  logic [N:0]   g, p;
  int checks = 0, failures = 0;
  logic clk = 0;

  tpa_base_logic dut (.*);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic apply(input logic [N-1:0] vs, vc, input logic vcin);
    int bad;
    logic s_bit, cy_bit;
    logic [N+1:0] lhs, rhs;
    s1 = vs; c1 = vc; cin = vcin;
    @(posedge clk);
    bad = 0;
    for (int i = 0; i <= N; i++) begin
      s_bit  = (i < N) ? s1[i] : 1'b0;
      cy_bit = (i == 0) ? cin : c1[i-1];
      if (2 * int'(g[i]) + int'(p[i]) != int'(s_bit) + int'(cy_bit)) bad++;
    end
    lhs = (N+2)'(p) + ((N+2)'(g) << 1);
    rhs = (N+2)'(s1) + ((N+2)'(c1) << 1) + (N+2)'(cin);
    checks += 2;
    if (bad != 0) begin
      failures++;
      $display("FAIL %0d positions s1=%h c1=%h cin=%0b", bad, s1, c1, cin);
    end
    if (lhs != rhs) begin
      failures++;
      $display("FAIL value s1=%h c1=%h cin=%0b g=%h p=%h", s1, c1, cin, g, p);
    end
  endtask

  initial begin
    apply('0, '0, 1'b0);
    apply('1, '1, 1'b1);
    apply('0, '1, 1'b0);
    apply('1, '0, 1'b1);
    for (int t = 0; t < 500; t++)
      apply({$urandom, $urandom}, {$urandom, $urandom}, 1'($urandom));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
