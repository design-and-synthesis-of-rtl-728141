// tb_lf_three_operand_adder: end-to-end test of the three-operand adder at
// its default width (64 bits), with no parameter overridden.
//
// Every vector is checked against plain wide arithmetic, a + b + c + cin in
// 66 bits, and every intermediate port (s1, c1, p, g, carry) against its own
// equation computed bit by bit in the testbench (the carries by a serial
// ripple). Directed vectors cover the extremes; random vectors follow. The
// testbench also counts how often each mechanism of the adder was exercised
// and fails if one never was:
//   carry-in used, carry-out (top result bit) set, bit N of the result set,
//   a carry propagated through all N+1 positions of the prefix network,
//   and a carry-save carry out of the top bit (P_N = 1).
module tb_lf_three_operand_adder;
  localparam int N = 64;

  logic [N-1:0] a, b, c, s1, c1;
  logic         cin;
  logic [N+1:0] sum;
  logic [N:0]   p, g, carry;

  int checks = 0, failures = 0;
  int n_cin = 0, n_cout = 0, n_bitn = 0, n_full_chain = 0, n_top_carry = 0;
  logic clk = 0;

  lf_three_operand_adder dut (.*);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input string what, input logic ok);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20)
        $display("FAIL %s: a=%h b=%h c=%h cin=%0b sum=%h", what, a, b, c, cin, sum);
    end
  endtask

  task automatic apply(input logic [N-1:0] va, vb, vc, input logic vcin);
    logic [N+1:0] expect_sum;
    logic [N-1:0] es1, ec1;
    logic [N:0]   ep, eg, ex;
    logic         rc, s_bit, cy_bit;
    int           run, longest;
    a = va; b = vb; c = vc; cin = vcin;
    @(posedge clk);
    expect_sum = (N+2)'(va) + (N+2)'(vb) + (N+2)'(vc) + (N+2)'(vcin);
    for (int i = 0; i < N; i++) begin
      es1[i] = va[i] ^ vb[i] ^ vc[i];
      ec1[i] = (int'(va[i]) + int'(vb[i]) + int'(vc[i])) >= 2;
    end
    rc = 1'b0;
    run = 0;
    longest = 0;
    for (int i = 0; i <= N; i++) begin
      s_bit  = (i < N) ? es1[i] : 1'b0;
      cy_bit = (i == 0) ? vcin : ec1[i-1];
      eg[i]  = s_bit & cy_bit;
      ep[i]  = s_bit ^ cy_bit;
      // Length of the chain of propagates that a carry travels through.
      if (eg[i]) run = 1;
      else if (ep[i] && rc) run++;
      else run = 0;
      if (run > longest) longest = run;
      rc     = eg[i] | (ep[i] & rc);
      ex[i]  = rc;
    end
    check("sum", sum == expect_sum);
    check("s1", s1 == es1);
    check("c1", c1 == ec1);
    check("p", p == ep);
    check("g", g == eg);
    check("carry", carry == ex);
    if (vcin) n_cin++;
    if (sum[N+1]) n_cout++;
    if (sum[N]) n_bitn++;
    if (longest >= N + 1) n_full_chain++;
    if (ep[N]) n_top_carry++;
  endtask

  function automatic logic [N-1:0] rnd();
    return {$urandom, $urandom};
  endfunction

  initial begin
    // Extremes.
    apply('0, '0, '0, 1'b0);
    apply('0, '0, '0, 1'b1);
    apply('1, '1, '1, 1'b1);        // largest result: 3*(2^N-1)+1
    apply('1, '0, '0, 1'b1);        // carry from bit 0 through every bit
    apply('1, '1, '0, 1'b0);
    apply({1'b1, {(N-1){1'b0}}}, {1'b1, {(N-1){1'b0}}}, '0, 1'b0);
    apply({1'b0, {(N-1){1'b1}}}, {1'b0, {(N-1){1'b1}}}, {1'b0, {(N-1){1'b1}}}, 1'b1);
    // Walking single bits.
    for (int i = 0; i < N; i++) begin
      apply(N'(1) << i, '1, '0, 1'b0);
      apply('1, '1, N'(1) << i, 1'b1);
    end
    // Random operands.
    for (int t = 0; t < 5000; t++) apply(rnd(), rnd(), rnd(), 1'($urandom));
    // Random operands biased towards all-ones (long carries, large sums).
    for (int t = 0; t < 1000; t++)
      apply(rnd() | rnd() | rnd(), rnd() | rnd(), rnd() & rnd(), 1'($urandom));

    $display("mechanisms: cin=%0d cout=%0d bitN=%0d full_chain=%0d top_cs_carry=%0d",
             n_cin, n_cout, n_bitn, n_full_chain, n_top_carry);
    checks += 5;
    if (n_cin == 0) failures++;
    if (n_cout == 0) failures++;
    if (n_bitn == 0) failures++;
    if (n_full_chain == 0) failures++;
    if (n_top_carry == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
