// tb_tpa_sum_logic: checks the sum phase at the default width (64).
// Random P and generate vectors are turned into a consistent carry vector
// G(i:0) by a serial (ripple) reference; the block's result must equal
// the arithmetic value P + 2*Gbit, and each bit must be P_i ^ carry-in.
module tb_tpa_sum_logic;
  localparam int N = 64;
  logic [N:0]   p, gpre;
  logic [N+1:0] sum;
  int checks = 0, failures = 0;
  logic clk = 0;

  tpa_sum_logic dut (.*);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic apply(input logic [N:0] vp, vg);
    logic carry;
    logic [N+1:0] expect_sum;
    // Bit-level generate vg and propagate vp must not both be 1 (half adder).
    vg = vg & ~vp;
    carry = 1'b0;
    for (int i = 0; i <= N; i++) begin
      carry   = vg[i] | (vp[i] & carry);
      gpre[i] = carry;
    end
    p = vp;
    @(posedge clk);
    expect_sum = (N+2)'(vp) + ((N+2)'(vg) << 1);
    checks++;
    if (sum != expect_sum) begin
      failures++;
      $display("FAIL p=%h g=%h sum=%h exp=%h", vp, vg, sum, expect_sum);
    end
  endtask

  initial begin
    apply('0, '0);
    apply('1, '0);
    apply('0, '1);
    apply({1'b0, {N{1'b1}}}, (N+1)'(1));
    for (int t = 0; t < 500; t++)
      apply({1'($urandom), $urandom, $urandom}, {1'($urandom), $urandom, $urandom});
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
