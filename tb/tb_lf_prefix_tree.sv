// tb_lf_prefix_tree: checks the Ladner-Fischer carry network against a
// serial (ripple) carry reference, at the default width (65 positions) and
// at several other widths, including powers of two and odd sizes, so that
// the block-splitting of every level is exercised. Small widths are tested
// exhaustively over all valid (G,P) combinations, larger ones with random
// and worst-case (full-length propagation) vectors.
module tb_lf_prefix_tree;
  localparam int NW = 8;
  localparam int WIDTHS [NW] = '{65, 1, 2, 3, 5, 8, 17, 32};

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
    localparam int W = WIDTHS[w];
    logic [W-1:0] g_in, p_in, g_out;

    if (w == 0) begin : g_default
      lf_prefix_tree dut (.g_in(g_in), .p_in(p_in), .g_out(g_out));
    end else begin : g_sized
      lf_prefix_tree #(.W(W)) dut (.g_in(g_in), .p_in(p_in), .g_out(g_out));
    end

    task automatic apply(input logic [W-1:0] vg, vp);
      logic [W-1:0] expect_g;
      logic carry;
      g_in = vg;
      p_in = vp;
      carry = 1'b0;
      for (int i = 0; i < W; i++) begin
        carry       = vg[i] | (vp[i] & carry);
        expect_g[i] = carry;
      end
      @(posedge clk);
      checks++;
      if (g_out !== expect_g) begin
        failures++;
        $display("FAIL W=%0d g=%h p=%h out=%h exp=%h", W, vg, vp, g_out, expect_g);
      end
    endtask

    initial begin
      if (W <= 8) begin
        for (int v = 0; v < (1 << (2 * W)); v++)
          apply(W'(v), W'(v >> W));
      end else begin
        // Longest chain: generate at bit 0, propagate everywhere above.
        apply(W'(1), ~W'(1));
        apply('0, '1);
        apply('1, '0);
        for (int t = 0; t < 2000; t++)
          apply(W'({$urandom, $urandom, $urandom}), W'({$urandom, $urandom, $urandom}));
        // Random long chains broken at one place.
        for (int t = 0; t < 200; t++) begin
          int k;
          k = $urandom_range(W - 1);
          apply(W'(1), ~(W'(1) << k));
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
