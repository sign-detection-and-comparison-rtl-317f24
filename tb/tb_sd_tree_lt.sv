// tb_sd_tree_lt: self-checking test of the low-transition tree network.
//
// Default size: 64 fraction bits in 16 groups of 4.  Operands are uniform
// random, or have their top bits forced to propagate (y = ~x over a random
// prefix) so that the leftmost group's P_l is 1 often enough to exercise the
// tree.  Checked: sign and c0 against the integer sum; p_l against the top
// group's bits; and the inhibit rule: whenever P_l = 0 every other group must
// present P = G = 0.  On uniform operands P_l = 1 has probability 2^-4, so
// the rest of the network must be active in about 1/16 of the operations.
// The depth of the module chain (log_K N + 1 PG levels) is checked as well.
module tb_sd_tree_lt;
  localparam int N = 64;
  localparam int K = 4;
  localparam int M = N / K;
  int checks = 0;
  int failures = 0;

  logic         x0, y0, p_l, c0, sign;
  logic [N-1:0] xf, yf;

  sd_tree_lt #(.N(N), .K(K)) dut (
    .x0(x0), .y0(y0), .x_frac(xf), .y_frac(yf), .p_l(p_l), .c0(c0), .sign(sign)
  );

  // second, small instance: two groups of 2 bits
  logic       sx0, sy0, sp_l, sc0, ssign;
  logic [3:0] sxf, syf;
  sd_tree_lt #(.N(4), .K(2)) dut_s (
    .x0(sx0), .y0(sy0), .x_frac(sxf), .y_frac(syf), .p_l(sp_l), .c0(sc0), .sign(ssign)
  );

  task automatic chk(input string what, input logic ok);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s x=%0b.%h y=%0b.%h", what, x0, xf, y0, yf);
    end
  endtask

  initial begin
    #10000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [N:0] sum;
    logic [4:0] ssum;
    int         active = 0;
    int         n_uniform = 0;
    int         inhibited = 0;
    real        frac;

    for (int t = 0; t < 20000; t++) begin
      x0 = 1'($urandom);
      y0 = 1'($urandom);
      xf = {$urandom, $urandom};
      yf = {$urandom, $urandom};
      if (t % 4 == 3) begin
        int L = $urandom % (N + 1);
        for (int b = N - 1; b >= N - L; b--) yf[b] = ~xf[b];
      end
      {sx0, sy0, sxf, syf} = 10'($urandom);
      #1;
      sum = {1'b0, xf} + {1'b0, yf};
      chk("sign", sign === (x0 ^ y0 ^ sum[N]) && c0 === sum[N]);
      chk("p_l", p_l === ((xf[N-1 -: K] ^ yf[N-1 -: K]) == '1));
      if (!p_l) begin
        chk("inhibit", dut.g_rest.grp_p == '0 && dut.g_rest.grp_g == '0);
        inhibited++;
      end
      if (t % 4 != 3) begin
        n_uniform++;
        if (p_l) active++;
      end
      ssum = {1'b0, sxf} + {1'b0, syf};
      chk("small sign", ssign === (sx0 ^ sy0 ^ ssum[4]));
    end

    // Depth: the slowest path crosses the leftmost PG module, one group PG
    // module and the tree, i.e. log_K(N) + 1 modules (4 for N = 64, K = 4).
    chk("module depth", 2 + int'(dut.g_rest.u_tree.L) == 4);

    frac = real'(active) / real'(n_uniform);
    $display("rest of tree active in %f of uniform operations (expected 1/16)", frac);
    chk("activity near 1/16", frac > 0.045 && frac < 0.08);
    chk("inhibit seen", inhibited > 0);

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
