// tb_sd_small_cmp: self-checking test of the small-operand comparison network.
//
// Part 1 runs a 16-bit instance (four 4-bit bytes) on a worked example:
// a = 0000 0000 0011 1011, b = 0000 0000 0010 0111 with R = 1100 (top two
// bytes known zero).  The expected enables are 0010 (only byte 3 live),
// P* = 1100, P_l = 1 and c0 = 1, so the sign of a - b is 0 (a > b).
// Part 2 runs the default 64-bit instance on sequences of comparisons of
// small integers: for each sequence the number s of zero bytes is drawn, R is
// loaded with s leading ones, and a, b < 2^(64-4s) are compared by applying
// x = a, y = -b.  Checked: sign = (a < b); the enables against the rule
// "the first live byte, and all lower bytes if it propagates"; that disabled
// bytes present P = G = 0.  Part 3 uses R = 0 and uniform operands and checks
// the sign against the integer sum.
module tb_sd_small_cmp;
  localparam int N = 64;
  localparam int K = 4;
  localparam int M = N / K;
  int checks = 0;
  int failures = 0;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  // 64-bit instance
  logic         r_load = 1'b0;
  logic [M-1:0] r_d = '0;
  logic         x0 = 1'b0, y0 = 1'b0;
  logic [N-1:0] xf = '0, yf = '0;
  logic [M-1:0] r, e;
  logic         p_l, c0, sign;

  sd_small_cmp #(.N(N), .K(K)) dut (
    .clk(clk), .rst_n(rst_n), .r_load(r_load), .r_d(r_d),
    .x0(x0), .y0(y0), .x_frac(xf), .y_frac(yf),
    .r(r), .e(e), .p_l(p_l), .c0(c0), .sign(sign)
  );

  // 16-bit instance for the worked example
  logic        ex_load = 1'b0;
  logic [3:0]  ex_rd = '0;
  logic        ex_x0 = 1'b0, ex_y0 = 1'b0;
  logic [15:0] ex_xf = '0, ex_yf = '0;
  logic [3:0]  ex_r, ex_e;
  logic        ex_pl, ex_c0, ex_sign;

  sd_small_cmp #(.N(16), .K(4)) dut_ex (
    .clk(clk), .rst_n(rst_n), .r_load(ex_load), .r_d(ex_rd),
    .x0(ex_x0), .y0(ex_y0), .x_frac(ex_xf), .y_frac(ex_yf),
    .r(ex_r), .e(ex_e), .p_l(ex_pl), .c0(ex_c0), .sign(ex_sign)
  );

  task automatic chk(input string what, input logic ok);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s R=%b x=%0b.%h y=%0b.%h e=%b", what, r, x0, xf, y0, yf, e);
    end
  endtask

  // Expected enables for operands x, y and register value rr.
  function automatic logic [M-1:0] ref_e(input logic [N-1:0] x, input logic [N-1:0] y,
                                          input logic [M-1:0] rr);
    logic [M-1:0] en;
    int           first;
    en    = '0;
    first = -1;
    for (int m = M - 1; m >= 0; m--) begin
      if (!rr[m]) begin first = m; break; end
    end
    if (first >= 0) begin
      en[first] = 1'b1;
      if ((x[first*K +: K] ^ y[first*K +: K]) == '1)
        for (int m = first - 1; m >= 0; m--) en[m] = 1'b1;
    end
    return en;
  endfunction

  // Check that every disabled byte presents P = G = 0.
  task automatic chk_inhibit();
    logic ok;
    ok = 1'b1;
    for (int m = 0; m < M; m++)
      if (!e[m] && (dut.grp_g[m] || (dut.grp_pstar[m] !== r[m]))) ok = 1'b0;
    chk("inhibit", ok);
  endtask

  initial begin
    #100000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [N:0]   xa, yb, yneg, sum;
    int           s, bits;
    int           n_q_enable = 0;
    int           n_disabled = 0;
    int           n_lt = 0, n_ge = 0;

    #12;
    rst_n = 1'b1;

    // ---- Part 1: worked example on 4 bytes ----
    @(negedge clk);
    ex_load = 1'b1;
    ex_rd   = 4'b1100;
    @(negedge clk);
    ex_load = 1'b0;
    ex_x0   = 1'b0;
    ex_xf   = 16'b0000_0000_0011_1011;
    {ex_y0, ex_yf} = 17'h20000 - 17'b0_0000_0000_0010_0111;   // -b
    #1;
    chk("example -b", {ex_y0, ex_yf} === 17'b1_1111_1111_1101_1001);
    chk("example E", ex_e === 4'b0010);
    chk("example P*", dut_ex.grp_pstar === 4'b1100);
    chk("example G", dut_ex.grp_g === 4'b0010);
    chk("example P_l", ex_pl === 1'b1);
    chk("example c0", ex_c0 === 1'b1);
    chk("example sign", ex_sign === 1'b0);

    // ---- Part 2: sequences of comparisons of small integers ----
    for (int seq = 0; seq < 200; seq++) begin
      s = $urandom % M;                 // at least one live byte
      @(negedge clk);
      r_load = 1'b1;
      r_d    = '0;
      for (int i = 0; i < s; i++) r_d[M-1-i] = 1'b1;
      @(negedge clk);
      r_load = 1'b0;
      chk("R loaded", r === r_d);
      bits = N - K * s;
      for (int t = 0; t < 50; t++) begin
        xa = {1'b0, $urandom, $urandom};
        yb = {1'b0, $urandom, $urandom};
        if (bits < N) begin
          xa = xa & ((65'd1 << bits) - 1);
          yb = yb & ((65'd1 << bits) - 1);
        end
        if (t % 5 == 0) yb = xa;        // equal operands
        if (t % 5 == 1) yb = xa ^ 65'(1 << ($urandom % 4)); // near-equal
        yneg = (~yb) + 65'd1;
        {x0, xf} = xa;
        {y0, yf} = yneg;
        #1;
        chk("compare", sign === (xa < yb));
        if (xa < yb) n_lt++; else n_ge++;
        chk("enables", e === ref_e(xf, yf, r));
        chk_inhibit();
        if ($countones(e) > 1) n_q_enable++;   // bytes enabled through a Q
        if (e != ~r) n_disabled++;
      end
    end

    // ---- Part 3: R = 0, uniform operands ----
    @(negedge clk);
    r_load = 1'b1;
    r_d    = '0;
    @(negedge clk);
    r_load = 1'b0;
    for (int t = 0; t < 5000; t++) begin
      x0 = 1'($urandom);
      y0 = 1'($urandom);
      xf = {$urandom, $urandom};
      yf = {$urandom, $urandom};
      if (t % 3 == 0) yf[N-1 -: 8] = ~xf[N-1 -: 8];
      #1;
      sum = {1'b0, xf} + {1'b0, yf};
      chk("uniform sign", sign === (x0 ^ y0 ^ sum[N]) && c0 === sum[N]);
      chk("uniform enables", e === ref_e(xf, yf, '0));
      chk_inhibit();
    end

    $display("less-than %0d, not less-than %0d, enabled through Q %0d, live bytes disabled %0d",
             n_lt, n_ge, n_q_enable, n_disabled);
    chk("both outcomes", n_lt > 0 && n_ge > 0);
    chk("Q enable seen", n_q_enable > 0);
    chk("inhibit seen", n_disabled > 0);

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
