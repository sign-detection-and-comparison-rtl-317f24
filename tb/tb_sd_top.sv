// tb_sd_top: end-to-end test of the three networks at their default sizes.
//
// The top is instantiated without parameter overrides (53-bit iterative
// network, 64-bit trees in 4-bit groups).  Each step applies one operation to
// every network:
//   iterative: random or long-chain operands with h0 = 1, then a clear step
//              with h0 = 0 (the sign must still be right afterwards when the
//              chain is re-armed);
//   tree:      random or top-propagating operands;
//   small:     comparisons of small integers a, b with R loaded from the
//              size of the current sequence, applied as x = a, y = -b.
// Every result is compared with integer arithmetic done here.  The mechanisms
// of the design are counted and each must occur: chain cleared, long chain,
// tree inhibited, tree fully active, R reloaded, high bytes disabled by R,
// lower bytes enabled through a Q term, and both comparison outcomes.
module tb_sd_top;
  localparam int NI = 53;
  localparam int NT = 64;
  localparam int NS = 64;
  localparam int KS = 4;
  localparam int MS = NS / KS;

  int checks = 0;
  int failures = 0;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  logic          it_x0, it_y0, it_h0, it_c0, it_sign;
  logic [NI-1:0] it_xf, it_yf;
  logic          tr_x0, tr_y0, tr_p_l, tr_c0, tr_sign;
  logic [NT-1:0] tr_xf, tr_yf;
  logic          sm_r_load;
  logic [MS-1:0] sm_r_d, sm_r, sm_e;
  logic          sm_x0, sm_y0, sm_p_l, sm_c0, sm_sign;
  logic [NS-1:0] sm_xf, sm_yf;

  sd_top dut (
    .clk(clk), .rst_n(rst_n),
    .it_x0(it_x0), .it_y0(it_y0), .it_x_frac(it_xf), .it_y_frac(it_yf), .it_h0(it_h0),
    .it_c0(it_c0), .it_sign(it_sign),
    .tr_x0(tr_x0), .tr_y0(tr_y0), .tr_x_frac(tr_xf), .tr_y_frac(tr_yf),
    .tr_p_l(tr_p_l), .tr_c0(tr_c0), .tr_sign(tr_sign),
    .sm_r_load(sm_r_load), .sm_r_d(sm_r_d), .sm_x0(sm_x0), .sm_y0(sm_y0),
    .sm_x_frac(sm_xf), .sm_y_frac(sm_yf), .sm_r(sm_r), .sm_e(sm_e),
    .sm_p_l(sm_p_l), .sm_c0(sm_c0), .sm_sign(sm_sign)
  );

  task automatic chk(input string what, input logic ok);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s at %0t", what, $time);
    end
  endtask

  initial begin
    #10000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int n_clear = 0, n_long_chain = 0, n_tree_inhibit = 0, n_tree_active = 0;
  int n_r_reload = 0, n_r_disable = 0, n_q_enable = 0, n_lt = 0, n_ge = 0;

  initial begin
    logic [NI:0] isum;
    logic [NT:0] tsum;
    logic [NS:0] a, b, bneg;
    int          run, s, bits;

    it_x0 = 0; it_y0 = 0; it_xf = '0; it_yf = '0; it_h0 = 0;
    tr_x0 = 0; tr_y0 = 0; tr_xf = '0; tr_yf = '0;
    sm_r_load = 0; sm_r_d = '0; sm_x0 = 0; sm_y0 = 0; sm_xf = '0; sm_yf = '0;
    #12;
    rst_n = 1'b1;
    chk("R reset", sm_r === '0);

    for (int t = 0; t < 4000; t++) begin
      // a new sequence of small comparisons every 40 steps: reload R
      if (t % 40 == 0) begin
        s = $urandom % MS;
        @(negedge clk);
        sm_r_load = 1'b1;
        sm_r_d    = '0;
        for (int i = 0; i < s; i++) sm_r_d[MS-1-i] = 1'b1;
        @(negedge clk);
        sm_r_load = 1'b0;
        chk("R load", sm_r === sm_r_d);
        n_r_reload++;
      end

      // iterative network
      it_x0 = 1'($urandom);
      it_y0 = 1'($urandom);
      it_xf = {$urandom, $urandom};
      it_yf = {$urandom, $urandom};
      if (t % 5 == 0) begin
        int L = $urandom % (NI + 1);
        for (int i = NI - 1; i >= NI - L; i--) it_yf[i] = ~it_xf[i];
      end
      it_h0 = 1'b1;

      // tree network
      tr_x0 = 1'($urandom);
      tr_y0 = 1'($urandom);
      tr_xf = {$urandom, $urandom};
      tr_yf = {$urandom, $urandom};
      if (t % 5 == 0) tr_yf[NT-1 -: 12] = ~tr_xf[NT-1 -: 12];

      // small-operand comparison
      bits = NS - KS * s;
      a = {1'b0, $urandom, $urandom};
      b = {1'b0, $urandom, $urandom};
      if (bits < NS) begin
        a = a & ((65'd1 << bits) - 1);
        b = b & ((65'd1 << bits) - 1);
      end
      if (t % 7 == 0) b = a;
      bneg = (~b) + 65'd1;
      {sm_x0, sm_xf} = a;
      {sm_y0, sm_yf} = bneg;

      @(negedge clk);
      isum = {1'b0, it_xf} + {1'b0, it_yf};
      chk("iterative sign", it_sign === (it_x0 ^ it_y0 ^ isum[NI]));
      run = 0;
      while (run < NI && (it_xf[NI-1-run] ^ it_yf[NI-1-run])) run++;
      if (run >= 8) n_long_chain++;

      tsum = {1'b0, tr_xf} + {1'b0, tr_yf};
      chk("tree sign", tr_sign === (tr_x0 ^ tr_y0 ^ tsum[NT]));
      if (tr_p_l) n_tree_active++; else n_tree_inhibit++;

      chk("small compare", sm_sign === (a < b));
      if (a < b) n_lt++; else n_ge++;
      if (sm_r != '0 && (sm_e & sm_r) == '0) n_r_disable++;
      if ($countones(sm_e) > 1) n_q_enable++;
      chk("disabled bytes above the live one", (sm_e & sm_r) == '0);

      // clear the iterative chain between operations
      it_h0 = 1'b0;
      @(negedge clk);
      chk("chain cleared", dut.u_iter.h[NI-1:1] == '0);
      n_clear++;
    end

    $display("chain cleared %0d, long chains %0d, tree inhibited %0d, tree active %0d",
             n_clear, n_long_chain, n_tree_inhibit, n_tree_active);
    $display("R reloads %0d, ops with bytes disabled by R %0d, Q enables %0d, a<b %0d, a>=b %0d",
             n_r_reload, n_r_disable, n_q_enable, n_lt, n_ge);
    chk("mechanism: chain clear", n_clear > 0);
    chk("mechanism: long chain", n_long_chain > 0);
    chk("mechanism: tree inhibit", n_tree_inhibit > 0);
    chk("mechanism: tree active", n_tree_active > 0);
    chk("mechanism: R reload", n_r_reload > 1);
    chk("mechanism: R disable", n_r_disable > 0);
    chk("mechanism: Q enable", n_q_enable > 0);
    chk("mechanism: both outcomes", n_lt > 0 && n_ge > 0);

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
