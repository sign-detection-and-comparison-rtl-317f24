// tb_transitions: switching activity of the low-transition networks.
//
// Feeds independent, uniformly distributed operands to the iterative network
// (53 and 16 fraction bits) and to the tree network (64 bits, groups of 4) at
// their default structure, and counts how many internal nets change their
// settled value from one operation to the next.  This is a zero-delay count:
// glitches inside an operation are not seen, only final values.
//
// Iterative network: every operation is followed by a clear step (h0 = 0).
// The scheme's cost model charges two gates per h_i that switches (the AND
// term and the OR), plus c0, per operate and per clear step; with a mean
// propagate run of one bit this comes to about 4.5 per operation for any N.
// The test checks that figure within +-0.5 for both sizes.
//
// Tree network: counts the bit-level p/g nets of all groups, compared with the
// p/g nets a network without inhibit would switch (x xor y and x and y of all
// 64 bits, computed here), and requires a reduction by at least a factor 3.
module tb_transitions;
  localparam int NA = 53;
  localparam int NB = 16;
  localparam int NT = 64;
  localparam int KT = 4;
  localparam int MT = NT / KT;
  localparam int OPS = 20000;

  int checks = 0;
  int failures = 0;

  logic          a_h0, a_c0, a_sign;
  logic [NA-1:0] a_x, a_y;
  logic          b_h0, b_c0, b_sign;
  logic [NB-1:0] b_x, b_y;
  logic          t_pl, t_c0, t_sign;
  logic [NT-1:0] t_x, t_y;

  sd_iter_lt #(.N(NA)) dut_a (.x0(1'b0), .y0(1'b0), .x_frac(a_x), .y_frac(a_y), .h0(a_h0),
                              .c0(a_c0), .sign(a_sign));
  sd_iter_lt #(.N(NB)) dut_b (.x0(1'b0), .y0(1'b0), .x_frac(b_x), .y_frac(b_y), .h0(b_h0),
                              .c0(b_c0), .sign(b_sign));
  sd_tree_lt #(.N(NT), .K(KT)) dut_t (.x0(1'b0), .y0(1'b0), .x_frac(t_x), .y_frac(t_y),
                                      .p_l(t_pl), .c0(t_c0), .sign(t_sign));

  task automatic chk(input string what, input logic ok);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  initial begin
    #100000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Settled nets of the tree network's groups: p and g of all 64 bits.
  logic [2*NT-1:0] tree_nets;
  assign tree_nets[2*NT-1 -: 2*KT] = {dut_t.p_lead, dut_t.g_lead};
  for (genvar m = 0; m < MT - 1; m++) begin : g_probe
    assign tree_nets[m*2*KT +: 2*KT] = {dut_t.g_rest.g_grp[m].p, dut_t.g_rest.g_grp[m].g};
  end

  function automatic logic [2*NT-1:0] tree_pg_nets();
    return tree_nets;
  endfunction

  initial begin
    logic [NA-1:1]   a_h_old;
    logic [NB-1:1]   b_h_old;
    logic            a_c_old, b_c_old;
    logic [2*NT-1:0] t_old, t_new;
    logic [2*NT-1:0] base_old, base_new;
    longint          a_cnt = 0, b_cnt = 0, t_cnt = 0, base_cnt = 0;
    real             a_avg, b_avg, t_avg, base_avg;

    a_h0 = 1'b0; b_h0 = 1'b0;
    a_x = '0; a_y = '0; b_x = '0; b_y = '0; t_x = '0; t_y = '0;
    #1;
    a_h_old = dut_a.h[NA-1:1]; a_c_old = a_c0;
    b_h_old = dut_b.h[NB-1:1]; b_c_old = b_c0;
    t_old = tree_pg_nets();
    base_old = {t_x ^ t_y, t_x & t_y};

    for (int t = 0; t < OPS; t++) begin
      // operate
      a_x = {$urandom, $urandom}; a_y = {$urandom, $urandom}; a_h0 = 1'b1;
      b_x = 16'($urandom);        b_y = 16'($urandom);        b_h0 = 1'b1;
      t_x = {$urandom, $urandom}; t_y = {$urandom, $urandom};
      #1;
      // each switching h_i costs two gate outputs (AND term and OR)
      a_cnt += 2 * $countones(a_h_old ^ dut_a.h[NA-1:1]) + int'(a_c_old ^ a_c0);
      b_cnt += 2 * $countones(b_h_old ^ dut_b.h[NB-1:1]) + int'(b_c_old ^ b_c0);
      a_h_old = dut_a.h[NA-1:1]; a_c_old = a_c0;
      b_h_old = dut_b.h[NB-1:1]; b_c_old = b_c0;
      t_new = tree_pg_nets();
      base_new = {t_x ^ t_y, t_x & t_y};
      t_cnt += $countones(t_new ^ t_old);
      base_cnt += $countones(base_new ^ base_old);
      t_old = t_new;
      base_old = base_new;
      // clear the iterative chains
      a_h0 = 1'b0; b_h0 = 1'b0;
      #1;
      a_cnt += 2 * $countones(a_h_old ^ dut_a.h[NA-1:1]) + int'(a_c_old ^ a_c0);
      b_cnt += 2 * $countones(b_h_old ^ dut_b.h[NB-1:1]) + int'(b_c_old ^ b_c0);
      a_h_old = dut_a.h[NA-1:1]; a_c_old = a_c0;
      b_h_old = dut_b.h[NB-1:1]; b_c_old = b_c0;
    end

    a_avg = real'(a_cnt) / OPS;
    b_avg = real'(b_cnt) / OPS;
    t_avg = real'(t_cnt) / OPS;
    base_avg = real'(base_cnt) / OPS;
    $display("iterative N=%0d: %f transitions per operation (model: 4.5)", NA, a_avg);
    $display("iterative N=%0d: %f transitions per operation (model: 4.5)", NB, b_avg);
    $display("tree N=%0d K=%0d: p/g nets switch %f per operation, without inhibit %f (model 7n/8 = %f)",
             NT, KT, t_avg, base_avg, 7.0 * NT / 8.0);
    chk("iterative 53 near 4.5", a_avg > 4.0 && a_avg < 5.0);
    chk("iterative 16 near 4.5", b_avg > 4.0 && b_avg < 5.0);
    chk("baseline p/g near 7n/8", base_avg > 0.8 * NT && base_avg < 0.95 * NT);
    chk("tree reduces p/g switching by 3x or more", t_avg * 3.0 < base_avg);

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
