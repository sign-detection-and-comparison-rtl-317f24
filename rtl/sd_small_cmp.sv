// sd_small_cmp: sign detector / comparator tuned for small operands.
//
// When the operands of a run of comparisons are small integers, their top
// bytes are zero; in the subtraction those bytes all propagate, so the
// leftmost group's P would be 1 and the plain low-transition tree would keep
// every group switching.  Here the control register R (one bit per K-bit byte,
// R_i = 1: byte i of both operands is zero) moves the always-active group down
// to the most significant byte that can be nonzero, byte j with
// R_{j-1} R_j' = 1.  Per byte i (see small_enable):
//   Q_i = P_i R_{i-1} R_i',  E_i = R_{i-1} R_i' + Q_1 + ... + Q_{i-1},
//   P*_i = P_i + R_i.
// E_i enables the byte's pg_gen; a disabled byte yields P = G = 0, and P*
// turns a disabled high byte into a propagate.  Byte 1 gives
// P_l = P*_1 and G_l = G_1; bytes 2..M feed (P*, G) to a pg_tree with
// generate G, and
//   c0 = P_l' G_l + P_l G,   sign = x0 xor y0 xor c0.
// To compare a with b, apply x = a and y = -b (two's complement) and read
// sign = 1 as a < b.  With R = 0 the network is the low-transition tree.
//
// Interface: clk / rst_n / r_load / r_d load R (see r_register); x_frac and
// y_frac hold bits 1..N with bit 1 at index N-1; byte 1 is x_frac[N-1 -: K],
// R bit i is r[M-i], E bit i is e[M-i].  The datapath is combinational from
// the operands to sign; only R is clocked.
// Structure and equations follow the design; the register's load port and
// reset value are this design's choices.
module sd_small_cmp #(
  parameter int unsigned N = 64,
  parameter int unsigned K = 4,
  localparam int unsigned M = N / K
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         r_load,
  input  logic [M-1:0] r_d,
  input  logic         x0,
  input  logic         y0,
  input  logic [N-1:0] x_frac,
  input  logic [N-1:0] y_frac,
  output logic [M-1:0] r,
  output logic [M-1:0] e,
  output logic         p_l,
  output logic         c0,
  output logic         sign
);

  initial begin
    assert (N % K == 0 && M >= 2) else $error("sd_small_cmp: N must be a multiple of K, N >= 2K");
  end

  r_register #(.M(M)) u_r (
    .clk  (clk),
    .rst_n(rst_n),
    .load (r_load),
    .d    (r_d),
    .r    (r)
  );

  logic [M-1:0] grp_pstar;   // P*_i of byte i at index M-i
  logic [M-1:0] grp_g;       // G_i  of byte i at index M-i

  // Byte i = M - m; m = M-1 is byte 1.
  for (genvar m = int'(M) - 1; m >= 0; m--) begin : g_byte
    logic         en;
    logic         q_above;
    logic         q_below;
    logic         r_prev;
    logic         grp_p;
    logic [K-1:0] p;
    logic [K-1:0] g;

    if (m == int'(M) - 1) begin : g_first
      assign r_prev  = 1'b1;   // R_0 = 1
      assign q_above = 1'b0;
    end else begin : g_next
      assign r_prev  = r[m+1];
      assign q_above = g_byte[m+1].q_below;
    end

    small_enable u_en (
      .r_prev (r_prev),
      .r_cur  (r[m]),
      .q_above(q_above),
      .p      (grp_p),
      .e      (en),
      .p_star (grp_pstar[m]),
      .q_below(q_below)
    );

    pg_gen #(.K(K)) u_pg (
      .en(en),
      .x (x_frac[m*K +: K]),
      .y (y_frac[m*K +: K]),
      .p (p),
      .g (g)
    );

    pg_node #(.K(K)) u_node (
      .p_in (p),
      .g_in (g),
      .p_out(grp_p),
      .g_out(grp_g[m])
    );

    assign e[m] = en;

    // A disabled byte presents P = G = 0.
    always_comb begin
      a_inhibit : assert (en || (grp_p == 1'b0 && grp_g[m] == 1'b0))
        else $error("sd_small_cmp: a disabled byte is switching");
    end
  end

  logic rest_g;

  pg_tree #(.K(K), .M(M - 1)) u_tree (
    .p_in (grp_pstar[M-2:0]),
    .g_in (grp_g[M-2:0]),
    .g_out(rest_g)
  );

  assign p_l  = grp_pstar[M-1];
  assign c0   = (~p_l & grp_g[M-1]) | (p_l & rest_g);
  assign sign = x0 ^ y0 ^ c0;

  // The last byte's chained Q is not needed.
  logic unused_q;
  assign unused_q = g_byte[0].q_below;

endmodule
