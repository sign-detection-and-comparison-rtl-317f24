// sd_top: the three low-transition sign-detection networks side by side.
//
// All three decide the sign of x + y for two's-complement fractions
// x = x0.x1...xn, y = y0.y1...yn (sign = x0 xor y0 xor c0) while switching as
// few gates as possible on uniformly distributed operands:
//   it_*  sd_iter_lt   - iterative network; an h chain follows only the most
//                        significant carry-propagate chain (slow, N gate
//                        levels, but about constant switching activity).
//   tr_*  sd_tree_lt   - k-ary PG tree; all groups but the leftmost are
//                        inhibited unless the leftmost group propagates.
//   sm_*  sd_small_cmp - the tree with a control register R that moves the
//                        always-active group down past bytes known to be zero,
//                        for comparisons of small numbers.
// Each network has its own ports and parameters; they share nothing but the
// clock and reset, which only the R register of sd_small_cmp uses.
//
// Bit order: *_x_frac[N-1] is fraction bit x1 (weight 1/2).  Everything is
// combinational from operands to sign; sm_r changes on the rising clk edge
// after a cycle with sm_r_load = 1.  Default sizes follow the examples of the
// design: 53 fraction bits for the iterative network, 64 bits in 4-bit groups
// for the two trees.
module sd_top #(
  parameter int unsigned N_IT    = 53,
  parameter int unsigned N_TREE  = 64,
  parameter int unsigned K_TREE  = 4,
  parameter int unsigned N_SMALL = 64,
  parameter int unsigned K_SMALL = 4,
  localparam int unsigned M_SMALL = N_SMALL / K_SMALL
) (
  input  logic               clk,
  input  logic               rst_n,

  // Low-transition iterative network
  input  logic               it_x0,
  input  logic               it_y0,
  input  logic [N_IT-1:0]    it_x_frac,
  input  logic [N_IT-1:0]    it_y_frac,
  input  logic               it_h0,
  output logic               it_c0,
  output logic               it_sign,

  // Low-transition tree network
  input  logic               tr_x0,
  input  logic               tr_y0,
  input  logic [N_TREE-1:0]  tr_x_frac,
  input  logic [N_TREE-1:0]  tr_y_frac,
  output logic               tr_p_l,
  output logic               tr_c0,
  output logic               tr_sign,

  // Small-operand comparison network
  input  logic               sm_r_load,
  input  logic [M_SMALL-1:0] sm_r_d,
  input  logic               sm_x0,
  input  logic               sm_y0,
  input  logic [N_SMALL-1:0] sm_x_frac,
  input  logic [N_SMALL-1:0] sm_y_frac,
  output logic [M_SMALL-1:0] sm_r,
  output logic [M_SMALL-1:0] sm_e,
  output logic               sm_p_l,
  output logic               sm_c0,
  output logic               sm_sign
);

  sd_iter_lt #(.N(N_IT)) u_iter (
    .x0    (it_x0),
    .y0    (it_y0),
    .x_frac(it_x_frac),
    .y_frac(it_y_frac),
    .h0    (it_h0),
    .c0    (it_c0),
    .sign  (it_sign)
  );

  sd_tree_lt #(.N(N_TREE), .K(K_TREE)) u_tree (
    .x0    (tr_x0),
    .y0    (tr_y0),
    .x_frac(tr_x_frac),
    .y_frac(tr_y_frac),
    .p_l   (tr_p_l),
    .c0    (tr_c0),
    .sign  (tr_sign)
  );

  sd_small_cmp #(.N(N_SMALL), .K(K_SMALL)) u_small (
    .clk   (clk),
    .rst_n (rst_n),
    .r_load(sm_r_load),
    .r_d   (sm_r_d),
    .x0    (sm_x0),
    .y0    (sm_y0),
    .x_frac(sm_x_frac),
    .y_frac(sm_y_frac),
    .r     (sm_r),
    .e     (sm_e),
    .p_l   (sm_p_l),
    .c0    (sm_c0),
    .sign  (sm_sign)
  );

endmodule
