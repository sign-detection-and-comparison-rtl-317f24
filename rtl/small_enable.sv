// small_enable: per-group enable cell of the small-operand comparison network.
//
// Register R has one bit per K-bit group ("byte"); R_i = 1 promises that
// byte i of both operands is zero, so the byte is a known propagate and its
// pg/PG logic need not switch.  Byte j with R_{j-1} R_j' = 1 is the most
// significant byte that can hold a nonzero bit (R_0 = 1).  For group i this
// cell forms
//   Q_i   = P_i R_{i-1} R_i'              (the first live byte propagates)
//   E_i   = R_{i-1} R_i' + Q_1 + ... + Q_{i-1}
//   P*_i  = P_i + R_i                     (disabled high bytes propagate)
// The OR of the Q's above is passed from cell to cell: q_above comes from the
// more significant neighbour and q_below = q_above + Q_i goes to the next one.
//
// Interface: r_prev = R_{i-1} (1 for group 1), r_cur = R_i, p = P_i from the
// group's PG module; outputs e, p_star and q_below.  Purely combinational;
// E_i depends only on the groups above, so the cells chain without a loop.
// The equations are the design's; splitting them into one cell per group and
// carrying the OR of the Q's down the chain is this design's choice.
module small_enable (
  input  logic r_prev,
  input  logic r_cur,
  input  logic q_above,
  input  logic p,
  output logic e,
  output logic p_star,
  output logic q_below
);

  logic first_live;   // R_{i-1} R_i': this is the most significant live byte

  always_comb begin
    first_live = r_prev & ~r_cur;
    e          = first_live | q_above;
    q_below    = q_above | (p & first_live);
    p_star     = p | r_cur;
  end

endmodule
