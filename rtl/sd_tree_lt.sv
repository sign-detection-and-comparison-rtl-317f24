// sd_tree_lt: tree sign detector for x + y with a low number of transitions.
//
// The fraction bits x1..xn, y1..yn are cut into M = N/K groups of K bits.
// Each group has a pg_gen (bit propagate / generate) and a pg_node giving the
// group pair (P, G); the pairs of groups 2..M are reduced by a pg_tree.
// The leftmost group (bits 1..K) is always active and yields (P_l, G_l).  When
// P_l = 0 the carry out is decided inside that group, c0 = G_l, so the
// pg_gen of every other group is inhibited by P_l and the rest of the network
// keeps still.  Only when P_l = 1 does the rest switch, and then
//   c0 = P_l' G_l + P_l G,   sign = x0 xor y0 xor c0,
// with G the generate of groups 2..M from the tree.
//
// Interface: x_frac / y_frac hold x1..xn with x1 at index N-1; p_l brings out
// the leftmost group's propagate, which is the enable of the other groups.
// Purely combinational: depth is one pg and one PG level for the leftmost
// group, then a second pg/PG level plus the tree for the rest.
//
// The structure and the c0 equation follow the design.  The tree over groups
// 2..M uses the padding rule of pg_tree when M-1 is not a power of K.
module sd_tree_lt #(
  parameter int unsigned N = 64,
  parameter int unsigned K = 4
) (
  input  logic         x0,
  input  logic         y0,
  input  logic [N-1:0] x_frac,
  input  logic [N-1:0] y_frac,
  output logic         p_l,
  output logic         c0,
  output logic         sign
);

  localparam int unsigned M = N / K;

  initial begin
    assert (N % K == 0 && N >= K) else $error("sd_tree_lt: N must be a multiple of K");
  end

  logic g_l;

  // Leftmost group, always enabled.
  logic [K-1:0] p_lead;
  logic [K-1:0] g_lead;

  pg_gen #(.K(K)) u_pg_lead (
    .en(1'b1),
    .x (x_frac[N-1 -: K]),
    .y (y_frac[N-1 -: K]),
    .p (p_lead),
    .g (g_lead)
  );

  pg_node #(.K(K)) u_node_lead (
    .p_in (p_lead),
    .g_in (g_lead),
    .p_out(p_l),
    .g_out(g_l)
  );

  if (M > 1) begin : g_rest
    // Groups 2..M; group pair index m (m = M-2 for group 2, 0 for group M).
    logic [M-2:0] grp_p;
    logic [M-2:0] grp_g;
    logic         rest_g;

    for (genvar m = 0; m < int'(M) - 1; m++) begin : g_grp
      logic [K-1:0] p;
      logic [K-1:0] g;

      pg_gen #(.K(K)) u_pg (
        .en(p_l),
        .x (x_frac[m*K +: K]),
        .y (y_frac[m*K +: K]),
        .p (p),
        .g (g)
      );

      pg_node #(.K(K)) u_node (
        .p_in (p),
        .g_in (g),
        .p_out(grp_p[m]),
        .g_out(grp_g[m])
      );
    end

    pg_tree #(.K(K), .M(M - 1)) u_tree (
      .p_in (grp_p),
      .g_in (grp_g),
      .g_out(rest_g)
    );

    assign c0 = (~p_l & g_l) | (p_l & rest_g);

    // While P_l = 0 the inhibited groups must present P = G = 0.
    always_comb begin
      a_inhibit : assert (p_l || (grp_p == '0 && grp_g == '0))
        else $error("sd_tree_lt: an inhibited group is switching");
    end
  end else begin : g_single
    assign c0 = g_l;
  end

  assign sign = x0 ^ y0 ^ c0;

endmodule
