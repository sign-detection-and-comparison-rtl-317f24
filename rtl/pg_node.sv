// pg_node: k-input group propagate / generate module of the tree networks.
//
// Combines k (P, G) pairs, the first one being the most significant:
//   P = P_1 P_2 ... P_k
//   G = G_1 + P_1 G_2 + P_1 P_2 G_3 + ... + P_1 ... P_{k-1} G_k
// so G is the carry out of the bits the pairs cover and P says that a carry
// entering at the bottom would pass through all of them.
//
// Interface: p_in / g_in are K bits, index K-1 holding pair 1 (the most
// significant) and index 0 pair k.  Purely combinational.  G is written as
// the two-level sum of products above: product term t is G_t ANDed with the
// propagates of all pairs above it, and the terms are ORed.
module pg_node #(
  parameter int unsigned K = 4
) (
  input  logic [K-1:0] p_in,
  input  logic [K-1:0] g_in,
  output logic         p_out,
  output logic         g_out
);

  logic [K-1:0] term;    // term[i]: G of pair at index i, all pairs above propagate
  logic [K:0]   above;   // above[i]: AND of the propagates at indices K-1 .. i

  always_comb begin
    above[K] = 1'b1;
    for (int i = int'(K) - 1; i >= 0; i--) begin
      term[i]  = g_in[i] & above[i+1];
      above[i] = above[i+1] & p_in[i];
    end
    g_out = |term;
    p_out = above[0];
  end

endmodule
