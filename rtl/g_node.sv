// g_node: generate-only k-input module at the root of a PG tree.
//
// The last level of the tree only needs the carry out, so its module computes
//   G = G_1 + P_1 G_2 + ... + P_1 ... P_{k-1} G_k
// and no P.  Pair 1 is the most significant one.  P_k, the propagate of the
// least significant input, does not enter G and so is not an input.
//
// Interface: p_in holds P_1..P_{k-1} at indices K-1..1, g_in holds G_1..G_k
// at indices K-1..0.  Purely combinational; written, like
// pg_node, as a two-level sum of products.
module g_node #(
  parameter int unsigned K = 4
) (
  input  logic [K-1:1] p_in,
  input  logic [K-1:0] g_in,
  output logic         g_out
);

  logic [K-1:0] term;    // term[i]: G at index i with all pairs above propagating
  logic [K:1]   above;   // above[i]: AND of the propagates at indices K-1 .. i

  always_comb begin
    above[K] = 1'b1;
    for (int i = int'(K) - 1; i >= 1; i--) begin
      term[i]  = g_in[i] & above[i+1];
      above[i] = above[i+1] & p_in[i];
    end
    term[0] = g_in[0] & above[1];
    g_out   = |term;
  end

endmodule
