// pg_tree: k-ary tree of PG modules reducing M group (P, G) pairs to one.
//
// Level 1 takes the M group pairs, level j holds ceil(M / k^j) pg_node
// modules, and the last level a single g_node whose G is the carry out of all
// the bits the tree covers; as the root only needs G, it computes no P.
// Pairs are taken k at a time starting from the most significant end; when a
// level's width is not a multiple of k, the last module of the level is
// padded at its least significant inputs with the neutral pair
// (P, G) = (1, 0), which changes neither P nor G.
//
// Interface: p_in / g_in are M bits, index M-1 being the most significant
// group.  The root g_node takes no P from its lowest input, so that input's P
// is left unused there.  Purely combinational; depth is ceil(log_k M) PG
// modules.  The tree shape follows the tree network of the design; the
// padding rule for sizes that are not a power of k and the generate-only
// root are this design's choices, the root matching the G box drawn at the
// bottom of the tree.
module pg_tree
  import sd_pkg::*;
#(
  parameter int unsigned K = 4,
  parameter int unsigned M = 15
) (
  input  logic [M-1:0] p_in,
  input  logic [M-1:0] g_in,
  output logic         g_out
);

  localparam int unsigned L = tree_levels(M, K);

  // lp[l] / lg[l]: pairs at the input of level l (level 0 = the tree inputs).
  // Only the low level_width(M, K, l) entries of each row are used.
  logic [M-1:0] lp [0:L];
  logic [M-1:0] lg [0:L];

  assign lp[0] = p_in;
  assign lg[0] = g_in;

  for (genvar l = 0; l < int'(L); l++) begin : g_level
    localparam int unsigned W     = level_width(M, K, l);
    localparam int unsigned NODES = ceil_div(W, K);

    for (genvar j = 0; j < int'(NODES); j++) begin : g_node
      logic [K-1:0] np;
      logic [K-1:0] ng;

      // Input q of node j (q = K-1 most significant) is pair W-1-j*K-(K-1-q).
      for (genvar q = 0; q < int'(K); q++) begin : g_in
        localparam int SRC = int'(W) - 1 - j * int'(K) - (int'(K) - 1 - q);
        if (SRC >= 0) begin : g_real
          assign np[q] = lp[l][SRC];
          assign ng[q] = lg[l][SRC];
        end else begin : g_pad
          assign np[q] = 1'b1;
          assign ng[q] = 1'b0;
        end
      end

      if (l == int'(L) - 1) begin : g_root
        g_node #(.K(K)) u_root (
          .p_in (np[K-1:1]),
          .g_in (ng),
          .g_out(lg[l+1][0])
        );
        assign lp[l+1] = '0;   // the root makes no P
      end else begin : g_pg
        pg_node #(.K(K)) u_node (
          .p_in (np),
          .g_in (ng),
          .p_out(lp[l+1][NODES-1-j]),
          .g_out(lg[l+1][NODES-1-j])
        );
      end
    end

    // Rows are M bits wide; the entries above this level's output are unused.
    if (NODES < M) begin : g_fill
      assign lg[l+1][M-1:NODES] = '0;
      if (l != int'(L) - 1) begin : g_fill_p
        assign lp[l+1][M-1:NODES] = '0;
      end
    end
  end

  assign g_out = lg[L][0];

endmodule
