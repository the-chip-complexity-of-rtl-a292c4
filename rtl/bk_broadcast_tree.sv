// bk_broadcast_tree: the binary tree that carries the square processor's
// pair to all W leaf processors above the carry network.
//
// The root (root_in) feeds 2 white processors, each of those 2 more, and so
// on for lg W - 1 levels, so that no processor drives more than two others
// (bounded fan-out); the 2^(lg W - 1) processors of the last level each feed
// two leaves, W in all.  Every level is a register (one unit of time), so
// leaf_out shows root_in lg W - 1 cycles later: exactly as long as
// a segment needs to go from row lg W of the carry network to its top row.
// For W = 2 there is no level and the leaves see root_in directly.
// Which leaf hangs below which node does not matter, since all carry the
// same value; leaf j hangs below node j/2 of the last level.  The tree and
// its place over the upper half of the network follow Brent and Kung's
// pipelined adder; making every level a register is this design's reading of
// their unit-time processors.
module bk_broadcast_tree
  import bk_pkg::*;
#(
  parameter int unsigned W = 16
) (
  input  logic        clk,
  input  gp_t         root_in,
  output gp_t [W-1:0] leaf_out
);

  localparam int unsigned L = $clog2(W);

  // lvl[m] holds the 2^m nodes of level m; level 0 is the root itself
  gp_t [W-1:0] lvl [L];

  assign lvl[0][0] = root_in;
  for (genvar j = 1; j < W; j++) begin : g_unused0
    assign lvl[0][j] = GP_IDENTITY;
  end

  for (genvar m = 1; m < L; m++) begin : g_lvl
    for (genvar j = 0; j < W; j++) begin : g_node
      if (j < (1 << m)) begin : g_used
        bk_white u_w (.clk(clk), .d_in(lvl[m-1][j/2]), .q_out(lvl[m][j]));
      end else begin : g_unused
        assign lvl[m][j] = GP_IDENTITY;
      end
    end
  end

  for (genvar j = 0; j < W; j++) begin : g_leaf
    assign leaf_out[j] = lvl[L-1][j/2];
  end

endmodule
