// bk_pipelined_carry: carries of an n-bit addition whose operands arrive W
// bits at a time (W <= n), least significant segment first.
//
// Each segment's (g_i, p_i) enter the carry network (bk_carry_network) one
// segment per cycle.  The network's top row gives carries that assume a zero
// carry into the segment; they must still be combined, on the right, with
// the pair (G_(i-1)W, P_(i-1)W) of all lower segments.  That pair is kept by
// the square processor (bk_square), which takes the segment total from the
// network's row lg W, and it is sent to the top through a second binary tree
// of lg W - 1 register levels (bk_broadcast_tree) built over the upper half
// of the network.  The tree and the upper half of the network have the same
// depth, so the pair for segment i reaches the W leaf black processors above
// the network in the same cycle as segment i's own results, and each leaf
// computes (G_j, P_j) o (G_(i-1)W, P_(i-1)W).  The g of the result is the
// carry out of bit (i-1)W + j of the whole addition.
//
// Control (this design's own choice): seg_valid qualifies a segment,
// seg_first marks the least significant segment of an addition and restarts
// the square processor, seg_last marks the most significant one.  The flags
// travel through a shift register beside the data.  The carry into bit 1 of
// an addition is 0, as in the usual carry chain.
//
// Timing: a segment presented in cycle 0 appears on carry_out with
// out_valid in cycle 2 lg W + 1 (9 for W = 16); one segment can be
// presented every cycle, so an n-bit addition takes n/W + 2 lg W cycles.
// seg_cin is the carry into bit 1 of the segment on carry_out.
// rst_n is synchronous and active low; it clears the flags and the square
// processor.
module bk_pipelined_carry
  import bk_pkg::*;
#(
  parameter int unsigned W = 16
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         seg_valid,
  input  logic         seg_first,
  input  logic         seg_last,
  input  gp_t  [W-1:0] gp_in,
  output logic         out_valid,
  output logic         out_first,
  output logic         out_last,
  output logic [W-1:0] carry_out,
  output logic         seg_cin
);

  localparam int unsigned L = $clog2(W);

  typedef struct packed {
    logic valid;
    logic first;
    logic last;
  } seg_flags_t;

  // flag stage k travels with network row k; stage 2L with the leaves
  seg_flags_t flags_q [2*L+1];

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      for (int k = 0; k <= 2 * L; k++) flags_q[k] <= '0;
    end else begin
      flags_q[0] <= '{valid: seg_valid, first: seg_first, last: seg_last};
      for (int k = 1; k <= 2 * L; k++) flags_q[k] <= flags_q[k-1];
    end
  end

  gp_t [W-1:0] local_gp;
  gp_t         seg_total;
  gp_t         bcast;
  gp_t [W-1:0] leaf_gp;
  gp_t [W-1:0] final_gp;
  logic        cin_q;

  bk_carry_network #(.W(W)) u_net (
    .clk      (clk),
    .gp_in    (gp_in),
    .gp_out   (local_gp),
    .total_out(seg_total)
  );

  bk_square u_square (
    .clk      (clk),
    .rst_n    (rst_n),
    .seg_valid(flags_q[L].valid),
    .seg_first(flags_q[L].first),
    .seg_in   (seg_total),
    .bcast_out(bcast)
  );

  bk_broadcast_tree #(.W(W)) u_tree (
    .clk     (clk),
    .root_in (bcast),
    .leaf_out(leaf_gp)
  );

  // leaf row: black processors above the network
  for (genvar j = 0; j < W; j++) begin : g_leaf
    bk_black u_leaf (.clk(clk), .d_in(local_gp[j]), .d_lo(leaf_gp[j]), .q_out(final_gp[j]));
    assign carry_out[j] = final_gp[j].g;
  end

  // carry into the segment, kept level with the leaf row
  always_ff @(posedge clk) cin_q <= leaf_gp[0].g;
  assign seg_cin = cin_q;

  assign out_valid = flags_q[2*L].valid;
  assign out_first = flags_q[2*L].first;
  assign out_last  = flags_q[2*L].last;

endmodule
