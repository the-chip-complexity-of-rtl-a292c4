// bk_square: the "square" processor of the pipelined adder, an accumulator
// of the carry out of all segments already added.
//
// Segments of an n-bit addition arrive least significant first; for each
// one the carry network delivers the segment's total (G_w, P_w) on seg_in.
// The processor holds (g^, p^) = (G_(i-1)w, P_(i-1)w), the combined pair of
// all earlier segments of the same addition, and sends it to the broadcast
// tree on bcast_out while segment i's total is at its input.  At the end of
// that cycle it stores seg_in o (g^, p^), the new running total.  Thus the
// value sent out is the stored one, i.e. the processor's own result delayed
// by one segment, and the first segment of an addition sees the start value
// (0, 1).  seg_first marks that first segment: it makes both the output and
// the combination use (0, 1) instead of the stored pair, which restarts the
// accumulation without an idle cycle between two additions.
//
// Timing: bcast_out is combinational from the register and seg_first; the
// register changes at the rising edge of clk when seg_valid is high.
// rst_n (active low, synchronous) loads (0, 1).
module bk_square
  import bk_pkg::*;
(
  input  logic clk,
  input  logic rst_n,
  input  logic seg_valid,
  input  logic seg_first,
  input  gp_t  seg_in,
  output gp_t  bcast_out
);

  gp_t acc_q;

  assign bcast_out = seg_first ? GP_IDENTITY : acc_q;

  always_ff @(posedge clk) begin
    if (!rst_n)         acc_q <= GP_IDENTITY;
    else if (seg_valid) acc_q <= gp_combine(seg_in, bcast_out);
  end

endmodule
