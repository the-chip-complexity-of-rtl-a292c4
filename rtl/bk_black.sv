// bk_black: the "black" processor of the carry network.
//
// It applies the carry operator to the pair arriving from the same column
// (d_in, the more significant block) and the pair arriving from a column to
// its right (d_lo, the less significant block):
//   g_out = g_in | (p_in & g'_in),   p_out = p_in & p'_in.
// One computation takes one unit of time, one clock cycle here, so the
// result is registered: q_out shows the combined pair in the cycle after
// d_in and d_lo were sampled.  Both outputs of the drawn processor carry the
// same value, so there is one output port.  No reset (data only).
module bk_black
  import bk_pkg::*;
(
  input  logic clk,
  input  gp_t  d_in,
  input  gp_t  d_lo,
  output gp_t  q_out
);

  always_ff @(posedge clk) q_out <= gp_combine(d_in, d_lo);

endmodule
