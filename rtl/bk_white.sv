// bk_white: the "white" processor of the carry network.
//
// It transmits a (g, p) pair unchanged from one time level of the network
// to the next.  In the network every processor takes one unit of time; here
// the unit is one clock cycle, so the white processor is a (g, p) register
// and the pair leaves it one cycle after it arrived.  Registering every
// level is what lets successive w-bit segments follow each other through
// the network one per cycle.  No reset: the data it holds is qualified by
// valid flags kept elsewhere.
//
// Interface: d_in is sampled on the rising edge of clk, q_out shows it
// from the next cycle on.  Both outputs of the drawn processor carry the
// same value, so there is one output port.
module bk_white
  import bk_pkg::*;
(
  input  logic clk,
  input  gp_t  d_in,
  output gp_t  q_out
);

  always_ff @(posedge clk) q_out <= d_in;

endmodule
