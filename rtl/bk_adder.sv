// bk_adder: pipelined binary adder of width W, built on the prefix carry
// network.
//
// Two n-bit numbers are added W bits at a time (n a multiple of W), least
// significant segment first, one segment per cycle.  For every bit the
// adder forms the generate g = a & b and the propagate p = a ^ b;
// bk_pipelined_carry turns them into the carries c_i of the whole n-bit
// addition, and each sum bit is s_i = p_i ^ c_(i-1).  The p bits wait for
// their carries in a delay line as deep as the carry pipeline.  The carry
// out of the last segment is the extra sum bit s_(n+1).  With W = n the
// whole addition is one segment (time proportional to lg n, area to n lg n).
// The g/p/sum equations follow Brent and Kung; they say only that an adder
// follows from the carry network, so the p delay line and the segment flags
// are this design's own.
//
// Interface: in_valid/in_first/in_last describe the segment on a_in, b_in
// (in_first: least significant segment of an addition, in_last: most
// significant; a one-segment addition has both).  The same flags come back
// with sum_out LATENCY = 2 lg W + 1 cycles later; cout_out is the carry out of
// the segment on sum_out, which for the last segment is s_(n+1).  The carry
// into the first segment is 0.  rst_n: synchronous, active low.
module bk_adder
  import bk_pkg::*;
#(
  parameter int unsigned W = 16
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         in_valid,
  input  logic         in_first,
  input  logic         in_last,
  input  logic [W-1:0] a_in,
  input  logic [W-1:0] b_in,
  output logic         out_valid,
  output logic         out_first,
  output logic         out_last,
  output logic [W-1:0] sum_out,
  output logic         cout_out
);

  localparam int unsigned L = $clog2(W);
  localparam int unsigned LATENCY = 2 * L + 1;

  gp_t [W-1:0] gp;
  always_comb begin
    for (int i = 0; i < W; i++) begin
      gp[i].g = a_in[i] & b_in[i];
      gp[i].p = a_in[i] ^ b_in[i];
    end
  end

  logic [W-1:0] carry;
  logic         seg_cin;

  bk_pipelined_carry #(.W(W)) u_carry (
    .clk      (clk),
    .rst_n    (rst_n),
    .seg_valid(in_valid),
    .seg_first(in_first),
    .seg_last (in_last),
    .gp_in    (gp),
    .out_valid(out_valid),
    .out_first(out_first),
    .out_last (out_last),
    .carry_out(carry),
    .seg_cin  (seg_cin)
  );

  // propagate bits delayed to meet their carries
  logic [W-1:0] p_dly_q [LATENCY];
  always_ff @(posedge clk) begin
    for (int i = 0; i < W; i++) p_dly_q[0][i] <= gp[i].p;
    for (int k = 1; k < LATENCY; k++) p_dly_q[k] <= p_dly_q[k-1];
  end

  assign sum_out  = p_dly_q[LATENCY-1] ^ {carry[W-2:0], seg_cin};
  assign cout_out = carry[W-1];

endmodule
