// fp_pe: processing element of the F_p systolic array, with serial
// multiply-add.
//
// One systolic beat lasts B = ceil(lg p) clock cycles.  In the first cycle of
// a beat (first) the element takes its two operands: in matrix-product mode
// (mac) the one arriving from the left (a_in) and the one from above (b_in),
// which it also hands on, a_out to the right and b_out downwards, for the
// next beat; in componentwise mode (had) the two matrix entries wired
// straight to it (x_dir, y_dir).  It then forms the product modulo p
// serially, one bit of the first operand per cycle, most significant bit
// first (Horner's rule: r <- 2r + bit * b, each step brought back below p by
// two conditional subtractions).  In the last cycle of the beat (last) the
// product is added to the accumulator modulo p (mac) or replaces it (had).
// The accumulator stays in place and ends up holding one entry of the result
// matrix.  clear zeroes the accumulator and the forwarded operands before a
// matrix product starts.
//
// Brent and Kung ask for a serial multiplier and a serial adder in each
// element, so that a multiply-add step in F_p takes area and time of order
// lg p; that is what this gives.  Feeding the bits one at a time with
// B-bit-wide additions, rather than a fully bit-serial pipeline, and
// reducing at every step rather than through a stored approximation of 1/p,
// are this design's choices.
//
// Timing: all outputs are registers updated at the rising edge of clk;
// a_out and b_out change in the first cycle of a beat, acc in the last;
// clear has priority over everything else.  first and last are both high
// when B = 1.
module fp_pe #(
  parameter int unsigned P = 193,
  parameter int unsigned B = $clog2(P)
) (
  input  logic         clk,
  input  logic         clear,
  input  logic         mac,
  input  logic         had,
  input  logic         first,   // first cycle of a beat
  input  logic         last,    // last cycle of a beat
  input  logic [B-1:0] a_in,
  input  logic [B-1:0] b_in,
  input  logic [B-1:0] x_dir,
  input  logic [B-1:0] y_dir,
  output logic [B-1:0] a_out,
  output logic [B-1:0] b_out,
  output logic [B-1:0] acc
);

  localparam logic [B:0] PW = (B+1)'(P);

  logic         run;
  logic [B-1:0] m_src, b_src;   // operands of this beat, in its first cycle
  logic [B-1:0] m_q, b_q;       // remaining multiplier bits, multiplicand
  logic [B-1:0] r_q, r_d;       // partial product mod p
  logic         bit_now;
  logic [B-1:0] mcand;
  logic [B:0]   dbl, add, sum;

  assign run   = mac || had;
  assign m_src = had ? x_dir : a_in;
  assign b_src = had ? y_dir : b_in;

  assign bit_now = first ? m_src[B-1] : m_q[B-1];
  assign mcand   = first ? b_src : b_q;

  // one Horner step: r_d = (2 * r + bit * mcand) mod p, starting from 0
  always_comb begin
    dbl = first ? '0 : {r_q, 1'b0};
    if (dbl >= PW) dbl = dbl - PW;
    add = dbl + (bit_now ? {1'b0, mcand} : '0);
    if (add >= PW) add = add - PW;
    r_d = add[B-1:0];
  end

  // serial adder's result: acc + r_d mod p
  always_comb begin
    sum = {1'b0, acc} + {1'b0, r_d};
    if (sum >= PW) sum = sum - PW;
  end

  always_ff @(posedge clk) begin
    if (clear) begin
      acc   <= '0;
      a_out <= '0;
      b_out <= '0;
      r_q   <= '0;
      m_q   <= '0;
      b_q   <= '0;
    end else if (run) begin
      r_q <= r_d;
      m_q <= (first ? m_src : m_q) << 1;
      if (first) begin
        b_q <= b_src;
        if (mac) begin
          a_out <= a_in;
          b_out <= b_in;
        end
      end
      if (last) acc <= had ? r_d : sum[B-1:0];
    end
  end

endmodule
