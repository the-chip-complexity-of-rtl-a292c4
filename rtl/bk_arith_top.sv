// bk_arith_top: the two arithmetic units side by side.
//
// Left: the pipelined prefix adder (bk_adder), which adds n-bit numbers
// W = 16 bits per cycle, least significant segment first, and returns each
// sum segment 2 lg W + 1 = 9 cycles later.  Right: the transform multiplier
// (ntt_multiplier), which multiplies two n/2-bit numbers (n = 64) through a
// discrete Fourier transform over F_p computed on a K x K systolic array and
// adds up the result on its own prefix adder of width K = sqrt(n).  The two
// units share only clock and reset; their ports are brought out unchanged
// with the prefixes add_ and mul_.  See the two units for interface timing.
module bk_arith_top #(
  parameter int unsigned W = 16,
  parameter int unsigned N = 64
) (
  input  logic           clk,
  input  logic           rst_n,
  // adder
  input  logic           add_in_valid,
  input  logic           add_in_first,
  input  logic           add_in_last,
  input  logic [W-1:0]   add_a,
  input  logic [W-1:0]   add_b,
  output logic           add_out_valid,
  output logic           add_out_first,
  output logic           add_out_last,
  output logic [W-1:0]   add_sum,
  output logic           add_cout,
  // multiplier
  input  logic           mul_start,
  input  logic [N/2-1:0] mul_a,
  input  logic [N/2-1:0] mul_b,
  output logic [N-1:0]   mul_product,
  output logic           mul_busy,
  output logic           mul_done
);

  bk_adder #(.W(W)) u_add (
    .clk      (clk),
    .rst_n    (rst_n),
    .in_valid (add_in_valid),
    .in_first (add_in_first),
    .in_last  (add_in_last),
    .a_in     (add_a),
    .b_in     (add_b),
    .out_valid(add_out_valid),
    .out_first(add_out_first),
    .out_last (add_out_last),
    .sum_out  (add_sum),
    .cout_out (add_cout)
  );

  ntt_multiplier #(.N(N)) u_mul (
    .clk        (clk),
    .rst_n      (rst_n),
    .start      (mul_start),
    .a_in       (mul_a),
    .b_in       (mul_b),
    .product_out(mul_product),
    .busy       (mul_busy),
    .done       (mul_done)
  );

endmodule
