// bk_carry_network: the regular prefix network that computes every block
// carry (G_i, P_i), i = 1..W, of one W-bit segment.
//
// Columns are bit positions (column i holds bit i, i = 1 least significant;
// array index i-1).  Row T = 0 is a row of white processors holding the
// inputs (g_i, p_i).  Rows T = 1 .. lg W form a binary tree whose root, in
// column W at T = lg W, holds (G_W, P_W): at level t a black processor sits in
// every column i with i mod 2^t = 0 and combines its own column with column
// i - 2^(t-1).  Rows T = lg W + 1 .. 2 lg W - 1 run the same tree in the
// reverse order to fill in the remaining positions: with d = 2 lg W - T, a
// black processor sits in every column i with i mod 2^d = 2^(d-1) and
// i > 2^d, and combines with column i - 2^(d-1).  Every other cell is a
// white processor.  For W = 16 this is 7 levels above the input row, with
// black processors at T=1: 2,4,..,16; T=2: 4,8,12,16; T=3: 8,16; T=4: 16;
// T=5: 12; T=6: 6,10,14; T=7: 3,5,..,15.  Every processor has fan-out two
// (its own column and one column to the left), and the network has area
// proportional to W lg W.
//
// Timing: every row is a register stage.  gp_in is sampled by row 0 at a
// rising edge; gp_out (row 2 lg W - 1) shows the result 2 lg W
// cycles after gp_in was presented.  A new segment can be presented every
// cycle.  W must be a power of two and at least 2.
module bk_carry_network
  import bk_pkg::*;
#(
  parameter int unsigned W = 16
) (
  input  logic      clk,
  input  gp_t [W-1:0] gp_in,
  output gp_t [W-1:0] gp_out,
  // (G_W, P_W) of the segment, at row lg W, lg W + 1 cycles after the input
  output gp_t         total_out
);

  localparam int unsigned L = $clog2(W);
  localparam int unsigned ROWS = 2 * L;  // rows 0 .. 2L-1

  gp_t [W-1:0] row [ROWS];

  // row 0: input registers
  for (genvar i = 0; i < W; i++) begin : g_in_row
    bk_white u_w (.clk(clk), .d_in(gp_in[i]), .q_out(row[0][i]));
  end

  for (genvar t = 1; t < ROWS; t++) begin : g_row
    for (genvar c = 1; c <= W; c++) begin : g_col
      // position and partner of the black processor in column c at level t
      localparam int unsigned D = (t <= L) ? 0 : (2 * L - t);
      localparam bit UP_BLACK = (t <= L) && ((c % (1 << t)) == 0);
      localparam bit DN_BLACK = (t > L) && ((c % (1 << D)) == (1 << (D - 1))) && (c > (1 << D));
      localparam int unsigned STRIDE = (t <= L) ? (1 << (t - 1)) : (1 << (D - 1));
      if (UP_BLACK || DN_BLACK) begin : g_black
        bk_black u_b (.clk(clk), .d_in(row[t-1][c-1]), .d_lo(row[t-1][c-1-STRIDE]),
                      .q_out(row[t][c-1]));
      end else begin : g_white
        bk_white u_w (.clk(clk), .d_in(row[t-1][c-1]), .q_out(row[t][c-1]));
      end
    end
  end

  assign gp_out    = row[ROWS-1];
  assign total_out = row[L][W-1];

  initial begin
    assert (W >= 2 && (1 << L) == W)
      else $error("bk_carry_network: W must be a power of two, at least 2");
  end

endmodule
