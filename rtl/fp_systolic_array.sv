// fp_systolic_array: K x K systolic array computing a product of two K x K
// matrices over F_p, or their componentwise product.
//
// Matrix product Z = X * Y: row i of X enters the left edge of array row i,
// skewed by i cycles, and column j of Y enters the top of array column j,
// skewed by j beats; X entries move right, Y entries move down, one element
// per beat, and element (i, j) meets X[i][s] and Y[s][j] at beat i + j + s
// and accumulates their product (fp_pe).  A beat is B = ceil(lg p) clock
// cycles, the time an element takes for one serial multiply-add.  The skew is produced here from
// the two whole matrices, which must stay stable while the array runs.
// Componentwise product Z = X o Y: every element multiplies its own two
// entries in one beat.  Brent and Kung use the hexagonal systolic array of
// Kung and Leiserson for these products; the square output-stationary mesh
// here, and doing the componentwise products on it too, are this design's
// choices (same number of elements, time proportional to K).
//
// Interface: a one-cycle start with op selects the operation; busy is high
// while it runs; done pulses for one cycle when z is ready, and z holds the
// result until the next start.  Timing: a matrix product takes
// 1 + (3K - 2) B cycles from start to done (one clearing cycle, 3K - 2 beats
// of data), a componentwise product 1 + B cycles (185 and 9 for K = 8,
// p = 193).  rst_n: synchronous, active low.
module fp_systolic_array #(
  parameter int unsigned K = 8,
  parameter int unsigned P = 193,
  parameter int unsigned B = $clog2(P)
) (
  input  logic                           clk,
  input  logic                           rst_n,
  input  logic                           start,
  input  logic                           op_had,  // 0: matrix product, 1: componentwise
  input  logic [K-1:0][K-1:0][B-1:0]     x,
  input  logic [K-1:0][K-1:0][B-1:0]     y,
  output logic [K-1:0][K-1:0][B-1:0]     z,
  output logic                           busy,
  output logic                           done
);

  typedef enum logic [1:0] {S_IDLE, S_MAC, S_HAD} state_t;
  state_t state_q;
  logic [$clog2(3*K)-1:0] t_q;                 // beat
  logic [(B > 1 ? $clog2(B) : 1)-1:0] ph_q;    // cycle within the beat

  logic clear, mac, had, first, last;
  assign clear = (state_q == S_IDLE) && start && !op_had;
  assign mac   = (state_q == S_MAC);
  assign had   = (state_q == S_HAD);
  assign busy  = (state_q != S_IDLE);
  assign first = (ph_q == '0);
  assign last  = (ph_q == $bits(ph_q)'(B-1));

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state_q <= S_IDLE;
      t_q     <= '0;
      ph_q    <= '0;
      done    <= 1'b0;
    end else begin
      done <= 1'b0;
      unique case (state_q)
        S_IDLE: if (start) begin
          state_q <= op_had ? S_HAD : S_MAC;
          t_q     <= '0;
          ph_q    <= '0;
        end
        S_MAC: begin
          ph_q <= last ? '0 : ph_q + 1'b1;
          if (last) begin
            if (t_q == $bits(t_q)'(3*K-3)) begin
              state_q <= S_IDLE;
              done    <= 1'b1;
            end
            t_q <= t_q + 1'b1;
          end
        end
        S_HAD: begin
          ph_q <= last ? '0 : ph_q + 1'b1;
          if (last) begin
            state_q <= S_IDLE;
            done    <= 1'b1;
          end
        end
        default: state_q <= S_IDLE;
      endcase
    end
  end

  // skewed edge feeds: row i gets X[i][t-i], column j gets Y[t-j][j]
  logic [K-1:0][B-1:0] feed_a, feed_b;
  always_comb begin
    for (int i = 0; i < K; i++) begin
      feed_a[i] = '0;
      feed_b[i] = '0;
      for (int s = 0; s < K; s++) begin
        if (mac && int'(t_q) == i + s) begin
          feed_a[i] = x[i][s];
          feed_b[i] = y[s][i];
        end
      end
    end
  end

  // a_h[i][j]: operand entering element (i,j) from the left; b_v[i][j] from above
  logic [K-1:0][K:0][B-1:0] a_h;
  logic [K:0][K-1:0][B-1:0] b_v;

  for (genvar i = 0; i < K; i++) begin : g_edge
    assign a_h[i][0] = feed_a[i];
    assign b_v[0][i] = feed_b[i];
  end

  for (genvar i = 0; i < K; i++) begin : g_row
    for (genvar j = 0; j < K; j++) begin : g_col
      fp_pe #(.P(P), .B(B)) u_pe (
        .clk  (clk),
        .clear(clear),
        .mac  (mac),
        .had  (had),
        .first(first),
        .last (last),
        .a_in (a_h[i][j]),
        .b_in (b_v[i][j]),
        .x_dir(x[i][j]),
        .y_dir(y[i][j]),
        .a_out(a_h[i][j+1]),
        .b_out(b_v[i+1][j]),
        .acc  (z[i][j])
      );
    end
  end

endmodule
