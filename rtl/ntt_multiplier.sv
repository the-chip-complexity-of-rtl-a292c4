// ntt_multiplier: integer multiplier that forms the product through a
// discrete Fourier transform over the finite field F_p.
//
// The n input bits of each operand (only the lower n/2 may be non-zero, so
// the n-bit product never wraps) are arranged as K x K matrices A and B,
// K = sqrt(n), A[i][j] = a bit i*K + j.  With p the smallest prime n*q + 1, u
// an element of order n in F_p and w = u^K, the transform of A is
// A''' = ((W A) o U) W, where W[i][j] = w^(i*j), U[i][j] = u^(i*j) and o is the
// componentwise product; A'''[i][j] is the transform coefficient of index
// j*K + i.  So one n-point transform is two K x K matrix products and one
// componentwise product.  The transforms of A and B are multiplied
// componentwise, and the inverse transform C = W^-1 ((C''' W^-1) o U') with
// U'[i][j] = u^-(i*j) and W^-1 = (1/K) [w^-(i*j)] gives the convolution
// c_m = sum of a_i * b_(m-i), exact because c_m <= n/2 < p.  The product is
// sum c_m 2^m.  All matrix steps run one after the other on a single
// fp_systolic_array; the constant matrices are worked out at elaboration.
// The transform layout and the six steps follow Brent and Kung's multiplier;
// sharing one array for all steps, the bit-plane form of the final sum and the default n = 64 are this design's
// own choices.
//
// The final sum: each c_m has CB = clog2(n/2 + 1) bits; bit plane t of the
// c's, X_t = sum (bit t of c_m) 2^(m+t), is an n-bit number, and the product
// is X_0 + ... + X_(CB-1).  The planes are added one after the other on the
// prefix adder (bk_adder) of width K, K product bits per cycle.
//
// N must be a perfect square, as the transform is laid out as a K x K
// matrix, and here K must also be a power of two (4, 16, 64, 256, ...)
// because the prefix adder is.
//
// Interface: start (one cycle, while idle) takes a_in and b_in; busy is high
// until done pulses for one cycle with the product on product_out, which
// then holds it until the next start.  Timing, with B = ceil(lg p) cycles
// per systolic beat: 10 array operations (6 products of 1 + (3K - 2) B
// cycles, 4 componentwise of 1 + B cycles, plus one cycle each to issue),
// then CB - 1 plane additions of K + 2 lg K + 1 cycles each, and 3 cycles of
// start, first plane and finish: 1186 cycles from start to done for n = 64
// (K = 8, B = 8).
// rst_n: synchronous, active low.
module ntt_multiplier
  import ntt_pkg::*;
#(
  parameter int unsigned N = 64,
  parameter int unsigned P = ntt_prime(N),
  parameter int unsigned U = ntt_root(N, P)
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             start,
  input  logic [N/2-1:0]   a_in,
  input  logic [N/2-1:0]   b_in,
  output logic [N-1:0]     product_out,
  output logic             busy,
  output logic             done
);

  localparam int unsigned K  = isqrt(N);
  localparam int unsigned B  = $clog2(P);
  localparam int unsigned CB = $clog2(N / 2 + 1);
  localparam int unsigned WR = pow_mod(U, K, P);  // w = u^K, order K

  typedef logic [K-1:0][K-1:0][B-1:0] mat_t;

  // M[i][j] = scale * base^(i*j) mod P
  function automatic mat_t pow_matrix(int unsigned base, int unsigned scale);
    mat_t m;
    for (int i = 0; i < K; i++)
      for (int j = 0; j < K; j++)
        m[i][j] = B'((longint'(scale) * pow_mod(base, i * j, P)) % P);
    return m;
  endfunction

  localparam mat_t MAT_W  = pow_matrix(WR, 1);
  localparam mat_t MAT_WI = pow_matrix(inv_mod(WR, P), inv_mod(K, P));
  localparam mat_t MAT_U  = pow_matrix(U, 1);
  localparam mat_t MAT_UI = pow_matrix(inv_mod(U, P), 1);

  // ---------------------------------------------------------------- program
  typedef enum logic [1:0] {X_W, X_WI, X_RA, X_RB} xsel_t;
  typedef enum logic [2:0] {Y_RA, Y_RB, Y_W, Y_WI, Y_U, Y_UI} ysel_t;
  typedef struct packed {
    logic  had;     // componentwise product
    xsel_t xsel;
    ysel_t ysel;
    logic  to_rb;   // result goes to RB (else RA)
  } step_t;

  localparam int unsigned NSTEPS = 10;
  localparam step_t PROGRAM [NSTEPS] = '{
    '{had: 1'b0, xsel: X_W,  ysel: Y_RA, to_rb: 1'b0},  // A'   = W A
    '{had: 1'b1, xsel: X_RA, ysel: Y_U,  to_rb: 1'b0},  // A''  = A' o U
    '{had: 1'b0, xsel: X_RA, ysel: Y_W,  to_rb: 1'b0},  // A''' = A'' W
    '{had: 1'b0, xsel: X_W,  ysel: Y_RB, to_rb: 1'b1},  // B'   = W B
    '{had: 1'b1, xsel: X_RB, ysel: Y_U,  to_rb: 1'b1},  // B''  = B' o U
    '{had: 1'b0, xsel: X_RB, ysel: Y_W,  to_rb: 1'b1},  // B''' = B'' W
    '{had: 1'b1, xsel: X_RA, ysel: Y_RB, to_rb: 1'b0},  // C''' = A''' o B'''
    '{had: 1'b0, xsel: X_RA, ysel: Y_WI, to_rb: 1'b0},  // C''' W^-1
    '{had: 1'b1, xsel: X_RA, ysel: Y_UI, to_rb: 1'b0},  // U' o (...)
    '{had: 1'b0, xsel: X_WI, ysel: Y_RA, to_rb: 1'b0}   // C = W^-1 (...)
  };

  typedef enum logic [2:0] {S_IDLE, S_ISSUE, S_WAIT, S_ADD, S_ADD_WAIT, S_DONE} state_t;
  state_t state_q;

  mat_t ra_q, rb_q;
  logic [$clog2(NSTEPS)-1:0] step_q;
  step_t cur;
  assign cur = PROGRAM[step_q];

  // ---------------------------------------------------------------- array
  mat_t arr_x, arr_y, arr_z;
  logic arr_start, arr_busy, arr_done;

  always_comb begin
    unique case (cur.xsel)
      X_W:     arr_x = MAT_W;
      X_WI:    arr_x = MAT_WI;
      X_RA:    arr_x = ra_q;
      default: arr_x = rb_q;
    endcase
    unique case (cur.ysel)
      Y_RA:    arr_y = ra_q;
      Y_RB:    arr_y = rb_q;
      Y_W:     arr_y = MAT_W;
      Y_WI:    arr_y = MAT_WI;
      Y_U:     arr_y = MAT_U;
      default: arr_y = MAT_UI;
    endcase
  end

  assign arr_start = (state_q == S_ISSUE);

  fp_systolic_array #(.K(K), .P(P), .B(B)) u_array (
    .clk   (clk),
    .rst_n (rst_n),
    .start (arr_start),
    .op_had(cur.had),
    .x     (arr_x),
    .y     (arr_y),
    .z     (arr_z),
    .busy  (arr_busy),
    .done  (arr_done)
  );

  // ---------------------------------------------------------------- final sum
  // bit plane t of the convolution: X_t[i*K + j + t] = bit t of C[i][j]
  function automatic logic [N-1:0] plane(mat_t c, int t);
    logic [N-1:0] x = '0;
    for (int i = 0; i < K; i++)
      for (int j = 0; j < K; j++)
        if (i * K + j + t < N) x[i * K + j + t] = c[i][j][t];
    return x;
  endfunction

  logic [N-1:0]               acc_q;     // running sum of planes
  logic [$clog2(CB+1)-1:0]    plane_q;   // plane being added
  logic [$clog2(K+1)-1:0]     seg_in_q;  // next segment to send
  logic [$clog2(K+1)-1:0]     seg_out_q; // next segment to receive
  logic [N-1:0]               addend;

  assign addend = plane(ra_q, int'(plane_q));

  logic         add_iv, add_if, add_il, add_ov, add_of, add_ol, add_cout;
  logic [K-1:0] add_a, add_b, add_s;

  assign add_iv = (state_q == S_ADD);
  assign add_if = (seg_in_q == '0);
  assign add_il = (seg_in_q == $bits(seg_in_q)'(K - 1));
  assign add_a  = acc_q[int'(seg_in_q) * K +: K];
  assign add_b  = addend[int'(seg_in_q) * K +: K];

  bk_adder #(.W(K)) u_adder (
    .clk      (clk),
    .rst_n    (rst_n),
    .in_valid (add_iv),
    .in_first (add_if),
    .in_last  (add_il),
    .a_in     (add_a),
    .b_in     (add_b),
    .out_valid(add_ov),
    .out_first(add_of),
    .out_last (add_ol),
    .sum_out  (add_s),
    .cout_out (add_cout)
  );

  // ---------------------------------------------------------------- control
  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state_q   <= S_IDLE;
      step_q    <= '0;
      plane_q   <= '0;
      seg_in_q  <= '0;
      seg_out_q <= '0;
      done      <= 1'b0;
    end else begin
      done <= 1'b0;
      unique case (state_q)
        S_IDLE: if (start) begin
          for (int i = 0; i < K; i++)
            for (int j = 0; j < K; j++) begin
              ra_q[i][j] <= B'((i * K + j < N / 2) ? a_in[(i * K + j) % (N / 2)] : 1'b0);
              rb_q[i][j] <= B'((i * K + j < N / 2) ? b_in[(i * K + j) % (N / 2)] : 1'b0);
            end
          step_q  <= '0;
          state_q <= S_ISSUE;
        end
        S_ISSUE: state_q <= S_WAIT;
        S_WAIT: if (arr_done) begin
          if (cur.to_rb) rb_q <= arr_z;
          else           ra_q <= arr_z;
          if (step_q == $bits(step_q)'(NSTEPS - 1)) begin
            state_q <= S_ADD_WAIT;  // first plane is loaded below
            plane_q <= '0;
          end else begin
            step_q  <= step_q + 1'b1;
            state_q <= S_ISSUE;
          end
        end
        S_ADD: begin
          // one segment of acc + plane per cycle
          seg_in_q <= seg_in_q + 1'b1;
          if (seg_in_q == $bits(seg_in_q)'(K - 1)) state_q <= S_ADD_WAIT;
        end
        S_ADD_WAIT: begin
          if (plane_q == '0) begin
            // the first plane needs no addition
            acc_q     <= addend;
            plane_q   <= 1;
            seg_in_q  <= '0;
            seg_out_q <= '0;
            state_q   <= (CB > 1) ? S_ADD : S_DONE;
          end else if (add_ov && add_ol) begin
            if (plane_q == $bits(plane_q)'(CB - 1)) begin
              state_q <= S_DONE;
            end else begin
              plane_q  <= plane_q + 1'b1;
              seg_in_q <= '0;
              state_q  <= S_ADD;
            end
            seg_out_q <= '0;
          end
        end
        S_DONE: begin
          done    <= 1'b1;
          state_q <= S_IDLE;
        end
        default: state_q <= S_IDLE;
      endcase
      // sum segments come back in order and overwrite the accumulator
      if (add_ov) begin
        acc_q[int'(seg_out_q) * K +: K] <= add_s;
        seg_out_q <= add_ol ? '0 : seg_out_q + 1'b1;
      end
    end
  end

  initial begin
    assert (K * K == N && K >= 2 && (1 << $clog2(K)) == K)
      else $error("ntt_multiplier: N must be the square of a power of two (the final adder is K bits wide)");
  end

  // the array is only started when idle; sum segments come back in order;
  // the partial sums never exceed the product, so no plane addition carries
  // out of the top segment
  always_ff @(posedge clk) begin
    if (rst_n) begin
      assert (!(arr_start && arr_busy)) else $error("array started while busy");
      assert (!(add_ov && add_of) || seg_out_q == '0) else $error("sum segments out of order");
      assert (!(add_ov && add_ol) || !add_cout) else $error("plane addition overflowed");
    end
  end

  assign busy        = (state_q != S_IDLE);
  assign product_out = acc_q;

endmodule
