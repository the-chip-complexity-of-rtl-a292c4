// tb_bk_arith_top: end-to-end test of both units at their default sizes
// (adder W = 16, multiplier n = 64), running at the same time.
//
// Adder: random additions of 1 to 8 segments (16 to 128 bits), back to back
// or with idle cycles, checked against a + b on wide vectors, with the
// latency of each addition (first segment out 9 cycles after it went in,
// last segment n/W + 8 cycles after the first went in).
// Multiplier: random and extreme 32-bit operands, checked against a * b,
// with the number of cycles from start to done.
// Each mechanism is counted and a failure is counted for one that never
// occurred: one-segment and multi-segment additions, carries handed between
// segments by the square processor, restarts of the accumulation right
// after an addition, carries through a whole segment, carry out of the top
// bit, idle cycles; and in the multiplier matrix products and componentwise
// products on the systolic array, plane additions on its prefix adder and
// multiplications started straight after the previous one finished.
module tb_bk_arith_top;

  localparam int unsigned W = 16;
  localparam int unsigned L = $clog2(W);
  localparam int unsigned LAT = 2 * L + 1;
  localparam int unsigned MAXSEG = 8;
  localparam int unsigned NADD = 400;
  localparam int unsigned N = 64;
  localparam int unsigned K = 8;
  localparam int unsigned CB = $clog2(N / 2 + 1);
  localparam int unsigned B = 8;  // bits of p = 193, cycles per systolic beat
  localparam int unsigned MUL_CYCLES = (18 * K - 8) * B + 20 + (CB - 1) * (K + 2 * $clog2(K) + 1) + 3;
  localparam int unsigned NMUL = 30;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic rst_n, iv, ifst, ilst, ov, ofst, olst, cout;
  logic [W-1:0] a, b, s;
  logic mstart, mbusy, mdone;
  logic [N/2-1:0] ma, mb;
  logic [N-1:0] mp;
  int checks = 0, failures = 0;

  bk_arith_top dut (
    .clk(clk), .rst_n(rst_n),
    .add_in_valid(iv), .add_in_first(ifst), .add_in_last(ilst), .add_a(a), .add_b(b),
    .add_out_valid(ov), .add_out_first(ofst), .add_out_last(olst), .add_sum(s), .add_cout(cout),
    .mul_start(mstart), .mul_a(ma), .mul_b(mb), .mul_product(mp), .mul_busy(mbusy),
    .mul_done(mdone));

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  typedef logic [MAXSEG*W:0] wide_t;
  typedef struct {
    int    nseg;
    wide_t sum;
    wide_t carries;
    int    t_in_first;
  } add_t;
  add_t pending [$];

  int cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  int n_single = 0, n_multi = 0, n_cross = 0, n_restart = 0, n_ripple = 0;
  int n_cout = 0, n_idle = 0, n_done = 0;
  int n_matmul = 0, n_had = 0, n_plane = 0, n_b2b = 0, n_mul = 0;
  bit add_finished = 0, mul_finished = 0;

  // multiplier mechanisms, seen inside the unit
  always @(posedge clk) begin
    if (rst_n && dut.u_mul.u_array.done) begin
      if (dut.u_mul.cur.had) n_had++; else n_matmul++;
    end
    if (rst_n && dut.u_mul.add_ov && dut.u_mul.add_ol) n_plane++;
  end

  // ---------------- adder stimulus ----------------
  task automatic run_adder();
    wide_t opa, opb;
    int nseg, gap;
    logic prev_was_last = 1'b0;
    for (int k = 0; k < NADD; k++) begin
      add_t rec;
      nseg = (k % 4 == 0) ? 1 : int'($urandom_range(1, MAXSEG));
      opa = '0; opb = '0;
      for (int i = 0; i < nseg * W; i += 32) begin
        opa[i +: 32] = $urandom();
        opb[i +: 32] = $urandom();
      end
      if (k % 6 == 1) begin
        for (int i = 0; i < nseg * W; i++) opa[i] = 1'b1;
        opb = '0; opb[0] = 1'b1;
      end
      if (k % 6 == 2) for (int i = 0; i < nseg * W; i++) begin opa[i] = 1'b1; opb[i] = 1'b1; end
      for (int i = nseg * W; i <= MAXSEG * W; i++) begin opa[i] = 1'b0; opb[i] = 1'b0; end
      rec.nseg = nseg;
      rec.sum = opa + opb;
      rec.carries = rec.sum ^ opa ^ opb;
      rec.t_in_first = cyc;
      if (nseg == 1) n_single++; else n_multi++;
      if (prev_was_last) n_restart++;
      pending.push_back(rec);
      for (int sg = 0; sg < nseg; sg++) begin
        iv = 1'b1; ifst = (sg == 0); ilst = (sg == nseg - 1);
        a = opa[sg*W +: W]; b = opb[sg*W +: W];
        @(negedge clk);
      end
      iv = 1'b0; ifst = 1'b0; ilst = 1'b0;
      prev_was_last = 1'b1;
      if ($urandom_range(0, 3) == 0) begin
        gap = $urandom_range(1, 3);
        n_idle += gap;
        prev_was_last = 1'b0;
        repeat (gap) @(negedge clk);
      end
    end
    repeat (LAT + 4) @(negedge clk);
  endtask

  // ---------------- multiplier stimulus ----------------
  task automatic run_mul();
    int cycles;
    logic [N-1:0] expect_p;
    for (int n = 0; n < NMUL; n++) begin
      ma = $urandom(); mb = $urandom();
      if (n == 0) begin ma = '1; mb = '1; end
      if (n == 1) begin ma = '0; mb = 32'h1234_5678; end
      expect_p = {{(N/2){1'b0}}, ma} * {{(N/2){1'b0}}, mb};
      if (n % 2 == 1) n_b2b++;  // the previous one ended in the last cycle
      mstart = 1'b1;
      @(negedge clk);
      mstart = 1'b0;
      cycles = 1;
      while (!mdone && cycles < 20000) begin
        @(negedge clk);
        cycles++;
      end
      checks += 2;
      if (mp !== expect_p) begin
        failures++;
        $display("%h * %h: got %h expected %h", ma, mb, mp, expect_p);
      end
      if (cycles != MUL_CYCLES) begin
        failures++;
        $display("multiplication took %0d cycles, expected %0d", cycles, MUL_CYCLES);
      end
      n_mul++;
      if (n % 2 == 1) repeat ($urandom_range(1, 3)) @(negedge clk);
    end
  endtask

  initial begin
    rst_n = 1'b0; iv = 1'b0; ifst = 1'b0; ilst = 1'b0; a = '0; b = '0;
    mstart = 1'b0; ma = '0; mb = '0;
    repeat (3) @(posedge clk);
    @(negedge clk);
    rst_n = 1'b1;
    fork
      run_adder();
      run_mul();
    join
    checks++;
    if (n_done != NADD) begin
      failures++;
      $display("only %0d of %0d additions came out", n_done, NADD);
    end
    $display("adder: single=%0d multi=%0d cross_carry=%0d restart=%0d ripple=%0d cout=%0d idle=%0d",
             n_single, n_multi, n_cross, n_restart, n_ripple, n_cout, n_idle);
    $display("multiplier: products=%0d matmul=%0d componentwise=%0d plane_adds=%0d back_to_back=%0d",
             n_mul, n_matmul, n_had, n_plane, n_b2b);
    checks += 11;
    if (n_single == 0)  begin failures++; $display("no one-segment addition"); end
    if (n_multi == 0)   begin failures++; $display("no multi-segment addition"); end
    if (n_cross == 0)   begin failures++; $display("no carry between segments"); end
    if (n_restart == 0) begin failures++; $display("no back-to-back restart"); end
    if (n_ripple == 0)  begin failures++; $display("no full-segment ripple"); end
    if (n_cout == 0)    begin failures++; $display("no carry out"); end
    if (n_idle == 0)    begin failures++; $display("no idle cycle"); end
    if (n_matmul != 6 * NMUL) begin failures++; $display("matrix products: %0d", n_matmul); end
    if (n_had != 4 * NMUL)    begin failures++; $display("componentwise products: %0d", n_had); end
    if (n_plane != (CB - 1) * NMUL) begin failures++; $display("plane additions: %0d", n_plane); end
    if (n_b2b == 0)     begin failures++; $display("no back-to-back multiplication"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------- adder checker ----------------
  wide_t got;
  int    seg_i = 0;
  always @(negedge clk) begin
    if (rst_n && ov) begin
      add_t cur;
      cur = pending[0];
      if (ofst) begin
        checks++;
        if (cyc != cur.t_in_first + LAT) begin
          failures++;
          $display("latency: first segment out at %0d, in at %0d", cyc, cur.t_in_first);
        end
        seg_i = 0;
        got = '0;
      end
      if (seg_i > 0 && cur.carries[seg_i*W]) n_cross++;
      if (seg_i > 0 && cur.carries[seg_i*W] && s == '0 && cout) n_ripple++;
      got[seg_i*W +: W] = s;
      seg_i++;
      if (olst) begin
        got[seg_i*W] = cout;
        if (cout) n_cout++;
        checks += 2;
        if (seg_i != cur.nseg || got !== cur.sum) begin
          failures++;
          $display("addition %0d: got %h expected %h", n_done, got, cur.sum);
        end
        if (cyc - cur.t_in_first != cur.nseg + 2 * L) begin
          failures++;
          $display("addition %0d took %0d cycles", n_done, cyc - cur.t_in_first);
        end
        n_done++;
        void'(pending.pop_front());
      end
    end
  end
endmodule
