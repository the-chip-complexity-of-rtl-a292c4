// tb_bk_adder: end-to-end test of the pipelined adder at its default width
// (W = 16).  It adds random n-bit numbers, n = W .. 8W, streaming their
// segments least significant first, back to back or with idle cycles, and
// compares the reassembled (n+1)-bit sum with a + b computed on wide
// vectors.  It checks that every segment comes out 2 lg W + 1 cycles after
// it went in, and that an n-bit addition needs n/W + 2 lg W cycles.
// It counts the mechanisms of the design and fails if one never occurred:
// one-segment additions (W = n), multi-segment additions, a carry handed
// from one segment to the next through the square processor, a restart of
// the square processor right after another addition, a carry rippling
// through a whole segment of propagates, a carry out of the top bit, idle
// cycles in the stream.
module tb_bk_adder;

  localparam int unsigned W = 16;
  localparam int unsigned L = $clog2(W);
  localparam int unsigned LAT = 2 * L + 1;
  localparam int unsigned MAXSEG = 8;
  localparam int unsigned NADD = 600;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic rst_n, iv, ifst, ilst, ov, ofst, olst, cout;
  logic [W-1:0] a, b, s;
  int checks = 0, failures = 0;

  bk_adder dut (
    .clk(clk), .rst_n(rst_n), .in_valid(iv), .in_first(ifst), .in_last(ilst),
    .a_in(a), .b_in(b), .out_valid(ov), .out_first(ofst), .out_last(olst),
    .sum_out(s), .cout_out(cout));

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  typedef logic [MAXSEG*W:0] wide_t;
  typedef struct {
    int          nseg;
    wide_t       sum;
    wide_t       carries;  // carry into every bit position
    int          t_in_first;
  } add_t;
  add_t pending [$];

  int cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  // mechanism counters
  int n_single = 0, n_multi = 0, n_cross = 0, n_restart = 0, n_ripple = 0;
  int n_cout = 0, n_idle = 0, n_done = 0;

  // ---------------- stimulus ----------------
  initial begin
    wide_t opa, opb;
    int nseg;
    logic prev_was_last;
    rst_n = 1'b0; iv = 1'b0; ifst = 1'b0; ilst = 1'b0; a = '0; b = '0;
    prev_was_last = 1'b0;
    repeat (3) @(posedge clk);
    @(negedge clk);
    rst_n = 1'b1;
    for (int k = 0; k < NADD; k++) begin
      add_t rec;
      nseg = (k % 4 == 0) ? 1 : int'($urandom_range(1, MAXSEG));
      opa = '0; opb = '0;
      for (int i = 0; i < nseg * W; i += 32) begin
        opa[i +: 32] = $urandom();
        opb[i +: 32] = $urandom();
      end
      case (k % 6)
        1: begin  // a carry rippling through all bits: all ones plus one
          for (int i = 0; i < nseg * W; i++) opa[i] = 1'b1;
          opb = '0; opb[0] = 1'b1;
        end
        2: begin  // all ones plus all ones
          for (int i = 0; i < nseg * W; i++) begin opa[i] = 1'b1; opb[i] = 1'b1; end
        end
        default: ;
      endcase
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
        int gap;
        gap = $urandom_range(1, 3);
        n_idle += gap;
        prev_was_last = 1'b0;
        repeat (gap) @(negedge clk);
      end
    end
    // drain
    repeat (LAT + 4) @(negedge clk);
    checks++;
    if (n_done != NADD) begin
      failures++;
      $display("only %0d of %0d additions came out", n_done, NADD);
    end
    $display("single=%0d multi=%0d cross_carry=%0d restart=%0d ripple=%0d cout=%0d idle=%0d",
             n_single, n_multi, n_cross, n_restart, n_ripple, n_cout, n_idle);
    checks += 7;
    if (n_single == 0)  begin failures++; $display("no one-segment addition"); end
    if (n_multi == 0)   begin failures++; $display("no multi-segment addition"); end
    if (n_cross == 0)   begin failures++; $display("no carry between segments"); end
    if (n_restart == 0) begin failures++; $display("no back-to-back restart"); end
    if (n_ripple == 0)  begin failures++; $display("no full-segment ripple"); end
    if (n_cout == 0)    begin failures++; $display("no carry out"); end
    if (n_idle == 0)    begin failures++; $display("no idle cycle"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------- checker ----------------
  wide_t got;
  int    seg_i = 0;
  always @(negedge clk) begin
    if (rst_n && ov) begin
      add_t cur;
      cur = pending[0];
      if (ofst) begin
        checks++;
        // first segment enters at the edge after t_in_first, leaves LAT-1 edges later
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
        checks++;
        if (seg_i != cur.nseg || got !== cur.sum) begin
          failures++;
          $display("addition %0d (%0d segments): got %h expected %h", n_done, cur.nseg, got, cur.sum);
        end
        // n/W + 2 lg W cycles from first segment in to last segment out
        checks++;
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
