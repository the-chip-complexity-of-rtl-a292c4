// tb_bk_pipelined_carry: feeds random (g, p) vectors of additions of 1 to 6
// segments through the pipelined carry unit, back to back and with idle
// cycles, and compares every carry with a serial evaluation of the carry
// recurrence over the whole operand.  Also checks the latency of
// 2 lg W + 1 cycles and the carry into each segment.
module tb_bk_pipelined_carry;
  import bk_pkg::*;

  localparam int unsigned W = 16;
  localparam int unsigned L = $clog2(W);
  localparam int unsigned LAT = 2 * L + 1;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic rst_n, v, f, l, ov, of, ol, cin;
  gp_t [W-1:0] gp;
  logic [W-1:0] carry;
  int checks = 0, failures = 0;
  int cross_carries = 0;

  bk_pipelined_carry #(.W(W)) dut (
    .clk(clk), .rst_n(rst_n), .seg_valid(v), .seg_first(f), .seg_last(l), .gp_in(gp),
    .out_valid(ov), .out_first(of), .out_last(ol), .carry_out(carry), .seg_cin(cin));

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  typedef struct {
    logic valid, first, last;
    logic [W-1:0] carries;
    logic cin;
  } exp_t;
  exp_t expq [$];

  initial begin
    automatic int segs_left = 0;
    automatic logic c_run = 1'b0;
    rst_n = 1'b0; v = 1'b0; f = 1'b0; l = 1'b0; gp = '0;
    repeat (3) @(posedge clk);
    for (int n = 0; n < 3000; n++) begin
      exp_t e;
      @(negedge clk);
      rst_n = 1'b1;
      if (segs_left == 0 && $urandom_range(0, 3) == 0) begin
        v = 1'b0; f = 1'b0; l = 1'b0;
      end else begin
        v = 1'b1;
        f = (segs_left == 0);
        if (segs_left == 0) segs_left = $urandom_range(1, 6);
        l = (segs_left == 1);
        segs_left--;
      end
      for (int i = 0; i < W; i++) gp[i] = gp_t'($urandom_range(0, 3));
      if (n % 5 == 0) for (int i = 0; i < W; i++) gp[i] = gp_t'(2'b01);
      // serial reference
      if (f) c_run = 1'b0;
      e.valid = v; e.first = f; e.last = l; e.cin = c_run;
      for (int i = 0; i < W; i++) begin
        c_run = gp[i].g | (gp[i].p & c_run);
        e.carries[i] = c_run;
      end
      if (!v) c_run = e.cin;
      expq.push_back(e);
      #1;
      if (n >= LAT) begin
        exp_t x;
        x = expq[n - LAT];
        checks++;
        if (ov !== x.valid || (x.valid && (of !== x.first || ol !== x.last))) begin
          failures++;
          $display("cycle %0d: flags mismatch", n);
        end
        if (x.valid) begin
          checks++;
          if (carry !== x.carries || cin !== x.cin) begin
            failures++;
            $display("cycle %0d: carries %h/%b expected %h/%b", n, carry, cin, x.carries, x.cin);
          end
          if (!x.first && x.cin) cross_carries++;
        end
      end
    end
    checks++;
    if (cross_carries == 0) failures++;
    $display("carries across segments: %0d", cross_carries);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
