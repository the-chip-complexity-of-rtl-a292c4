// tb_bk_carry_network: streams random (g, p) segments into the carry
// network, one per cycle, and checks every (G_i, P_i) at the top and the
// segment total against a serial (ripple) evaluation of the carry
// recurrence.  Also checks the latencies: 2 lg W cycles to the top row and
// lg W + 1 cycles to the total.
module tb_bk_carry_network;
  import bk_pkg::*;

  localparam int unsigned W = 16;
  localparam int unsigned L = $clog2(W);

  logic clk = 1'b0;
  always #5 clk = ~clk;

  gp_t [W-1:0] gp_in, gp_out;
  gp_t total;
  int checks = 0, failures = 0;

  bk_carry_network #(.W(W)) dut (.clk(clk), .gp_in(gp_in), .gp_out(gp_out), .total_out(total));

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic gp_t [W-1:0] ripple(gp_t [W-1:0] x);
    gp_t [W-1:0] r;
    logic g = 1'b0, p = 1'b1;
    for (int i = 0; i < W; i++) begin
      g = x[i].g | (x[i].p & g);
      p = x[i].p & p;
      r[i] = '{g: g, p: p};
    end
    return r;
  endfunction

  gp_t [W-1:0] sent [$];
  int cycle = 0;

  initial begin
    gp_in = '0;
    for (int n = 0; n < 600; n++) begin
      @(negedge clk);
      for (int i = 0; i < W; i++) gp_in[i] = gp_t'($urandom_range(0, 3));
      // some segments with long propagate runs
      if (n % 7 == 0) for (int i = 0; i < W; i++) gp_in[i] = (i == 0) ? gp_t'(2'b10) : gp_t'(2'b01);
      sent.push_back(gp_in);
      #1;
      // segment presented 2L cycles ago must be on top now
      if (n >= 2 * L) begin
        checks++;
        if (gp_out !== ripple(sent[n - 2*L])) begin
          failures++;
          $display("segment %0d: top row mismatch", n - 2*L);
        end
      end
      if (n >= L + 1) begin
        checks++;
        if (total !== ripple(sent[n - L - 1])[W-1]) begin
          failures++;
          $display("segment %0d: total mismatch", n - L - 1);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
