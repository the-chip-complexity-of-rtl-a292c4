// tb_bk_black: checks the black processor against the truth table of the
// carry operator for all 16 input combinations, and that the result is
// registered (visible one cycle after the inputs were sampled).
module tb_bk_black;
  import bk_pkg::*;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  gp_t d_in, d_lo, q;
  int checks = 0, failures = 0;

  bk_black dut (.clk(clk), .d_in(d_in), .d_lo(d_lo), .q_out(q));

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // expected g: a carry leaves the pair if the high half generates one, or
  // propagates one generated by the low half
  function automatic logic exp_g(logic gh, logic ph, logic gl);
    if (gh) return 1'b1;
    if (ph && gl) return 1'b1;
    return 1'b0;
  endfunction

  initial begin
    for (int r = 0; r < 3; r++) begin
      for (int v = 0; v < 16; v++) begin
        @(negedge clk);
        d_in = gp_t'(v[3:2]);
        d_lo = gp_t'(v[1:0]);
        @(posedge clk);
        #1;
        checks++;
        if (q.g !== exp_g(v[3], v[2], v[1]) || q.p !== (v[2] && v[0])) begin
          failures++;
          $display("mismatch for in=%b lo=%b: got %b", v[3:2], v[1:0], q);
        end
        // held value must not change before the next edge
        d_in = ~d_in;
        #1;
        checks++;
        if (q.g !== exp_g(v[3], v[2], v[1])) begin
          failures++;
          $display("output not registered");
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
