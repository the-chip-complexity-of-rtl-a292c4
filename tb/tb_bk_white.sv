// tb_bk_white: checks that the white processor hands on its (g, p) pair
// unchanged, exactly one clock cycle later, for a stream of random pairs.
module tb_bk_white;
  import bk_pkg::*;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  gp_t d, q;
  int checks = 0, failures = 0;

  bk_white dut (.clk(clk), .d_in(d), .q_out(q));

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    gp_t prev;
    d = '0;
    @(posedge clk);
    for (int n = 0; n < 200; n++) begin
      prev = d;
      @(negedge clk);
      // q must show what was sampled at the last rising edge
      checks++;
      if (q !== prev) begin
        failures++;
        $display("mismatch: q=%b expected %b", q, prev);
      end
      d = gp_t'($urandom_range(0, 3));
      @(posedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
