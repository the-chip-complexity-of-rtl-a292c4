// tb_bk_square: drives the square processor with random segment totals,
// first-segment marks and idle cycles, and checks that the value it sends
// out is always the combination of all earlier segments of the current
// addition ((0,1) for the first segment), using a reference that recomputes
// that combination from the stored history.
module tb_bk_square;
  import bk_pkg::*;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic rst_n, valid, first;
  gp_t  seg, bcast;
  int checks = 0, failures = 0;
  int restarts = 0;

  bk_square dut (.clk(clk), .rst_n(rst_n), .seg_valid(valid), .seg_first(first),
                 .seg_in(seg), .bcast_out(bcast));

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // segments of the current addition, most recent last
  gp_t hist[$];

  function automatic gp_t expected();
    logic g = 1'b0, p = 1'b1;
    // combine from the least significant segment upwards, ripple style
    foreach (hist[k]) begin
      g = hist[k].g | (hist[k].p & g);
      p = hist[k].p & p;
    end
    return '{g: g, p: p};
  endfunction

  initial begin
    rst_n = 1'b0; valid = 1'b0; first = 1'b0; seg = '0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;
    for (int n = 0; n < 1000; n++) begin
      @(negedge clk);
      valid = ($urandom_range(0, 4) != 0);
      first = valid && ($urandom_range(0, 5) == 0);
      seg   = gp_t'($urandom_range(0, 3));
      if (first) hist.delete();
      #1;
      checks++;
      if (bcast !== expected()) begin
        failures++;
        $display("cycle %0d: bcast=%b expected %b", n, bcast, expected());
      end
      if (valid) begin
        if (first) restarts++;
        hist.push_back(seg);
      end
    end
    checks++;
    if (restarts == 0) failures++;
    $display("restarts=%0d", restarts);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
