// tb_bk_broadcast_tree: checks that every leaf of the broadcast tree shows
// the root value of lg W - 1 cycles earlier, for a random stream of pairs.
module tb_bk_broadcast_tree;
  import bk_pkg::*;

  localparam int unsigned W = 16;
  localparam int unsigned L = $clog2(W);

  logic clk = 1'b0;
  always #5 clk = ~clk;

  gp_t root;
  gp_t [W-1:0] leaves;
  int checks = 0, failures = 0;

  bk_broadcast_tree #(.W(W)) dut (.clk(clk), .root_in(root), .leaf_out(leaves));

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  gp_t sent [$];

  initial begin
    root = '0;
    for (int n = 0; n < 400; n++) begin
      @(negedge clk);
      root = gp_t'($urandom_range(0, 3));
      sent.push_back(root);
      #1;
      if (n >= L - 1) begin
        for (int j = 0; j < W; j++) begin
          checks++;
          if (leaves[j] !== sent[n - (L - 1)]) begin
            failures++;
            $display("cycle %0d leaf %0d: %b expected %b", n, j, leaves[j], sent[n - (L - 1)]);
          end
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
