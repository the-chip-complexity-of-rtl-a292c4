// tb_fp_systolic_array: multiplies random K x K matrices over F_p (K = 8,
// p = 193) on the systolic array, both as matrix products and
// componentwise, and compares every entry with a product worked out in the
// testbench.  Checks the cycle counts: 1 + (3K - 2) B cycles from start to
// done for a matrix product, 1 + B for a componentwise product, where a
// beat of B = ceil(lg p) cycles is one serial multiply-add.
module tb_fp_systolic_array;
  localparam int unsigned K = 8;
  localparam int unsigned P = 193;
  localparam int unsigned B = $clog2(P);

  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic rst_n, start, op_had, busy, done;
  logic [K-1:0][K-1:0][B-1:0] x, y, z;
  int checks = 0, failures = 0;

  fp_systolic_array dut (.clk(clk), .rst_n(rst_n), .start(start), .op_had(op_had),
                         .x(x), .y(y), .z(z), .busy(busy), .done(done));

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    automatic int n_mm = 0, n_had = 0;
    rst_n = 1'b0; start = 1'b0; op_had = 1'b0; x = '0; y = '0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int n = 0; n < 200; n++) begin
      int cycles, e;
      for (int i = 0; i < K; i++)
        for (int j = 0; j < K; j++) begin
          x[i][j] = B'($urandom_range(0, P - 1));
          y[i][j] = B'($urandom_range(0, P - 1));
        end
      if (n % 10 == 0) x = '0;  // reuse after an all-zero product
      op_had = (n % 3 == 2);
      start = 1'b1;
      @(negedge clk);
      start = 1'b0;
      cycles = 1;
      while (!done && cycles < 1000) begin
        @(negedge clk);
        cycles++;
      end
      checks++;
      if (cycles != (op_had ? 1 + B : 1 + (3 * K - 2) * B)) begin
        failures++;
        $display("op %0d: %0d cycles", n, cycles);
      end
      for (int i = 0; i < K; i++)
        for (int j = 0; j < K; j++) begin
          if (op_had) e = (int'(x[i][j]) * int'(y[i][j])) % P;
          else begin
            e = 0;
            for (int s = 0; s < K; s++) e = (e + int'(x[i][s]) * int'(y[s][j])) % P;
          end
          checks++;
          if (int'(z[i][j]) != e) begin
            failures++;
            if (failures < 10) $display("op %0d z[%0d][%0d]=%0d expected %0d", n, i, j, z[i][j], e);
          end
        end
      if (op_had) n_had++; else n_mm++;
      repeat ($urandom_range(0, 2)) @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
