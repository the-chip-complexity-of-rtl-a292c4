// tb_ntt_multiplier: multiplies random and extreme n/2-bit operands on the
// transform multiplier at its default size (n = 64: 32 x 32 bits, p = 193,
// K = 8) and compares the product with a * b.  Checks the number of cycles
// from start to done against (18K - 8) B + 20 cycles for the ten matrix
// steps (B = 8 cycles per systolic beat, the bits of p) plus
// K + 2 lg K + 1 cycles for each of the CB - 1 plane additions (and 3 cycles
// of start, first plane and finish).
module tb_ntt_multiplier;
  localparam int unsigned N = 64;
  localparam int unsigned K = 8;
  localparam int unsigned CB = $clog2(N / 2 + 1);
  localparam int unsigned LK = $clog2(K);
  localparam int unsigned B = 8;  // bits of p = 193
  localparam int unsigned EXP_CYCLES = (18 * K - 8) * B + 20 + (CB - 1) * (K + 2 * LK + 1) + 3;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic rst_n, start, busy, done;
  logic [N/2-1:0] a, b;
  logic [N-1:0] prod;
  int checks = 0, failures = 0;

  ntt_multiplier dut (.clk(clk), .rst_n(rst_n), .start(start), .a_in(a), .b_in(b),
                      .product_out(prod), .busy(busy), .done(done));

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst_n = 1'b0; start = 1'b0; a = '0; b = '0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int n = 0; n < 60; n++) begin
      int cycles;
      logic [N-1:0] expect_p;
      a = $urandom(); b = $urandom();
      case (n)
        0: begin a = '0; b = '0; end
        1: begin a = '1; b = '1; end
        2: begin a = 1; b = '1; end
        3: begin a = '1; b = 32'h8000_0001; end
        default: ;
      endcase
      expect_p = {{(N/2){1'b0}}, a} * {{(N/2){1'b0}}, b};
      start = 1'b1;
      @(negedge clk);
      start = 1'b0;
      cycles = 1;
      while (!done && cycles < 20000) begin
        @(negedge clk);
        cycles++;
      end
      checks++;
      if (prod !== expect_p) begin
        failures++;
        $display("%h * %h: got %h expected %h", a, b, prod, expect_p);
      end
      checks++;
      if (cycles != EXP_CYCLES) begin
        failures++;
        $display("multiplication %0d took %0d cycles, expected %0d", n, cycles, EXP_CYCLES);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
