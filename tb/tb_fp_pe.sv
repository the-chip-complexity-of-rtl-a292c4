// tb_fp_pe: drives one processing element through random sequences of
// serial multiply-add beats (B = 8 cycles each, p = 193), componentwise
// beats and clears, and checks after every beat the accumulator (against a
// sum of products mod p kept in the testbench) and the forwarding of both
// operands to the next element, which must hold for the whole beat.  The
// operands include 0, 1 and p - 1.
module tb_fp_pe;
  localparam int unsigned P = 193;
  localparam int unsigned B = $clog2(P);

  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic clear, mac, had, first, last;
  logic [B-1:0] a, b, xd, yd, ao, bo, acc;
  int checks = 0, failures = 0;

  fp_pe dut (.clk(clk), .clear(clear), .mac(mac), .had(had), .first(first), .last(last),
             .a_in(a), .b_in(b), .x_dir(xd), .y_dir(yd), .a_out(ao), .b_out(bo), .acc(acc));

  function automatic logic [B-1:0] operand();
    int r;
    r = $urandom_range(0, 9);
    if (r == 0) return '0;
    if (r == 1) return B'(1);
    if (r == 2) return B'(P - 1);
    return B'($urandom_range(0, P - 1));
  endfunction

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int model, fa, fb;
    automatic int n_clear = 0, n_mac = 0, n_had = 0;
    clear = 1'b1; mac = 1'b0; had = 1'b0; first = 1'b0; last = 1'b0;
    a = '0; b = '0; xd = '0; yd = '0;
    model = 0; fa = 0; fb = 0;
    @(negedge clk);
    clear = 1'b0;
    for (int n = 0; n < 3000; n++) begin
      int r;
      r = $urandom_range(0, 19);
      if (r == 0) begin
        clear = 1'b1;
        @(negedge clk);
        clear = 1'b0;
        model = 0; fa = 0; fb = 0;
        n_clear++;
      end else begin
        had = (r == 1);
        mac = !had;
        a  = operand(); b  = operand();
        xd = operand(); yd = operand();
        if (had) begin model = (int'(xd) * int'(yd)) % P; n_had++; end
        else begin
          model = (model + int'(a) * int'(b)) % P;
          fa = int'(a); fb = int'(b);
          n_mac++;
        end
        for (int c = 0; c < B; c++) begin
          first = (c == 0);
          last  = (c == B - 1);
          @(negedge clk);
          // inputs only matter in the first cycle of the beat
          a = operand(); b = operand(); xd = operand(); yd = operand();
          checks++;
          if (int'(ao) != fa || int'(bo) != fb) begin
            failures++;
            if (failures < 10) $display("beat %0d cycle %0d: operands not forwarded", n, c);
          end
        end
        mac = 1'b0; had = 1'b0; first = 1'b0; last = 1'b0;
        checks++;
        if (int'(acc) != model) begin
          failures++;
          if (failures < 10) $display("beat %0d: acc=%0d expected %0d", n, acc, model);
        end
        repeat ($urandom_range(0, 1)) @(negedge clk);
      end
    end
    checks++;
    if (n_clear == 0 || n_mac == 0 || n_had == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
