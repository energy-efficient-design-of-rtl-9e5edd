// tb_design1_mult: exhaustive self-check of Design 1 of the four-operand
// multiplier at N = 4: all 65536 operand sets, product compared with
// integer a*b*c*d. The largest product (15^4 = 50625) and products with a
// zero operand are among them and are counted.
module tb_design1_mult;
  localparam int N = 4;
  logic [N-1:0] a, b, c, d;
  logic [4*N-1:0] p;
  int checks = 0, failures = 0;
  int n_zero = 0, n_max = 0;

  design1_mult dut (.a(a), .b(b), .c(c), .d(d), .p(p));

  initial begin : watchdog
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 2**(4*N); v++) begin
      int expect_p;
      {a, b, c, d} = (4*N)'(v);
      #1;
      expect_p = int'(a) * int'(b) * int'(c) * int'(d);
      if (expect_p == 0) n_zero++;
      if (expect_p == 50625) n_max++;
      checks++;
      if (int'(p) != expect_p) begin
        failures++;
        if (failures < 10) $display("FAIL %0d*%0d*%0d*%0d gave %0d, expected %0d", a, b, c, d, p, expect_p);
      end
    end
    checks++;
    if (n_zero == 0 || n_max != 1) failures++;
    $display("zero-operand cases %0d, maximum-product cases %0d", n_zero, n_max);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
