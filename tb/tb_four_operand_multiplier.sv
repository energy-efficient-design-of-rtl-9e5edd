// tb_four_operand_multiplier: end-to-end test of the four-operand
// multiplier cell at its default size (N = 4).
//
// Drives all 65536 operand sets through the three architectures at once and
// compares each product with integer a*b*c*d. It also checks that the
// three outputs agree, and counts the operand classes that exercise the
// extreme paths: a zero operand (all partial products of an operand
// cleared), the largest product 15^4 = 50625 (every partial product set,
// all reduction levels saturated), and products that reach the top
// product bit. A class that never occurs counts as a failure.
module tb_four_operand_multiplier;
  localparam int N = 4;
  logic [N-1:0] a, b, c, d;
  logic [4*N-1:0] p1, p2, p3;
  int checks = 0, failures = 0;
  int n_zero = 0, n_max = 0, n_msb = 0;

  four_operand_multiplier dut (
    .a(a), .b(b), .c(c), .d(d),
    .p_design1(p1), .p_design2(p2), .p_design3(p3)
  );

  task automatic check(input string name, input int got, input int expect_p);
    checks++;
    if (got != expect_p) begin
      failures++;
      if (failures < 10)
        $display("FAIL %s: %0d*%0d*%0d*%0d gave %0d, expected %0d", name, a, b, c, d, got, expect_p);
    end
  endtask

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
      check("design I",   int'(p1), expect_p);
      check("design II",  int'(p2), expect_p);
      check("design III", int'(p3), expect_p);
      checks++;
      if (p1 != p2 || p2 != p3) failures++;
      if (a == 0 || b == 0 || c == 0 || d == 0) n_zero++;
      if (expect_p == 50625) n_max++;
      if (p3[4*N-1]) n_msb++;
    end
    $display("zero operand: %0d, maximum product: %0d, top bit set: %0d", n_zero, n_max, n_msb);
    checks += 3;
    if (n_zero == 0) failures++;
    if (n_max == 0) failures++;
    if (n_msb == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
