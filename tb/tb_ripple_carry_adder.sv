// tb_ripple_carry_adder: exhaustive self-check of the 8-bit ripple-carry
// adder (default WIDTH). Every x, y and cin (2^17 cases) is compared with
// integer addition, carry out included.
module tb_ripple_carry_adder;
  localparam int W = 8;
  logic [W-1:0] x, y, s;
  logic cin, cout;
  int checks = 0, failures = 0;

  ripple_carry_adder dut (.x(x), .y(y), .cin(cin), .s(s), .cout(cout));

  initial begin : watchdog
    #10000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 2**W; i++)
      for (int j = 0; j < 2**W; j++)
        for (int k = 0; k < 2; k++) begin
          x = W'(i); y = W'(j); cin = 1'(k);
          #1;
          checks++;
          if ({cout, s} != (W+1)'(i + j + k)) begin
            failures++;
            if (failures < 10) $display("FAIL %0d+%0d+%0d -> %0d", i, j, k, {cout, s});
          end
        end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
