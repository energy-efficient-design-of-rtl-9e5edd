// tb_compressor_4_2: exhaustive self-check of the (4:2) compressor.
// For all 32 input combinations it checks x1+x2+x3+x4+cin ==
// sum + 2*(carry+cout), and that cout does not depend on cin (the property
// that stops carries rippling along a compressor row).
module tb_compressor_4_2;
  logic x1, x2, x3, x4, cin, sum, carry, cout;
  logic cout_cin0;
  int checks = 0, failures = 0;

  compressor_4_2 dut (.x1(x1), .x2(x2), .x3(x3), .x4(x4), .cin(cin),
                      .sum(sum), .carry(carry), .cout(cout));

  initial begin : watchdog
    #10000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 16; v++) begin
      for (int ci = 0; ci < 2; ci++) begin
        {x1, x2, x3, x4} = 4'(v);
        cin = 1'(ci);
        #1;
        checks++;
        if (int'(x1) + int'(x2) + int'(x3) + int'(x4) + int'(cin) !=
            int'(sum) + 2 * (int'(carry) + int'(cout))) begin
          failures++;
          $display("FAIL x=%b cin=%0d -> sum=%0d carry=%0d cout=%0d", 4'(v), cin, sum, carry, cout);
        end
        if (ci == 0) cout_cin0 = cout;
        else begin
          checks++;
          if (cout != cout_cin0) begin
            failures++;
            $display("FAIL cout depends on cin for x=%b", 4'(v));
          end
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
