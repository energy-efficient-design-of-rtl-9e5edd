// tb_exponent_g15: exponentiation with four-operand multipliers.
//
// Computes g^15 for every 4-bit g as g^15 = g^4 * g^4 * g^4 * g^3, the
// decomposition the four-operand multiplier was motivated by:
//   step 1: three four-operand products g*g*g*g and one three-operand
//           product g*g*g (fourth operand 1), on the default N = 4 cell;
//   step 2: one four-operand product of the four step-1 results. Those are
//           up to 16 bits wide, more than the 4-bit cell takes; this step
//           uses an 8-bit operand instance of Design II, which
//           hold g^4 for g <= 3, so step 2 is checked for g = 0..3 (3^15 =
//           14348907 needs 24 bits of the 32-bit product).
// Step 1 is checked for all sixteen g, step 2 for g = 0..3, against powers
// computed by repeated multiplication.
module tb_exponent_g15;
  int checks = 0, failures = 0;

  logic [3:0]  g;
  logic [15:0] g4_d1, g4_d2, g4_d3, g3_d1, g3_d2, g3_d3;
  logic [31:0] g15_d2;

  // Step 1: g^4 and g^3 on the default cell.
  four_operand_multiplier u_g4 (.a(g), .b(g), .c(g), .d(g),
                                .p_design1(g4_d1), .p_design2(g4_d2), .p_design3(g4_d3));
  four_operand_multiplier u_g3 (.a(g), .b(g), .c(g), .d(4'd1),
                                .p_design1(g3_d1), .p_design2(g3_d2), .p_design3(g3_d3));

  // Step 2: g^4 * g^4 * g^4 * g^3 with 8-bit operands.
  design2_mult #(.N(8)) u_s2_d2 (.a(g4_d3[7:0]), .b(g4_d3[7:0]), .c(g4_d3[7:0]), .d(g3_d3[7:0]), .p(g15_d2));

  initial begin : watchdog
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 16; v++) begin
      longint e3, e4, e15;
      g = 4'(v);
      #1;
      e3 = longint'(v) * v * v;
      e4 = e3 * v;
      e15 = 1;
      for (int k = 0; k < 15; k++) e15 *= v;
      checks += 2;
      if (longint'(g4_d1) != e4 || longint'(g4_d2) != e4 || longint'(g4_d3) != e4) begin
        failures++; $display("FAIL g=%0d: g^4 gave %0d %0d %0d", v, g4_d1, g4_d2, g4_d3);
      end
      if (longint'(g3_d1) != e3 || longint'(g3_d2) != e3 || longint'(g3_d3) != e3) begin
        failures++; $display("FAIL g=%0d: g^3 gave %0d %0d %0d", v, g3_d1, g3_d2, g3_d3);
      end
      if (v <= 3) checks++;
      if (v <= 3 && longint'(g15_d2) != e15) begin
        failures++; $display("FAIL g=%0d: g^15 (Design II) gave %0d, expected %0d", v, g15_d2, e15);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
