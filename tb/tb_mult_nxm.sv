// tb_mult_nxm: self-check of the generic multiplier in the four shapes the
// design uses: 4x4 (default) and 8x8 exhaustively, 8x4 and 12x4 over all
// multipliers with every 8-bit multiplicand and random 12-bit ones.
// Products are compared with integer multiplication.
module tb_mult_nxm;
  int checks = 0, failures = 0;

  logic [3:0]  a4,  b4;  logic [7:0]  p4;
  logic [7:0]  a84; logic [3:0] b84; logic [11:0] p84;
  logic [11:0] a124; logic [3:0] b124; logic [15:0] p124;
  logic [7:0]  a88, b88; logic [15:0] p88;

  mult_nxm                       dut44  (.a(a4),   .b(b4),   .p(p4));
  mult_nxm #(.AW(8),  .BW(4))    dut84  (.a(a84),  .b(b84),  .p(p84));
  mult_nxm #(.AW(12), .BW(4))    dut124 (.a(a124), .b(b124), .p(p124));
  mult_nxm #(.AW(8),  .BW(8))    dut88  (.a(a88),  .b(b88),  .p(p88));

  task automatic check(input string name, input int x, input int y, input int got);
    checks++;
    if (got != x * y) begin
      failures++;
      if (failures < 10) $display("FAIL %s: %0d*%0d gave %0d", name, x, y, got);
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
    for (int i = 0; i < 256; i++)
      for (int j = 0; j < 256; j++) begin
        int r12;
        r12 = int'($urandom) & 12'hfff;
        a4 = 4'(i); b4 = 4'(j);
        a84 = 8'(i); b84 = 4'(j);
        a124 = (j < 16) ? 12'(r12) : 12'hfff; b124 = 4'(j);
        a88 = 8'(i); b88 = 8'(j);
        #1;
        if (i < 16 && j < 16) check("4x4", i, j, int'(p4));
        if (j < 16) check("8x4", i, j, int'(p84));
        if (j < 16) check("12x4", int'(a124), j, int'(p124));
        check("8x8", i, j, int'(p88));
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
