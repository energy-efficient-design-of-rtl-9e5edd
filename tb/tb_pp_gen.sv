// tb_pp_gen: exhaustive self-check of the 4x4 partial product generator.
// For every a, b it checks each row against (a if b[j] else 0) << j and
// that the rows add up to a*b.
module tb_pp_gen;
  localparam int AW = 4, BW = 4;
  logic [AW-1:0] a;
  logic [BW-1:0] b;
  logic [AW+BW-1:0] rows [BW];
  int checks = 0, failures = 0;

  pp_gen dut (.a(a), .b(b), .rows(rows));

  initial begin : watchdog
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 2**AW; i++)
      for (int j = 0; j < 2**BW; j++) begin
        int total;
        a = AW'(i); b = BW'(j);
        #1;
        total = 0;
        for (int r = 0; r < BW; r++) begin
          int expect_row;
          expect_row = ((j >> r) & 1) ? (i << r) : 0;
          checks++;
          if (int'(rows[r]) != expect_row) begin
            failures++;
            $display("FAIL a=%0d b=%0d row%0d=%0d expected %0d", i, j, r, rows[r], expect_row);
          end
          total += int'(rows[r]);
        end
        checks++;
        if (total != i * j) begin
          failures++;
          $display("FAIL a=%0d b=%0d rows sum to %0d", i, j, total);
        end
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
