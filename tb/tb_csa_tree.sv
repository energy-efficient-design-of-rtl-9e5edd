// tb_csa_tree: self-check of the partial product reduction tree.
// Several tree shapes are driven with random rows: the default (4 rows of
// 8 bits: one 4:2 level), 3 rows (one full-adder level), 7 and 11 rows
// (mixed compressor, full-adder and pass-through levels), 44 rows of 16
// bits (the Design III tree) and the trivial 1 and 2 row cases. Each
// checks sum + carry == sum of the rows modulo 2^WIDTH.
module tb_csa_tree;
  localparam int NVEC = 3000;
  int checks = 0, failures = 0;

  logic [7:0]  r4 [4];  logic [7:0]  s4, c4;
  logic [7:0]  r3 [3];  logic [7:0]  s3, c3;
  logic [9:0]  r7 [7];  logic [9:0]  s7, c7;
  logic [11:0] r11 [11]; logic [11:0] s11, c11;
  logic [15:0] r44 [44]; logic [15:0] s44, c44;
  logic [5:0]  r2 [2];  logic [5:0]  s2, c2;
  logic [5:0]  r1 [1];  logic [5:0]  s1, c1;

  csa_tree                          dut4  (.rows(r4),  .sum(s4),  .carry(c4));
  csa_tree #(.ROWS(3),  .WIDTH(8))  dut3  (.rows(r3),  .sum(s3),  .carry(c3));
  csa_tree #(.ROWS(7),  .WIDTH(10)) dut7  (.rows(r7),  .sum(s7),  .carry(c7));
  csa_tree #(.ROWS(11), .WIDTH(12)) dut11 (.rows(r11), .sum(s11), .carry(c11));
  csa_tree #(.ROWS(44), .WIDTH(16)) dut44 (.rows(r44), .sum(s44), .carry(c44));
  csa_tree #(.ROWS(2),  .WIDTH(6))  dut2  (.rows(r2),  .sum(s2),  .carry(c2));
  csa_tree #(.ROWS(1),  .WIDTH(6))  dut1  (.rows(r1),  .sum(s1),  .carry(c1));

  task automatic check(input string name, input longint expect_total, input longint got, input int w);
    longint mask;
    mask = (64'd1 << w) - 1;
    checks++;
    if ((expect_total & mask) != (got & mask)) begin
      failures++;
      if (failures < 10) $display("FAIL %s: expected %0d got %0d", name, expect_total & mask, got & mask);
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
    for (int v = 0; v < NVEC; v++) begin
      longint t4, t3, t7, t11, t44, t2, t1;
      t4 = 0; t3 = 0; t7 = 0; t11 = 0; t44 = 0; t2 = 0; t1 = 0;
      // Every eighth vector uses all-ones rows to exercise the top carries.
      foreach (r4[i])  begin r4[i]  = (v % 8 == 0) ? '1 : 8'($urandom);  t4  += longint'(r4[i]);  end
      foreach (r3[i])  begin r3[i]  = (v % 8 == 0) ? '1 : 8'($urandom);  t3  += longint'(r3[i]);  end
      foreach (r7[i])  begin r7[i]  = (v % 8 == 0) ? '1 : 10'($urandom); t7  += longint'(r7[i]);  end
      foreach (r11[i]) begin r11[i] = (v % 8 == 0) ? '1 : 12'($urandom); t11 += longint'(r11[i]); end
      foreach (r44[i]) begin r44[i] = (v % 8 == 0) ? '1 : 16'($urandom); t44 += longint'(r44[i]); end
      foreach (r2[i])  begin r2[i]  = 6'($urandom); t2 += longint'(r2[i]); end
      foreach (r1[i])  begin r1[i]  = 6'($urandom); t1 += longint'(r1[i]); end
      #1;
      check("rows4",  t4,  longint'(s4)  + longint'(c4),  8);
      check("rows3",  t3,  longint'(s3)  + longint'(c3),  8);
      check("rows7",  t7,  longint'(s7)  + longint'(c7),  10);
      check("rows11", t11, longint'(s11) + longint'(c11), 12);
      check("rows44", t44, longint'(s44) + longint'(c44), 16);
      check("rows2",  t2,  longint'(s2)  + longint'(c2),  6);
      check("rows1",  t1,  longint'(s1)  + longint'(c1),  6);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
