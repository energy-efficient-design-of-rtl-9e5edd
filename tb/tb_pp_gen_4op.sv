// tb_pp_gen_4op: exhaustive self-check of the four-operand partial product
// generator (N = 4, 65536 operand sets). Each of the 256 bits is compared
// with a_i&b_j&c_k&d_l, and the bits weighted by 2^(i+j+k+l) must add up
// to a*b*c*d.
module tb_pp_gen_4op;
  localparam int N = 4;
  logic [N-1:0] a, b, c, d;
  logic [N**4-1:0] pp;
  int checks = 0, failures = 0;

  pp_gen_4op dut (.a(a), .b(b), .c(c), .d(d), .pp(pp));

  initial begin : watchdog
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 2**(4*N); v++) begin
      int total, bad;
      {a, b, c, d} = (4*N)'(v);
      #1;
      total = 0;
      bad = 0;
      for (int i = 0; i < N; i++)
        for (int j = 0; j < N; j++)
          for (int k = 0; k < N; k++)
            for (int l = 0; l < N; l++) begin
              logic e;
              e = a[i] & b[j] & c[k] & d[l];
              if (pp[((i*N+j)*N+k)*N+l] != e) bad++;
              if (pp[((i*N+j)*N+k)*N+l]) total += 1 << (i + j + k + l);
            end
      checks += 2;
      if (bad != 0) begin
        failures++;
        if (failures < 10) $display("FAIL %0d wrong bits for a=%0d b=%0d c=%0d d=%0d", bad, a, b, c, d);
      end
      if (total != int'(a) * int'(b) * int'(c) * int'(d)) begin
        failures++;
        if (failures < 10) $display("FAIL weighted sum %0d for a=%0d b=%0d c=%0d d=%0d", total, a, b, c, d);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
