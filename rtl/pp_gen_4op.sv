// pp_gen_4op: four-operand partial product generator of Design III.
//
// Forms all N^4 one-bit products a_i & b_j & c_k & d_l in three stages of
// two-input AND gates, as the document describes: first a_i&b_j, then that
// times c_k, then that times d_l. Output pp[((i*N+j)*N+k)*N+l] has weight
// i+j+k+l in the product. Purely combinational, three AND delays deep.
module pp_gen_4op #(
  parameter int N = 4
) (
  input  logic [N-1:0]      a,
  input  logic [N-1:0]      b,
  input  logic [N-1:0]      c,
  input  logic [N-1:0]      d,
  output logic [N**4-1:0]   pp
);
  logic [N-1:0] ab   [N];
  logic [N-1:0] abc  [N][N];

  for (genvar i = 0; i < N; i++) begin : g_i
    for (genvar j = 0; j < N; j++) begin : g_j
      assign ab[i][j] = a[i] & b[j];                        // stage 1
      for (genvar k = 0; k < N; k++) begin : g_k
        assign abc[i][j][k] = ab[i][j] & c[k];              // stage 2
        for (genvar l = 0; l < N; l++) begin : g_l
          assign pp[((i*N+j)*N+k)*N+l] = abc[i][j][k] & d[l];  // stage 3
        end
      end
    end
  end
endmodule
