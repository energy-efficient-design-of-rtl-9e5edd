// design2_mult: Design II of the four-operand multiplier, P = A*B*C*D.
//
// Two phases. In the first, two NxN multipliers work in parallel on A*B and
// C*D, each with its own reduction and CPA. In the second, a 2Nx2N
// multiplier multiplies the two 2N-bit results.
// Three CPAs in all, but only two on the critical path; the document's
// gate-level model gives 63 unit delays for N = 4, the fastest of its three
// designs. The structure follows the document; each multiplier uses this
// design's generic mult_nxm. Operands are unsigned. Purely combinational.
module design2_mult #(
  parameter int N = 4
) (
  input  logic [N-1:0]   a,
  input  logic [N-1:0]   b,
  input  logic [N-1:0]   c,
  input  logic [N-1:0]   d,
  output logic [4*N-1:0] p
);
  logic [2*N-1:0] p_ab;
  logic [2*N-1:0] p_cd;

  // Phase one: two parallel NxN multipliers.
  mult_nxm #(.AW(N), .BW(N)) u_m_ab (.a(a), .b(b), .p(p_ab));
  mult_nxm #(.AW(N), .BW(N)) u_m_cd (.a(c), .b(d), .p(p_cd));

  // Phase two: one 2Nx2N multiplier.
  mult_nxm #(.AW(2*N), .BW(2*N)) u_m8x8 (.a(p_ab), .b(p_cd), .p(p));
endmodule
