// design1_mult: Design I of the four-operand multiplier, P = A*B*C*D.
//
// Three multiplications run one after the other inside one combinational
// unit: an NxN multiplier forms A*B (2N bits), a 2NxN multiplier multiplies
// that by C (3N bits), and a 3NxN multiplier multiplies that by D (4N bits).
// Each has its own AND stage, 4:2/3:2 reduction and CPA, so three CPAs lie
// on the critical path (81 unit delays in the document's gate-level model
// for N = 4). The structure follows the document; each stage uses this
// design's generic mult_nxm. Operands are unsigned. Purely combinational.
module design1_mult #(
  parameter int N = 4
) (
  input  logic [N-1:0]   a,
  input  logic [N-1:0]   b,
  input  logic [N-1:0]   c,
  input  logic [N-1:0]   d,
  output logic [4*N-1:0] p
);
  logic [2*N-1:0] p_ab;
  logic [3*N-1:0] p_abc;

  mult_nxm #(.AW(N),   .BW(N)) u_m4x4  (.a(a),     .b(b), .p(p_ab));
  mult_nxm #(.AW(2*N), .BW(N)) u_m8x4  (.a(p_ab),  .b(c), .p(p_abc));
  mult_nxm #(.AW(3*N), .BW(N)) u_m12x4 (.a(p_abc), .b(d), .p(p));
endmodule
