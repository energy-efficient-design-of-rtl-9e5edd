// four_operand_multiplier: four-operand multiplier cell, P = A*B*C*D.
//
// A cell with four N-bit operand inputs and a 4N-bit product, computed in
// one piece of combinational hardware rather than by three separate
// two-operand multiplications. The three architectures the document
// proposes stand side by side on the same operands, each with its own
// product output:
//   p_design1  A*B, then *C, then *D, three multipliers and CPAs in series
//   p_design2  A*B and C*D in parallel, then one 2Nx2N multiplier
//   p_design3  all N^4 partial products reduced in one tree, one CPA
// The three outputs are always equal; they differ in delay, area and power.
// Sharing the operand inputs is this design's choice. Unsigned operands,
// no clock, no reset.
module four_operand_multiplier #(
  parameter int N = 4
) (
  input  logic [N-1:0]   a,
  input  logic [N-1:0]   b,
  input  logic [N-1:0]   c,
  input  logic [N-1:0]   d,
  output logic [4*N-1:0] p_design1,
  output logic [4*N-1:0] p_design2,
  output logic [4*N-1:0] p_design3
);
  design1_mult #(.N(N)) u_design1 (.a(a), .b(b), .c(c), .d(d), .p(p_design1));
  design2_mult #(.N(N)) u_design2 (.a(a), .b(b), .c(c), .d(d), .p(p_design2));
  design3_mult #(.N(N)) u_design3 (.a(a), .b(b), .c(c), .d(d), .p(p_design3));
endmodule
