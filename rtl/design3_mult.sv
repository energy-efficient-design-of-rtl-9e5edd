// design3_mult: Design III of the four-operand multiplier, P = A*B*C*D.
//
// All N^4 partial products a_i&b_j&c_k&d_l are generated at once by three
// stages of AND gates (pp_gen_4op). Each lands in the column of weight
// i+j+k+l; column w holds col_height(N, w) bits, the tallest (2N^3+N)/3 =
// 44 for N = 4. The bits of each column are stacked into rows (r-th bit of
// column w goes to row r, in enumeration order), the rows are reduced by a
// single 4:2/3:2 csa_tree to sum and carry, and one 4N-bit CPA gives the
// product. Only one CPA is used, which is the point of this design (64 unit
// delays in the document's model for N = 4). The packing order is this
// design's choice. Operands are unsigned. Purely combinational.
module design3_mult
  import mult4op_pkg::*;
#(
  parameter int N = 4
) (
  input  logic [N-1:0]   a,
  input  logic [N-1:0]   b,
  input  logic [N-1:0]   c,
  input  logic [N-1:0]   d,
  output logic [4*N-1:0] p
);
  localparam int PW   = 4 * N;
  localparam int ROWS = col_max_height(N);

  logic [N**4-1:0] pp;
  logic [PW-1:0]   rows [ROWS];
  logic [PW-1:0]   s_v;
  logic [PW-1:0]   c_v;
  logic            co_unused;

  pp_gen_4op #(.N(N)) u_pp (.a(a), .b(b), .c(c), .d(d), .pp(pp));

  // Column stacking: row r, bit w holds the r-th partial product of weight w.
  for (genvar r = 0; r < ROWS; r++) begin : g_row
    for (genvar w = 0; w < PW; w++) begin : g_col
      localparam int IDX = pp4_index_at(N, w, r);
      if (IDX >= 0) begin : g_bit
        assign rows[r][w] = pp[IDX];
      end else begin : g_zero
        assign rows[r][w] = 1'b0;
      end
    end
  end

  csa_tree #(.ROWS(ROWS), .WIDTH(PW)) u_tree (.rows(rows), .sum(s_v), .carry(c_v));

  // The product always fits PW bits, so the adder's carry out is zero.
  ripple_carry_adder #(.WIDTH(PW)) u_cpa (
    .x(s_v), .y(c_v), .cin(1'b0), .s(p), .cout(co_unused)
  );
endmodule
