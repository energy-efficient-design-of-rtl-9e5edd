// mult_nxm: unsigned AWxBW multiplier, the building block of Designs I and II.
//
// The three classic stages: pp_gen forms BW partial-product rows with AND
// gates, csa_tree reduces them with 4:2 compressors and full adders to a sum
// and a carry vector, and a ripple-carry CPA adds those two into the
// AW+BW bit product. The document uses it as the 4x4, 8x4 and 12x4
// multipliers of the chained product and the 8x8 multiplier of Design II.
// Purely combinational.
module mult_nxm #(
  parameter int AW = 4,
  parameter int BW = 4
) (
  input  logic [AW-1:0]    a,
  input  logic [BW-1:0]    b,
  output logic [AW+BW-1:0] p
);
  localparam int PW = AW + BW;

  logic [PW-1:0] rows [BW];
  logic [PW-1:0] s_v;
  logic [PW-1:0] c_v;
  logic          co_unused;

  pp_gen #(.AW(AW), .BW(BW)) u_pp (.a(a), .b(b), .rows(rows));

  csa_tree #(.ROWS(BW), .WIDTH(PW)) u_tree (.rows(rows), .sum(s_v), .carry(c_v));

  // The product always fits PW bits, so the adder's carry out is zero.
  ripple_carry_adder #(.WIDTH(PW)) u_cpa (
    .x(s_v), .y(c_v), .cin(1'b0), .s(p), .cout(co_unused)
  );
endmodule
