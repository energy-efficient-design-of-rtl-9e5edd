// csa_tree: partial product reduction tree (second multiplier stage).
//
// Reduces ROWS operand rows of WIDTH bits to two vectors, sum and carry,
// whose sum equals the sum of all rows modulo 2^WIDTH. The tree mixes 4:2
// compressors and full adders, as the document does. It works row by row
// (carry-save): at each level, every group of four rows goes through a row
// of WIDTH compressors chained column to column through cin/cout and
// becomes two rows; a remaining group of three rows goes through a row of
// full adders and becomes two rows; one or two remaining rows pass through
// unchanged. Levels repeat until two rows are left (schedule in
// mult4op_pkg). Carries leaving the top column are dropped, which is exact
// when the true total fits WIDTH bits. The row-wise schedule is this
// design's choice; the document's dot-level placement is not reproduced.
//
// Interface: rows[r] is the r-th operand row; carry is already shifted to
// its weight, so the result is sum + carry. Purely combinational, depth
// csa_levels(ROWS) levels of at most one compressor each.
module csa_tree
  import mult4op_pkg::*;
#(
  parameter int ROWS  = 4,
  parameter int WIDTH = 8
) (
  input  logic [WIDTH-1:0] rows [ROWS],
  output logic [WIDTH-1:0] sum,
  output logic [WIDTH-1:0] carry
);
  localparam int LEVELS = csa_levels(ROWS);
  localparam int RFINAL = csa_rows_at(ROWS, LEVELS);

  for (genvar L = 0; L < LEVELS; L++) begin : g_lvl
    localparam int RIN  = csa_rows_at(ROWS, L);
    localparam int ROUT = csa_rows_at(ROWS, L + 1);
    localparam int G4   = RIN / 4;
    localparam int REM  = RIN % 4;

    logic [WIDTH-1:0] cur [RIN];   // rows entering this level
    logic [WIDTH-1:0] nxt [ROUT];  // rows leaving it

    if (L == 0) begin : g_first
      assign cur = rows;
    end else begin : g_chain
      assign cur = g_lvl[L-1].nxt;
    end

    // Groups of four rows: one row of 4:2 compressors each. The carry and
    // cout of the top column carry weight 2^WIDTH and are dropped.
    for (genvar g = 0; g < G4; g++) begin : g_c42
      logic [WIDTH-1:0] s_v;
      logic [WIDTH-1:0] c_v;
      logic [WIDTH:0]   chain;  // chain[i] is the cin of column i
      assign chain[0] = 1'b0;
      for (genvar i = 0; i < WIDTH; i++) begin : g_col
        compressor_4_2 u_c42 (
          .x1   (cur[4*g][i]),
          .x2   (cur[4*g+1][i]),
          .x3   (cur[4*g+2][i]),
          .x4   (cur[4*g+3][i]),
          .cin  (chain[i]),
          .sum  (s_v[i]),
          .carry(c_v[i]),
          .cout (chain[i+1])
        );
      end
      assign nxt[2*g]   = s_v;
      assign nxt[2*g+1] = {c_v[WIDTH-2:0], 1'b0};
    end

    if (REM == 3) begin : g_fa
      // Three remaining rows: one row of full adders (3:2).
      logic [WIDTH-1:0] s_v;
      logic [WIDTH-1:0] c_v;
      for (genvar i = 0; i < WIDTH; i++) begin : g_col
        full_adder u_fa (
          .a   (cur[4*G4][i]),
          .b   (cur[4*G4+1][i]),
          .cin (cur[4*G4+2][i]),
          .sum (s_v[i]),
          .cout(c_v[i])
        );
      end
      assign nxt[2*G4]   = s_v;
      assign nxt[2*G4+1] = {c_v[WIDTH-2:0], 1'b0};
    end else begin : g_pass
      // Zero, one or two remaining rows: carried to the next level as they are.
      for (genvar r = 0; r < REM; r++) begin : g_row
        assign nxt[2*G4+r] = cur[4*G4+r];
      end
    end
  end

  if (LEVELS == 0) begin : g_none
    // One or two rows: nothing to reduce.
    assign sum = rows[0];
    if (ROWS >= 2) begin : g_two
      assign carry = rows[1];
    end else begin : g_one
      assign carry = '0;
    end
  end else begin : g_out
    assign sum = g_lvl[LEVELS-1].nxt[0];
    if (RFINAL >= 2) begin : g_two
      assign carry = g_lvl[LEVELS-1].nxt[1];
    end else begin : g_one
      assign carry = '0;
    end
  end
endmodule
