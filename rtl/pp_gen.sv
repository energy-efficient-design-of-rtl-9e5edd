// pp_gen: partial product generator (first multiplier stage).
//
// An AND array for an AWxBW unsigned multiplication: row j is a & b[j]
// (AW two-input AND gates) placed at weight j in an AW+BW bit row, so the
// product is the sum of the BW rows. This is the plain AND partial product
// generation the document uses; no Booth recoding. Purely combinational.
module pp_gen #(
  parameter int AW = 4,
  parameter int BW = 4
) (
  input  logic [AW-1:0]    a,
  input  logic [BW-1:0]    b,
  output logic [AW+BW-1:0] rows [BW]
);
  for (genvar j = 0; j < BW; j++) begin : g_row
    logic [AW-1:0] pp;
    assign pp      = a & {AW{b[j]}};
    assign rows[j] = (AW + BW)'(pp) << j;
  end
endmodule
