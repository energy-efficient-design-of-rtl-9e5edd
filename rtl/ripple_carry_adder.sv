// ripple_carry_adder: carry propagating adder (CPA) of WIDTH bits.
//
// The final stage of every multiplier: adds the sum and carry vectors left
// by the reduction tree. Built as a chain of full_adder cells, the
// ripple-carry adder the document lists among the main components; its
// delay grows linearly with WIDTH, as in the document's CPA delay
// equations. s + 2^WIDTH*cout = x + y + cin. Purely combinational.
module ripple_carry_adder #(
  parameter int WIDTH = 8
) (
  input  logic [WIDTH-1:0] x,
  input  logic [WIDTH-1:0] y,
  input  logic             cin,
  output logic [WIDTH-1:0] s,
  output logic             cout
);
  logic [WIDTH:0] c;

  assign c[0] = cin;

  for (genvar i = 0; i < WIDTH; i++) begin : g_bit
    full_adder u_fa (.a(x[i]), .b(y[i]), .cin(c[i]), .sum(s[i]), .cout(c[i+1]));
  end

  assign cout = c[WIDTH];
endmodule
