// compressor_4_2: (4:2) compressor for partial product reduction.
//
// Adds four bits of one column (x1..x4) and a carry-in from the next lower
// column: x1+x2+x3+x4+cin = sum + 2*(carry + cout). It is built, as is
// usual, from two full adders in series; cout depends only on x1..x3, so a
// row of compressors chained through cin/cout has no ripple beyond one
// column. The document names the compressor and gives its delay as two
// full adders (7 against 3.5 unit delays); the two-adder construction is
// this design's choice. Purely combinational.
module compressor_4_2 (
  input  logic x1,
  input  logic x2,
  input  logic x3,
  input  logic x4,
  input  logic cin,
  output logic sum,
  output logic carry,
  output logic cout
);
  logic s1;

  full_adder u_fa1 (.a(x1), .b(x2), .cin(x3),  .sum(s1),  .cout(cout));
  full_adder u_fa2 (.a(s1), .b(x4), .cin(cin), .sum(sum), .cout(carry));
endmodule
