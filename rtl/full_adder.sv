// full_adder: one-bit full adder cell.
//
// Follows the structure of the document's CNTFET full adder: the carry out
// is the majority function of the three inputs, and the sum is formed from
// the XOR and XNOR of a and b, with cin choosing between them
// (sum = cin ? XNOR(a,b) : XOR(a,b)). The transistor circuit (14
// transistors, 3 capacitors, output inverters for full swing) is reduced to
// this logic. Purely combinational.
module full_adder (
  input  logic a,
  input  logic b,
  input  logic cin,
  output logic sum,
  output logic cout
);
  logic ab_xor;
  logic ab_xnor;

  always_comb begin
    ab_xor  = a ^ b;
    ab_xnor = ~ab_xor;
    sum     = cin ? ab_xnor : ab_xor;
    cout    = (a & b) | (a & cin) | (b & cin);  // majority
  end
endmodule
