// full_adder: one-bit full adder.
//
// Adds operand bits A and B and the carry in: S is the XOR of the three, Cout
// is set when at least two of them are set (the 8-row truth table of a full
// adder). The stage cell of the ripple carry adder. Combinational.
module full_adder (
  input  logic a,
  input  logic b,
  input  logic cin,
  output logic s,
  output logic cout
);

  logic p;

  assign p    = a ^ b;
  assign s    = p ^ cin;
  assign cout = (a & b) | (p & cin);

endmodule
