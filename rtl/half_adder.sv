// half_adder: one-bit half adder, SUM = A xor B, CARRY = A and B.
//
// Used as the propagate (SUM) and generate (CARRY) cell at the input of the
// Han-Carlson adder. Combinational.
module half_adder (
  input  logic a,
  input  logic b,
  output logic sum,
  output logic carry
);

  assign sum   = a ^ b;
  assign carry = a & b;

endmodule
