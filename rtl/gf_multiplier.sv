// gf_multiplier: combinational multiplier in the Galois field GF(2^M).
//
// This is the "Galois operation" of the weighted test pattern generator: it
// forms Z = A * X, the product of two field elements, reduced modulo the field
// polynomial POLY (x^M term omitted, bit k = coefficient of x^k). The paper
// gives the operation (two elements of GF(2^m) multiplied by a Galois
// multiplier); the circuit is this design's choice: a shift-and-add array that
// walks X from its most significant bit down, doubling the partial product
// (a shift with reduction by POLY) and adding A wherever the bit of X is set.
// The default polynomial is the primitive one from gf_pkg::prim_poly(M).
//
// Interface: a, x in, z out, all M bits. Purely combinational, no latency.
module gf_multiplier
  import gf_pkg::*;
#(
  parameter int unsigned           M    = 3,
  parameter logic [MAX_M-1:0]      POLY = prim_poly(M)
) (
  input  logic [M-1:0] a,
  input  logic [M-1:0] x,
  output logic [M-1:0] z
);

  localparam logic [M-1:0] RED = POLY[M-1:0];

  always_comb begin
    logic [M-1:0] acc;
    acc = '0;
    for (int i = M - 1; i >= 0; i--) begin
      // acc = acc * x  (mod POLY)
      acc = {acc[M-2:0], 1'b0} ^ (acc[M-1] ? RED : '0);
      // acc = acc + x_i * A
      if (x[i]) acc = acc ^ a;
    end
    z = acc;
  end

endmodule
