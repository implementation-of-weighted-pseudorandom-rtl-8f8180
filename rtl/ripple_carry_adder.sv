// ripple_carry_adder: N-bit ripple carry adder, one of the two circuits
// under test of the BIST.
//
// N full adders in a row; the carry out of stage i is the carry in of stage
// i+1, so the carry ripples from bit 0 to bit N-1 and the delay grows
// linearly with N. Structure and the 4-bit default follow the paper's
// 4-bit example (the BIST grounds cin, as the example does).
//
// Interface: a, b (N bits), cin in; sum (N bits), cout out. Combinational.
module ripple_carry_adder #(
  parameter int unsigned N = 4
) (
  input  logic [N-1:0] a,
  input  logic [N-1:0] b,
  input  logic         cin,
  output logic [N-1:0] sum,
  output logic         cout
);

  logic [N:0] c;

  assign c[0] = cin;

  for (genvar i = 0; i < N; i++) begin : g_stage
    full_adder u_fa (
      .a    (a[i]),
      .b    (b[i]),
      .cin  (c[i]),
      .s    (sum[i]),
      .cout (c[i+1])
    );
  end

  assign cout = c[N];

endmodule
