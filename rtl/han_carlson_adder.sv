// han_carlson_adder: N-bit Han-Carlson parallel-prefix adder, the second
// circuit under test of the BIST (N = 16 by default, as in the paper).
//
// The Han-Carlson adder mixes the two classic prefix trees: like Brent-Kung it
// first works only on every other bit, and like Kogge-Stone it then doubles
// the span at every level, which keeps the fan-out of every node at 2.
//   level 0       half adders give p_i = a_i ^ b_i and g_i = a_i & b_i;
//   level 1       each odd bit i merges with bit i-1;
//   levels 2..L   (L = log2 N) each odd bit i merges with odd bit i - 2^(l-1)
//                 when that exists, so every odd bit ends with the group
//                 generate of bits i..0;
//   final level   each even bit i > 0 merges with odd bit i-1.
// The merge is (G, P) o (G', P') = (G | P & G', P & P'). The sum bit is
// p_i ^ G[i-1:0]; cout is G[N-1:0]. The paper names the adder, its 16-bit
// size and its fan-out of 2; the node arrangement above is the standard
// Han-Carlson one. There is no carry in. N must be a power of 2, N >= 2.
//
// Interface: a, b (N bits) in; sum (N bits), cout out. Combinational,
// log2(N) + 1 prefix levels deep.
module han_carlson_adder #(
  parameter int unsigned N = 16
) (
  input  logic [N-1:0] a,
  input  logic [N-1:0] b,
  output logic [N-1:0] sum,
  output logic         cout
);

  localparam int unsigned L = $clog2(N);

  logic [N-1:0] p0, g0;             // bitwise propagate / generate
  logic [N-1:0] gl [L+1];           // group generate after each level
  logic [N-1:0] pl [L+1];           // group propagate after each level
  logic [N-1:0] gfin;               // G[i:0] for every bit i

  for (genvar i = 0; i < N; i++) begin : g_pg
    half_adder u_ha (
      .a     (a[i]),
      .b     (b[i]),
      .sum   (p0[i]),
      .carry (g0[i])
    );
  end

  always_comb begin
    gl[0] = g0;
    pl[0] = p0;
    for (int unsigned l = 1; l <= L; l++) begin
      int unsigned d;
      d = (l == 1) ? 1 : (1 << (l - 1));
      gl[l] = gl[l-1];
      pl[l] = pl[l-1];
      for (int unsigned i = 1; i < N; i += 2) begin
        if (i >= d) begin
          gl[l][i] = gl[l-1][i] | (pl[l-1][i] & gl[l-1][i-d]);
          pl[l][i] = pl[l-1][i] & pl[l-1][i-d];
        end
      end
    end
    gfin = gl[L];
    for (int unsigned i = 2; i < N; i += 2) begin
      gfin[i] = gl[L][i] | (pl[L][i] & gl[L][i-1]);
    end
  end

  assign sum  = p0 ^ {gfin[N-2:0], 1'b0};
  assign cout = gfin[N-1];

endmodule
