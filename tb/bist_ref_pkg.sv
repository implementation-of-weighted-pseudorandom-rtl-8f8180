// bist_ref_pkg: reference models for the testbenches, written independently
// of the RTL. Field arithmetic is done by carry-less multiplication followed
// by polynomial long division, with each polynomial written out in full
// (x^m term included) rather than taken from the design's table.
package bist_ref_pkg;

  // Carry-less product of a and b (m bits each), reduced modulo the full
  // degree-m polynomial pfull.
  function automatic longint unsigned gf_mul_ref(longint unsigned a, longint unsigned b,
                                                 int m, longint unsigned pfull);
    longint unsigned p;
    p = 0;
    for (int i = 0; i < m; i++)
      if (b[i]) p ^= (a << i);
    for (int k = 2 * m - 2; k >= m; k--)
      if (p[k]) p ^= (pfull << (k - m));
    return p;
  endfunction

  function automatic bit parity64(longint unsigned v);
    return ^v;
  endfunction

  // Signature register step: multiply by x modulo pfull, add the word.
  function automatic longint unsigned misr_ref(longint unsigned sig, longint unsigned d,
                                               int w, longint unsigned pfull);
    longint unsigned s;
    s = sig << 1;
    if (s[w]) s ^= pfull;
    return s ^ d;
  endfunction

  // Full polynomials the design is expected to use.
  localparam longint unsigned P2  = 64'h7;          // x^2+x+1
  localparam longint unsigned P3  = 64'hB;          // x^3+x+1
  localparam longint unsigned P5  = 64'h25;         // x^5+x^2+1
  localparam longint unsigned P9  = 64'h211;        // x^9+x^4+1
  localparam longint unsigned P17 = 64'h2_0009;     // x^17+x^3+1
  localparam longint unsigned P32 = 64'h1_0040_0007; // x^32+x^22+x^2+x+1

  // Golden signature of one BIST session: TPG of width m (polynomial pm);
  // CUT an n-bit adder (fa = 0, 2n inputs, n+1 outputs) or one full adder
  // (fa = 1, 3 inputs, 2 outputs); MISR polynomial pw; np patterns; weight
  // generator enabled every k-th shift.
  function automatic longint unsigned bist_golden(longint unsigned seed_a, longint unsigned seed_x,
                                                  int m, longint unsigned pm, bit fa, int n,
                                                  longint unsigned pw, int np, int k);
    longint unsigned x, sig, scan, z, opa, opb, resp;
    bit we, y, wa, yw;
    int kc, in_w, out_w;
    in_w  = fa ? 3 : 2 * n;
    out_w = fa ? 2 : n + 1;
    x = seed_x; we = 0; kc = 0; sig = 0; scan = 0;
    for (int p = 0; p < np; p++) begin
      for (int s = 0; s < in_w; s++) begin
        y  = x[m-1];
        wa = parity64(seed_a & x);
        yw = y ? we : wa;
        scan = ((scan << 1) | longint'(yw)) & ((64'd1 << in_w) - 1);
        z = gf_mul_ref(seed_a, x, m, pm);
        if (kc == k - 1) we = parity64(z);
        kc = (kc + 1) % k;
        x = z;
      end
      if (fa) resp = longint'(scan[2]) + longint'(scan[1]) + longint'(scan[0]);
      else begin
        opa = scan >> n;
        opb = scan & ((64'd1 << n) - 1);
        resp = opa + opb;
      end
      sig = misr_ref(sig, resp, out_w, pw);
    end
    return sig;
  endfunction

endpackage
