// tb_gf_multiplier: checks the GF(2^M) multiplier at M = 3 (all 64 operand
// pairs), at M = 8 with the AES polynomial (published products and random
// pairs) and at M = 32 (random pairs), against a carry-less multiply and
// long division model. Also checks that every polynomial of the design's
// table is primitive: up to degree 20 by stepping x through its whole
// period, and for all degrees 2..32 by the order test on the prime factors
// of 2^m - 1.
module tb_gf_multiplier;
  import gf_pkg::*;
  import bist_ref_pkg::*;

  int checks = 0, failures = 0;
  logic clk = 0;
  always #5 clk = ~clk;

  logic [2:0]  a3, x3, z3;
  logic [7:0]  a8, x8, z8;
  logic [31:0] a32, x32, z32;

  gf_multiplier                          dut3  (.a(a3),  .x(x3),  .z(z3));
  gf_multiplier #(.M(8), .POLY(32'h1B))  dut8  (.a(a8),  .x(x8),  .z(z8));
  gf_multiplier #(.M(32))                dut32 (.a(a32), .x(x32), .z(z32));

  // x^e modulo the full polynomial pf of degree m, by square and multiply.
  function automatic longint unsigned gf_pow_x(longint unsigned e, int m, longint unsigned pf);
    longint unsigned r, b;
    r = 1; b = 2;
    while (e != 0) begin
      if (e[0]) r = gf_mul_ref(r, b, m, pf);
      b = gf_mul_ref(b, b, m, pf);
      e >>= 1;
    end
    return r;
  endfunction

  task automatic check(string what, longint unsigned got, longint unsigned exp);
    checks++;
    if (got !== exp) begin
      failures++;
      if (failures < 10) $display("FAIL %s: got %0h expected %0h", what, got, exp);
    end
  endtask

  initial begin
    #1_000_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 8; i++)
      for (int j = 0; j < 8; j++) begin
        a3 = 3'(i); x3 = 3'(j); #1;
        check("M=3", z3, gf_mul_ref(i, j, 3, P3));
      end
    // Published AES field products.
    a8 = 8'h57; x8 = 8'h83; #1; check("AES 57*83", z8, 8'hC1);
    a8 = 8'h57; x8 = 8'h13; #1; check("AES 57*13", z8, 8'hFE);
    for (int i = 0; i < 2000; i++) begin
      a8 = 8'($urandom); x8 = 8'($urandom); #1;
      check("M=8", z8, gf_mul_ref(a8, x8, 8, 64'h11B));
      a32 = $urandom; x32 = $urandom; #1;
      check("M=32", z32, gf_mul_ref(a32, x32, 32, P32));
      check("M=32 commutes", z32, gf_mul_ref(x32, a32, 32, P32));
    end
    // Primitive polynomial table: order of x is 2^m - 1.
    for (int m = 2; m <= 20; m++) begin
      longint unsigned pf, v;
      int order;
      pf = (64'd1 << m) | longint'(prim_poly(m));
      v = 1; order = 0;
      do begin
        v = gf_mul_ref(v, 2, m, pf);
        order++;
      end while (v != 1 && order < (1 << m));
      check($sformatf("order of x, m=%0d", m), order, (1 << m) - 1);
    end
    // Every degree 2..32: x^(2^m-1) = 1 and x^((2^m-1)/p) != 1 for each prime
    // factor p of 2^m-1 (factors found by trial division).
    for (int m = 2; m <= 32; m++) begin
      longint unsigned pf, n, r, p;
      bit ok;
      pf = (64'd1 << m) | longint'(prim_poly(m));
      n = (64'd1 << m) - 1;
      ok = (gf_pow_x(n, m, pf) == 1);
      r = n; p = 2;
      while (p * p <= r) begin
        if (r % p == 0) begin
          if (gf_pow_x(n / p, m, pf) == 1) ok = 0;
          while (r % p == 0) r = r / p;
        end
        p++;
      end
      if (r > 1 && gf_pow_x(n / r, m, pf) == 1) ok = 0;
      check($sformatf("primitive, m=%0d", m), ok, 1);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
