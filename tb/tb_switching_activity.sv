// tb_switching_activity: measures the switching activity of the scan-in
// stream, the quantity the weighted generator is meant to reduce. A 32-bit
// weighted TPG is stepped for 20000 cycles with the weight enable on every
// 4th cycle, as in the BIST. It counts transitions of the plain pseudorandom
// bit Y and of the weighted bit Yw, and for each k in 1..8 the transitions
// of Yw from a bit-level model (also for a second seed pair), checks the RTL count against the model for
// k = 4, and prints the transition rates and the fraction of ones in Yw. The RTL is also checked bit by
// bit against the model on every cycle.
module tb_switching_activity;
  import bist_ref_pkg::*;
  localparam int CYCLES = 20000, K = 4;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0, load = 0, step = 0, weight_en = 0;
  logic [31:0] seed_a = 32'h2, seed_x = 32'h1, pattern;
  logic y, w_a, w_e, yw;
  int kc = 0;

  always #5 clk = ~clk;

  weighted_tpg #(.M(32)) dut (.clk, .rst_n, .load, .seed_a, .seed_x, .step, .weight_en,
                              .pattern, .y, .w_a, .w_e, .yw);

  // Transitions of Yw in the model for weight enable spacing k.
  function automatic int model_toggles(longint unsigned a, longint unsigned x0, int k, int n);
    longint unsigned x, z;
    bit we, yw_m, prev;
    int t;
    x = x0; we = 0; t = 0; prev = 0;
    for (int c = 0; c < n; c++) begin
      yw_m = x[31] ? we : parity64(a & x);
      if (c > 0 && yw_m != prev) t++;
      prev = yw_m;
      z = gf_mul_ref(a, x, 32, P32);
      if (c % k == k - 1) we = parity64(z);
      x = z;
    end
    return t;
  endfunction

  initial begin
    repeat (CYCLES + 1000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int ty = 0, tyw = 0, tm, ones = 0;
    bit py, pyw;
    longint unsigned x, z;
    bit we;
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(negedge clk); load = 1;
    @(negedge clk); load = 0; step = 1;
    x = 1; we = 0;
    for (int c = 0; c < CYCLES; c++) begin
      weight_en = (kc == K - 1);
      kc = (kc + 1) % K;
      #1;
      checks++;
      if (yw !== (x[31] ? we : parity64(32'h2 & x))) failures++;
      if (c > 0) begin
        if (y != py) ty++;
        if (yw != pyw) tyw++;
      end
      py = y; pyw = yw;
      if (yw) ones++;
      z = gf_mul_ref(2, x, 32, P32);
      if (weight_en) we = parity64(z);
      x = z;
      @(negedge clk);
    end
    tm = model_toggles(2, 1, K, CYCLES);
    checks++;
    if (tm != tyw) begin failures++; $display("FAIL Yw toggles %0d, model %0d", tyw, tm); end
    checks++;
    if (ty == 0 || tyw == 0) failures++;
    $display("over %0d cycles: Y toggles %0d (%0.3f per bit), Yw toggles %0d (%0.3f per bit)",
             CYCLES, ty, real'(ty) / (CYCLES - 1), tyw, real'(tyw) / (CYCLES - 1));
    $display("fraction of ones in Yw: %0.3f", real'(ones) / CYCLES);
    for (int k = 1; k <= 8; k++) begin
      int t, t2;
      t  = model_toggles(2, 1, k, CYCLES);
      t2 = model_toggles(64'h1234_5677, 64'h0F0F_0001, k, CYCLES);
      $display("  weight enable every %0d cycles: Yw toggles %0.3f per bit (A=2), %0.3f (A=12345677)",
               k, real'(t) / (CYCLES - 1), real'(t2) / (CYCLES - 1));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
