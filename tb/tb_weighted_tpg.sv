// tb_weighted_tpg: the 3-bit weighted TPG against a cycle model (Galois
// product X <- A*X, Y = X[2], W_A = parity(A & X), W_E = parity of the next
// pattern when weight-enabled, Yw = Y ? W_E : W_A) with random seeds, steps
// and weight enables; the period 2^M - 1 for every primitive A at M = 3; the
// full period 65535 of a 16-bit instance with A = x; and that the weighted
// mux passed both W_E and W_A.
module tb_weighted_tpg;
  import bist_ref_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0, load = 0, step = 0, weight_en = 0;
  logic [2:0] seed_a = '0, seed_x = '0, pattern;
  logic y, w_a, w_e, yw;
  logic [15:0] seed_a16 = '0, seed_x16 = '0, pattern16;
  logic load16 = 0, step16 = 0;
  logic y16, wa16, we16, yw16;
  int n_sel_we = 0, n_sel_wa = 0;

  always #5 clk = ~clk;

  weighted_tpg dut (.clk, .rst_n, .load, .seed_a, .seed_x, .step, .weight_en,
                    .pattern, .y, .w_a, .w_e, .yw);
  weighted_tpg #(.M(16)) dut16 (.clk, .rst_n, .load(load16), .seed_a(seed_a16),
                    .seed_x(seed_x16), .step(step16), .weight_en(1'b0),
                    .pattern(pattern16), .y(y16), .w_a(wa16), .w_e(we16), .yw(yw16));

  task automatic chk(string w, longint unsigned got, longint unsigned exp);
    checks++;
    if (got !== exp) begin
      failures++;
      if (failures < 10) $display("FAIL %s got %0h exp %0h at %0t", w, got, exp, $time);
    end
  endtask

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    longint unsigned a, x, z;
    bit we;
    repeat (2) @(posedge clk);
    chk("reset pattern", pattern, 0);
    rst_n = 1;
    // Random sessions against the model.
    for (int sess = 0; sess < 20; sess++) begin
      @(negedge clk);
      seed_a = 3'($urandom_range(7, 1)); seed_x = 3'($urandom_range(7, 1));
      load = 1; step = 1; weight_en = 1;   // load wins over step
      a = seed_a; x = seed_x; we = 0;
      @(negedge clk);
      load = 0;
      for (int c = 0; c < 100; c++) begin
        step = 1'($urandom); weight_en = 1'($urandom);
        #1;
        chk("pattern", pattern, x);
        chk("y", y, x[2]);
        chk("w_a", w_a, parity64(a & x));
        chk("w_e", w_e, we);
        chk("yw", yw, x[2] ? we : parity64(a & x));
        if (y) n_sel_we++; else n_sel_wa++;
        z = gf_mul_ref(a, x, 3, P3);
        @(negedge clk);
        if (step && weight_en) we = parity64(z);
        if (step) x = z;
      end
    end
    // Period at M = 3 for every A != 0, 1 (all are primitive in GF(8)).
    for (int ai = 2; ai < 8; ai++) begin
      bit [7:0] seen;
      int period;
      @(negedge clk);
      seed_a = 3'(ai); seed_x = 3'b001; load = 1; step = 0; weight_en = 0;
      @(negedge clk);
      load = 0; step = 1; seen = '0; period = 0;
      do begin
        seen[pattern] = 1;
        @(negedge clk);
        period++;
      end while (pattern != 3'b001 && period < 20);
      chk($sformatf("period A=%0d", ai), period, 7);
      chk($sformatf("all non-zero states A=%0d", ai), seen, 8'hFE);
    end
    step = 0;
    // Full period of a 16-bit generator with A = x.
    begin
      int period;
      @(negedge clk);
      seed_a16 = 16'h0002; seed_x16 = 16'h0001; load16 = 1;
      @(negedge clk);
      load16 = 0; step16 = 1; period = 0;
      do begin
        @(negedge clk);
        period++;
      end while (pattern16 != 16'h0001 && period < 70000);
      step16 = 0;
      chk("period M=16", period, 65535);
    end
    checks++;
    if (n_sel_we == 0 || n_sel_wa == 0) begin failures++; $display("FAIL mux inputs not both used"); end
    $display("mux picked W_E %0d times, W_A %0d times", n_sel_we, n_sel_wa);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
