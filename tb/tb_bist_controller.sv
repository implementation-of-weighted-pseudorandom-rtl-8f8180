// tb_bist_controller: a small controller (SCAN_LEN = 3, 4 patterns,
// weight enable every 2nd shift) is run twice; each cycle's strobes are
// compared with the expected schedule LOAD, (3 x SHIFT, CAPTURE) x 4, DONE,
// the start-to-done latency 1 + 4*(3+1) = 17 is checked, and pass must
// follow the signature comparison.
module tb_bist_controller;
  localparam int L = 3, NP = 4, K = 2;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0, start = 0;
  logic [4:0] signature = 5'h0A, golden = 5'h0A;
  logic tpg_load, tpg_step, weight_en, scan_shift, misr_clear, misr_en, busy, done, pass;

  always #5 clk = ~clk;

  bist_controller #(.SCAN_LEN(L), .NUM_PATTERNS(NP), .WEIGHT_K(K), .SIG_W(5)) dut (
    .clk, .rst_n, .start, .signature, .golden, .tpg_load, .tpg_step, .weight_en,
    .scan_shift, .misr_clear, .misr_en, .busy, .done, .pass);

  task automatic chk(string w, int got, int exp);
    checks++;
    if (got !== exp) begin
      failures++;
      if (failures < 20) $display("FAIL %s got %0d exp %0d at %0t", w, got, exp, $time);
    end
  endtask

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    chk("idle done", done, 0); chk("idle busy", busy, 0);
    for (int run = 0; run < 2; run++) begin
      int cyc, kc;
      @(negedge clk);
      start = 1;
      @(negedge clk);
      start = 0;
      cyc = 1;
      // LOAD
      chk("load", tpg_load, 1); chk("clear", misr_clear, 1); chk("busy", busy, 1);
      chk("load step", tpg_step, 0);
      @(negedge clk); cyc++;
      kc = 0;
      for (int p = 0; p < NP; p++) begin
        for (int s = 0; s < L; s++) begin
          chk("shift", scan_shift, 1); chk("step", tpg_step, 1); chk("no cap", misr_en, 0);
          chk("weight_en", weight_en, kc == K - 1);
          kc = (kc + 1) % K;
          @(negedge clk); cyc++;
        end
        chk("capture", misr_en, 1); chk("cap no shift", scan_shift, 0); chk("cap done", done, 0);
        @(negedge clk); cyc++;
      end
      chk("done", done, 1); chk("busy end", busy, 0);
      chk("latency", cyc - 1, 1 + NP * (L + 1));
      chk("pass", pass, 1);
      golden = 5'h0B; #1;
      chk("fail", pass, 0);
      golden = 5'h0A;
      repeat (3) @(negedge clk);
      chk("holds done", done, 1);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
