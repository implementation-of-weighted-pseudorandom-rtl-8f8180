// tb_misr: random response words, enables and clears into the 5-bit MISR
// against the long-division model with x^5+x^2+1; also checks that a single
// flipped response bit changes the final signature.
module tb_misr;
  import bist_ref_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0, clear = 0, en = 0;
  logic [4:0] d = '0, sig;
  longint unsigned model = 0;

  always #5 clk = ~clk;

  misr dut (.clk, .rst_n, .clear, .en, .d, .sig);

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [4:0] words [32];
    logic [4:0] good;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < 3000; i++) begin
      @(negedge clk);
      d = 5'($urandom); en = 1'($urandom); clear = ($urandom % 40) == 0;
      @(posedge clk);
      if (clear) model = 0;
      else if (en) model = misr_ref(model, d, 5, P5);
      #1;
      checks++;
      if (sig !== 5'(model)) begin
        failures++;
        if (failures < 10) $display("FAIL cycle %0d sig=%0h model=%0h", i, sig, model);
      end
    end
    // Aliasing check: one bit error in a 32-word stream is always caught.
    foreach (words[i]) words[i] = 5'($urandom);
    for (int run = 0; run < 2; run++) begin
      @(negedge clk); clear = 1; en = 0;
      @(negedge clk); clear = 0; en = 1;
      foreach (words[i]) begin
        d = (run == 1 && i == 7) ? words[i] ^ 5'b00100 : words[i];
        @(negedge clk);
      end
      en = 0;
      if (run == 0) good = sig;
    end
    checks++;
    if (sig === good) begin failures++; $display("FAIL single-bit error not detected"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
