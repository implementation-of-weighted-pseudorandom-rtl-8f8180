// tb_weight_generator: drives random patterns, enables and clears into the
// weight generator and compares W_E each cycle with a model register that
// takes the parity of the pattern when enabled and clears on clear.
module tb_weight_generator;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0, clear = 0, weight_en = 0;
  logic [7:0] z_next = '0;
  logic w_e;
  bit model = 0;
  int n_load = 0, n_hold = 0;

  always #5 clk = ~clk;

  weight_generator #(.M(8)) dut (.clk, .rst_n, .clear, .weight_en, .z_next, .w_e);

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(posedge clk);
    checks++; if (w_e !== 1'b0) failures++;
    rst_n = 1;
    for (int i = 0; i < 2000; i++) begin
      @(negedge clk);
      z_next = 8'($urandom); weight_en = ($urandom % 3) == 0; clear = ($urandom % 50) == 0;
      @(posedge clk);
      if (clear) model = 0;
      else if (weight_en) begin model = 0; for (int b = 0; b < 8; b++) model ^= z_next[b]; n_load++; end
      else n_hold++;
      #1;
      checks++;
      if (w_e !== model) begin
        failures++;
        if (failures < 10) $display("FAIL cycle %0d: w_e=%0b model=%0b", i, w_e, model);
      end
    end
    checks++; if (n_load < 100 || n_hold < 100) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
