// tb_scan_chain: random shift enables and scan-in bits against a model
// shift register; checks the parallel contents and the scan-out each cycle.
module tb_scan_chain;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0, shift = 0, si = 0;
  logic [7:0] q;
  logic so;
  logic [7:0] model = '0;

  always #5 clk = ~clk;

  scan_chain dut (.clk, .rst_n, .shift, .si, .q, .so);

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(posedge clk);
    checks++; if (q !== 8'h00) failures++;
    rst_n = 1;
    for (int i = 0; i < 3000; i++) begin
      @(negedge clk);
      shift = 1'($urandom); si = 1'($urandom);
      @(posedge clk);
      if (shift) model = {model[6:0], si};
      #1;
      checks++;
      if (q !== model || so !== model[7]) begin
        failures++;
        if (failures < 10) $display("FAIL cycle %0d q=%0h model=%0h", i, q, model);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
