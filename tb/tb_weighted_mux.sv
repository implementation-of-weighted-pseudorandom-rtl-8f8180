// tb_weighted_mux: all eight input combinations of the weighted mux; Y = 1
// must pass W_E, Y = 0 must pass W_A.
module tb_weighted_mux;
  int checks = 0, failures = 0;
  logic w_e, w_a, y, yw;

  weighted_mux dut (.w_e, .w_a, .y, .yw);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 8; i++) begin
      {y, w_e, w_a} = 3'(i);
      #1;
      checks++;
      if (yw !== (i >= 4 ? ((i >> 1) & 1) : (i & 1))) begin
        failures++;
        $display("FAIL y=%0b w_e=%0b w_a=%0b yw=%0b", y, w_e, w_a, yw);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
