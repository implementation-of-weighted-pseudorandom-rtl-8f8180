// tb_ripple_carry_adder: every input of the 4-bit adder (512 cases) and
// random inputs of a 12-bit instance, against integer addition.
module tb_ripple_carry_adder;
  int checks = 0, failures = 0;
  logic [3:0]  a4, b4, s4;
  logic        c4, co4;
  logic [11:0] a12, b12, s12;
  logic        c12, co12;

  ripple_carry_adder            dut4  (.a(a4),  .b(b4),  .cin(c4),  .sum(s4),  .cout(co4));
  ripple_carry_adder #(.N(12))  dut12 (.a(a12), .b(b12), .cin(c12), .sum(s12), .cout(co12));

  initial begin
    #10_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 512; i++) begin
      {c4, a4, b4} = 9'(i);
      #1;
      checks++;
      if ({co4, s4} !== 5'(int'(a4) + int'(b4) + int'(c4))) begin
        failures++;
        if (failures < 10) $display("FAIL %0d+%0d+%0d = %0d", a4, b4, c4, {co4, s4});
      end
    end
    for (int i = 0; i < 5000; i++) begin
      a12 = 12'($urandom); b12 = 12'($urandom); c12 = 1'($urandom);
      #1;
      checks++;
      if ({co12, s12} !== 13'(int'(a12) + int'(b12) + int'(c12))) begin
        failures++;
        if (failures < 10) $display("FAIL12 %0d+%0d+%0d = %0d", a12, b12, c12, {co12, s12});
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
