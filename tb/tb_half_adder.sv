// tb_half_adder: the four rows of the half adder truth table.
module tb_half_adder;
  int checks = 0, failures = 0;
  logic a, b, sum, carry;
  // rows {a, b} = 00, 01, 10, 11 -> {carry, sum}
  localparam logic [1:0] EXP [4] = '{2'b00, 2'b01, 2'b01, 2'b10};

  half_adder dut (.a, .b, .sum, .carry);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 4; i++) begin
      {a, b} = 2'(i);
      #1;
      checks++;
      if ({carry, sum} !== EXP[i]) begin
        failures++;
        $display("FAIL a=%0b b=%0b -> carry=%0b sum=%0b", a, b, carry, sum);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
