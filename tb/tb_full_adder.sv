// tb_full_adder: the eight rows of the full adder truth table, listed in
// the order A, B, Cin -> Cout, S.
module tb_full_adder;
  int checks = 0, failures = 0;
  logic a, b, cin, s, cout;
  // {A, B, Cin, Cout, S}
  localparam logic [4:0] ROWS [8] = '{
    5'b000_00, 5'b100_01, 5'b010_01, 5'b110_10,
    5'b001_01, 5'b101_10, 5'b011_10, 5'b111_11
  };

  full_adder dut (.a, .b, .cin, .s, .cout);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 8; i++) begin
      {a, b, cin} = ROWS[i][4:2];
      #1;
      checks++;
      if ({cout, s} !== ROWS[i][1:0]) begin
        failures++;
        $display("FAIL %0b%0b%0b -> cout=%0b s=%0b", a, b, cin, cout, s);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
