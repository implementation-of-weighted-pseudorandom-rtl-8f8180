// tb_han_carlson_adder: the 16-bit adder on corner cases (long carry chains)
// and random operands, every input of a 4-bit instance, and random operands
// of 2-bit and 32-bit instances, all against integer addition.
module tb_han_carlson_adder;
  int checks = 0, failures = 0;
  logic [15:0] a16, b16, s16;  logic co16;
  logic [3:0]  a4,  b4,  s4;   logic co4;
  logic [1:0]  a2,  b2,  s2;   logic co2;
  logic [31:0] a32, b32, s32;  logic co32;

  han_carlson_adder            dut16 (.a(a16), .b(b16), .sum(s16), .cout(co16));
  han_carlson_adder #(.N(4))   dut4  (.a(a4),  .b(b4),  .sum(s4),  .cout(co4));
  han_carlson_adder #(.N(2))   dut2  (.a(a2),  .b(b2),  .sum(s2),  .cout(co2));
  han_carlson_adder #(.N(32))  dut32 (.a(a32), .b(b32), .sum(s32), .cout(co32));

  task automatic chk(string w, longint unsigned got, longint unsigned exp);
    checks++;
    if (got !== exp) begin
      failures++;
      if (failures < 10) $display("FAIL %s got %0h exp %0h", w, got, exp);
    end
  endtask

  initial begin
    #10_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [15:0] corner [6] = '{16'h0000, 16'hFFFF, 16'h0001, 16'h8000, 16'h5555, 16'hAAAA};
    foreach (corner[i]) foreach (corner[j]) begin
      a16 = corner[i]; b16 = corner[j]; #1;
      chk("16c", {co16, s16}, longint'(a16) + longint'(b16));
    end
    for (int i = 0; i < 256; i++) begin
      {a4, b4} = 8'(i); #1;
      chk("4", {co4, s4}, longint'(a4) + longint'(b4));
    end
    for (int i = 0; i < 16; i++) begin
      {a2, b2} = 4'(i); #1;
      chk("2", {co2, s2}, longint'(a2) + longint'(b2));
    end
    for (int i = 0; i < 20000; i++) begin
      a16 = 16'($urandom); b16 = 16'($urandom);
      a32 = $urandom; b32 = $urandom; #1;
      chk("16", {co16, s16}, longint'(a16) + longint'(b16));
      chk("32", {co32, s32}, longint'(a32) + longint'(b32));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
