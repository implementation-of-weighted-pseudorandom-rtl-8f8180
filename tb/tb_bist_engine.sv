// tb_bist_engine: runs a ripple-carry BIST engine and a Han-Carlson BIST
// engine (both at their default 32-bit TPG and 64 patterns) and a full-adder
// engine with a 3-bit TPG, with random seeds. The expected signature comes from an independent model of the whole
// session; with it pass must rise, with a corrupted one it must not. The
// CUT response is compared with integer addition of the applied pattern on
// every cycle, and done must rise 1 + 64*(IN_W+1) clocks after start.
module tb_bist_engine;
  import gf_pkg::*;
  import bist_ref_pkg::*;
  localparam int NP = 64, K = 4;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0, start = 0;
  logic [31:0] seed_a, seed_x;
  logic [4:0]  golden4, sig4, out4;
  logic [16:0] golden16, sig16, out16;
  logic [7:0]  in4;
  logic [31:0] in16;
  logic busy4, done4, pass4, yw4, busy16, done16, pass16, yw16;
  logic [2:0]  seed_a3, seed_x3, in3;
  logic [1:0]  golden3, sig3, out3;
  logic busy3, done3, pass3, yw3;

  always #5 clk = ~clk;

  bist_engine #(.CUT(CUT_RCA), .N(4)) dut4 (
    .clk, .rst_n, .start, .seed_a, .seed_x, .golden(golden4), .signature(sig4),
    .busy(busy4), .done(done4), .pass(pass4), .yw(yw4), .cut_in(in4), .cut_out(out4));
  bist_engine #(.CUT(CUT_HC), .N(16)) dut16 (
    .clk, .rst_n, .start, .seed_a, .seed_x, .golden(golden16), .signature(sig16),
    .busy(busy16), .done(done16), .pass(pass16), .yw(yw16), .cut_in(in16), .cut_out(out16));
  bist_engine #(.CUT(CUT_FA), .N(1), .TPG_W(3)) dut3 (
    .clk, .rst_n, .start, .seed_a(seed_a3), .seed_x(seed_x3), .golden(golden3), .signature(sig3),
    .busy(busy3), .done(done3), .pass(pass3), .yw(yw3), .cut_in(in3), .cut_out(out3));

  task automatic chk(string w, longint unsigned got, longint unsigned exp);
    checks++;
    if (got !== exp) begin
      failures++;
      if (failures < 20) $display("FAIL %s got %0h exp %0h at %0t", w, got, exp, $time);
    end
  endtask

  // CUT response equals the sum of the applied operands, every cycle.
  always @(negedge clk) if (rst_n) begin
    chk("rca out", out4, longint'(in4[7:4]) + longint'(in4[3:0]));
    chk("hc out", out16, longint'(in16[31:16]) + longint'(in16[15:0]));
    chk("fa out", out3, longint'(in3[2]) + longint'(in3[1]) + longint'(in3[0]));
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    longint unsigned g4, g16, g3;
    seed_a = 32'h2; seed_x = 32'h1; golden4 = '0; golden16 = '0; golden3 = '0;
    seed_a3 = 3'h2; seed_x3 = 3'h1;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int run = 0; run < 4; run++) begin
      int cyc, t4, t16, t3;
      @(negedge clk);
      if (run > 0) begin
        seed_a = $urandom | 32'h2; seed_x = $urandom | 32'h1;
      end
      seed_a3 = 3'($urandom_range(7, 1)); seed_x3 = 3'($urandom_range(7, 1));
      g3  = bist_golden(seed_a3, seed_x3, 3, P3, 1, 1, P2, NP, K);
      golden3 = (run % 2 == 1) ? 2'(g3) ^ 2'h2 : 2'(g3);
      g4  = bist_golden(seed_a, seed_x, 32, P32, 0, 4, P5, NP, K);
      g16 = bist_golden(seed_a, seed_x, 32, P32, 0, 16, P17, NP, K);
      // Odd runs give a wrong golden value: pass must stay low.
      golden4  = (run % 2 == 1) ? 5'(g4) ^ 5'h1 : 5'(g4);
      golden16 = (run % 2 == 1) ? 17'(g16) ^ 17'h100 : 17'(g16);
      start = 1;
      @(negedge clk);
      start = 0;
      cyc = 1; t4 = 0; t16 = 0; t3 = 0;
      while (!(done4 && done16 && done3) && cyc < 5000) begin
        @(negedge clk); cyc++;
        if (done3 && t3 == 0) t3 = cyc - 1;
        if (done4 && t4 == 0) t4 = cyc - 1;
        if (done16 && t16 == 0) t16 = cyc - 1;
      end
      chk("rca latency", t4, 1 + NP * (2 * 4 + 1));
      chk("hc latency", t16, 1 + NP * (2 * 16 + 1));
      chk("rca signature", sig4, g4);
      chk("hc signature", sig16, g16);
      chk("fa latency", t3, 1 + NP * 4);
      chk("fa signature", sig3, g3);
      chk("fa pass", pass3, run % 2 == 0);
      chk("rca pass", pass4, run % 2 == 0);
      chk("hc pass", pass16, run % 2 == 0);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
