// tb_bist_top: end-to-end test of the three BIST configurations at the
// default sizes (3-bit weighted TPG with a full adder; 32-bit weighted TPGs
// with a 4-bit ripple carry adder and a 16-bit Han-Carlson adder; 64
// patterns per session). Three sessions are run from
// one reset, each started from the DONE state of the previous one: two with
// the correct expected signatures from an independent model (all engines
// must pass) and one with corrupted ones (all must fail). It checks the
// signatures, the start-to-done latencies 1 + 64*4, 1 + 64*9 and 1 + 64*33
// clocks, and
// counts the mechanisms of the design, each of which must occur: seed load,
// weight-enabled clock pulses, the weighted mux passing W_E and passing W_A,
// scan shifts, MISR captures, a carry out of each adder, a pass and a fail.
// Mechanisms are counted in the Han-Carlson engine; carries in all three.
module tb_bist_top;
  import bist_ref_pkg::*;
  localparam int NP = 64, K = 4;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0, start = 0;
  logic [31:0] seed_a, seed_x;
  logic [1:0]  golden_fa, sig_fa;
  logic [4:0]  golden_rca, sig_rca;
  logic [16:0] golden_hc, sig_hc;
  logic busy_fa, done_fa, pass_fa, yw_fa;
  logic busy_rca, done_rca, pass_rca, busy_hc, done_hc, pass_hc, yw_rca, yw_hc;

  // Mechanism counters.
  int n_load = 0, n_weight_en = 0, n_sel_we = 0, n_sel_wa = 0, n_shift = 0;
  int n_capture = 0, n_cout_fa = 0, n_cout_rca = 0, n_cout_hc = 0, n_pass = 0, n_fail = 0;

  always #5 clk = ~clk;

  bist_top dut (
    .clk, .rst_n, .start, .seed_a, .seed_x, .golden_fa, .golden_rca, .golden_hc,
    .sig_fa, .sig_rca, .sig_hc, .busy_fa, .done_fa, .pass_fa, .yw_fa, .busy_rca, .done_rca, .pass_rca, .busy_hc, .done_hc,
    .pass_hc, .yw_rca, .yw_hc);

  always @(posedge clk) if (rst_n) begin
    if (dut.u_bist_hc.u_ctrl.tpg_load) n_load++;
    if (dut.u_bist_hc.u_ctrl.weight_en) n_weight_en++;
    if (dut.u_bist_hc.u_ctrl.tpg_step) begin
      n_shift++;
      if (dut.u_bist_hc.u_tpg.y) n_sel_we++; else n_sel_wa++;
    end
    if (dut.u_bist_hc.u_ctrl.misr_en) begin
      n_capture++;
      if (dut.u_bist_hc.cut_out[16]) n_cout_hc++;
    end
    if (dut.u_bist_rca.u_ctrl.misr_en && dut.u_bist_rca.cut_out[4]) n_cout_rca++;
    if (dut.u_bist_fa.u_ctrl.misr_en && dut.u_bist_fa.cut_out[1]) n_cout_fa++;
  end

  task automatic chk(string w, longint unsigned got, longint unsigned exp);
    checks++;
    if (got !== exp) begin
      failures++;
      if (failures < 20) $display("FAIL %s got %0h exp %0h at %0t", w, got, exp, $time);
    end
  endtask

  task automatic need(string w, int n);
    checks++;
    $display("mechanism %-22s happened %0d times", w, n);
    if (n == 0) begin failures++; $display("FAIL mechanism %s never happened", w); end
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    longint unsigned g_fa, g_rca, g_hc;
    seed_a = 32'h0000_0002; seed_x = 32'hACE1_2469;
    golden_fa = '0; golden_rca = '0; golden_hc = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int sess = 0; sess < 3; sess++) begin
      int cyc, t_fa, t_rca, t_hc;
      bit good;
      good = (sess != 1);
      @(negedge clk);
      if (sess == 2) begin seed_a = 32'h1234_5677; seed_x = 32'h0F0F_0001; end
      g_fa  = bist_golden(seed_a[2:0], seed_x[2:0], 3, P3, 1, 1, P2, NP, K);
      golden_fa  = good ? 2'(g_fa)   : 2'(g_fa) ^ 2'h1;
      g_rca = bist_golden(seed_a, seed_x, 32, P32, 0, 4, P5, NP, K);
      g_hc  = bist_golden(seed_a, seed_x, 32, P32, 0, 16, P17, NP, K);
      golden_rca = good ? 5'(g_rca)  : 5'(g_rca) ^ 5'h10;
      golden_hc  = good ? 17'(g_hc)  : 17'(g_hc) ^ 17'h1;
      start = 1;
      @(negedge clk);
      start = 0;
      cyc = 1; t_fa = 0; t_rca = 0; t_hc = 0;
      while (!(done_fa && done_rca && done_hc) && cyc < 10000) begin
        @(negedge clk); cyc++;
        if (done_fa && t_fa == 0) t_fa = cyc - 1;
        if (done_rca && t_rca == 0) t_rca = cyc - 1;
        if (done_hc && t_hc == 0) t_hc = cyc - 1;
      end
      chk("fa latency", t_fa, 1 + NP * 4);
      chk("fa signature", sig_fa, g_fa);
      chk("fa pass", pass_fa, good);
      chk("rca latency", t_rca, 1 + NP * 9);
      chk("hc latency", t_hc, 1 + NP * 33);
      chk("rca signature", sig_rca, g_rca);
      chk("hc signature", sig_hc, g_hc);
      chk("rca pass", pass_rca, good);
      chk("hc pass", pass_hc, good);
      if (pass_fa && pass_rca && pass_hc) n_pass++;
      if (!pass_fa && !pass_rca && !pass_hc) n_fail++;
      $display("session %0d: sig_fa=%0h sig_rca=%0h sig_hc=%0h pass=%0b%0b%0b", sess,
               sig_fa, sig_rca, sig_hc, pass_fa, pass_rca, pass_hc);
    end
    need("seed load", n_load);
    need("weight enabled clock", n_weight_en);
    need("mux passes W_E", n_sel_we);
    need("mux passes W_A", n_sel_wa);
    need("scan shift", n_shift);
    need("MISR capture", n_capture);
    need("full adder carry out", n_cout_fa);
    need("RCA carry out", n_cout_rca);
    need("HC carry out", n_cout_hc);
    need("signature pass", n_pass);
    need("signature fail", n_fail);
    chk("captures", n_capture, 3 * NP);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
