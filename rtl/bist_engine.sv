// bist_engine: one complete test-per-scan BIST around a combinational
// circuit under test (CUT).
//
// The weighted TPG produces one weighted bit Yw per clock; the scan chain
// collects IN_W of them into one test pattern and applies it in parallel to
// the CUT; the CUT response is compacted by the MISR; the controller
// sequences NUM_PATTERNS patterns and compares the final signature with
// golden. CUT selects the circuit:
//   CUT_RCA  N-bit ripple carry adder, carry in grounded: pattern upper half
//            is operand A, lower half operand B; response {cout, sum};
//   CUT_HC   N-bit Han-Carlson adder, same pattern and response layout;
//   CUT_FA   one full adder (a three-input circuit): pattern bits 2, 1, 0
//            are A, B, Cin; response {cout, s}.
// IN_W = 2N (3 for CUT_FA) and OUT_W = N+1 (2 for CUT_FA) come from gf_pkg.
// The chain TPG -> scan chain -> CUT -> MISR and the three circuits follow
// the paper; the single chain, the operand split and the counts are this
// design's choices. The TPG is 32 bits wide by default, the size the paper
// gives for its generator.
//
// Interface: start, seeds and golden in; signature, status and the observed
// CUT pattern/response out. Timing as bist_controller: done rises
// 1 + NUM_PATTERNS*(IN_W+1) clocks after start is sampled.
module bist_engine
  import gf_pkg::*;
#(
  parameter cut_e        CUT          = CUT_RCA,
  parameter int unsigned N            = 4,
  parameter int unsigned TPG_W        = 32,
  parameter int unsigned NUM_PATTERNS = 64,
  parameter int unsigned WEIGHT_K     = 4
) (
  input  logic                         clk,
  input  logic                         rst_n,
  input  logic                         start,
  input  logic [TPG_W-1:0]             seed_a,
  input  logic [TPG_W-1:0]             seed_x,
  input  logic [cut_out_w(CUT, N)-1:0] golden,
  output logic [cut_out_w(CUT, N)-1:0] signature,
  output logic                         busy,
  output logic                         done,
  output logic                         pass,
  output logic                         yw,
  output logic [cut_in_w(CUT, N)-1:0]  cut_in,
  output logic [cut_out_w(CUT, N)-1:0] cut_out
);

  localparam int unsigned IN_W  = cut_in_w(CUT, N);
  localparam int unsigned OUT_W = cut_out_w(CUT, N);

  logic tpg_load, tpg_step, weight_en, scan_shift, misr_clear, misr_en;

  bist_controller #(
    .SCAN_LEN     (IN_W),
    .NUM_PATTERNS (NUM_PATTERNS),
    .WEIGHT_K     (WEIGHT_K),
    .SIG_W        (OUT_W)
  ) u_ctrl (
    .clk        (clk),
    .rst_n      (rst_n),
    .start      (start),
    .signature  (signature),
    .golden     (golden),
    .tpg_load   (tpg_load),
    .tpg_step   (tpg_step),
    .weight_en  (weight_en),
    .scan_shift (scan_shift),
    .misr_clear (misr_clear),
    .misr_en    (misr_en),
    .busy       (busy),
    .done       (done),
    .pass       (pass)
  );

  weighted_tpg #(.M(TPG_W)) u_tpg (
    .clk       (clk),
    .rst_n     (rst_n),
    .load      (tpg_load),
    .seed_a    (seed_a),
    .seed_x    (seed_x),
    .step      (tpg_step),
    .weight_en (weight_en),
    .pattern   (),
    .y         (),
    .w_a       (),
    .w_e       (),
    .yw        (yw)
  );

  scan_chain #(.LEN(IN_W)) u_scan (
    .clk   (clk),
    .rst_n (rst_n),
    .shift (scan_shift),
    .si    (yw),
    .q     (cut_in),
    .so    ()
  );

  if (CUT == CUT_FA) begin : g_fa
    full_adder u_cut (
      .a    (cut_in[2]),
      .b    (cut_in[1]),
      .cin  (cut_in[0]),
      .s    (cut_out[0]),
      .cout (cut_out[1])
    );
  end else if (CUT == CUT_HC) begin : g_hc
    han_carlson_adder #(.N(N)) u_cut (
      .a    (cut_in[2*N-1:N]),
      .b    (cut_in[N-1:0]),
      .sum  (cut_out[N-1:0]),
      .cout (cut_out[N])
    );
  end else begin : g_rca
    ripple_carry_adder #(.N(N)) u_cut (
      .a    (cut_in[2*N-1:N]),
      .b    (cut_in[N-1:0]),
      .cin  (1'b0),
      .sum  (cut_out[N-1:0]),
      .cout (cut_out[N])
    );
  end

  misr #(.W(OUT_W)) u_misr (
    .clk   (clk),
    .rst_n (rst_n),
    .clear (misr_clear),
    .en    (misr_en),
    .d     (cut_out),
    .sig   (signature)
  );

endmodule
