// bist_top: the BIST configurations of the weighted pseudorandom TPG, side
// by side.
//
// The weighted TPG is evaluated inside a test-per-scan BIST whose circuit
// under test is an adder. This top holds three engines:
//   u_bist_fa   the 3-bit weighted TPG testing one full adder, a three-input
//               combinational circuit;
//   u_bist_rca  a 32-bit weighted TPG testing a 4-bit ripple carry adder;
//   u_bist_hc   a 32-bit weighted TPG testing a 16-bit Han-Carlson adder.
// They share clock, reset and start but nothing else; each has its own seeds
// (the 3-bit engine takes the low bits of the shared ones), expected
// signature, result and weighted TPG output. Sizes follow the paper (3-bit
// and 32-bit generators, 4-bit and 16-bit adders); the number of patterns per
// session and the weight enable spacing are this design's choices.
//
// Timing: after start is sampled, done_fa rises after 1 + NUM_PATTERNS*4
// clocks, done_rca after 1 + NUM_PATTERNS*(2*RCA_N+1) and done_hc after
// 1 + NUM_PATTERNS*(2*HC_N+1).
module bist_top
  import gf_pkg::*;
#(
  parameter int unsigned FA_TPG_W     = 3,
  parameter int unsigned TPG_W        = 32,
  parameter int unsigned RCA_N        = 4,
  parameter int unsigned HC_N         = 16,
  parameter int unsigned NUM_PATTERNS = 64,
  parameter int unsigned WEIGHT_K     = 4
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             start,
  input  logic [TPG_W-1:0] seed_a,
  input  logic [TPG_W-1:0] seed_x,
  input  logic [1:0]       golden_fa,
  input  logic [RCA_N:0]   golden_rca,
  input  logic [HC_N:0]    golden_hc,
  output logic [1:0]       sig_fa,
  output logic [RCA_N:0]   sig_rca,
  output logic [HC_N:0]    sig_hc,
  output logic             busy_fa,
  output logic             done_fa,
  output logic             pass_fa,
  output logic             busy_rca,
  output logic             done_rca,
  output logic             pass_rca,
  output logic             busy_hc,
  output logic             done_hc,
  output logic             pass_hc,
  output logic             yw_fa,
  output logic             yw_rca,
  output logic             yw_hc
);

  bist_engine #(
    .CUT (CUT_FA), .N (1), .TPG_W (FA_TPG_W),
    .NUM_PATTERNS (NUM_PATTERNS), .WEIGHT_K (WEIGHT_K)
  ) u_bist_fa (
    .clk       (clk),
    .rst_n     (rst_n),
    .start     (start),
    .seed_a    (seed_a[FA_TPG_W-1:0]),
    .seed_x    (seed_x[FA_TPG_W-1:0]),
    .golden    (golden_fa),
    .signature (sig_fa),
    .busy      (busy_fa),
    .done      (done_fa),
    .pass      (pass_fa),
    .yw        (yw_fa),
    .cut_in    (),
    .cut_out   ()
  );

  bist_engine #(
    .CUT (CUT_RCA), .N (RCA_N), .TPG_W (TPG_W),
    .NUM_PATTERNS (NUM_PATTERNS), .WEIGHT_K (WEIGHT_K)
  ) u_bist_rca (
    .clk       (clk),
    .rst_n     (rst_n),
    .start     (start),
    .seed_a    (seed_a),
    .seed_x    (seed_x),
    .golden    (golden_rca),
    .signature (sig_rca),
    .busy      (busy_rca),
    .done      (done_rca),
    .pass      (pass_rca),
    .yw        (yw_rca),
    .cut_in    (),
    .cut_out   ()
  );

  bist_engine #(
    .CUT (CUT_HC), .N (HC_N), .TPG_W (TPG_W),
    .NUM_PATTERNS (NUM_PATTERNS), .WEIGHT_K (WEIGHT_K)
  ) u_bist_hc (
    .clk       (clk),
    .rst_n     (rst_n),
    .start     (start),
    .seed_a    (seed_a),
    .seed_x    (seed_x),
    .golden    (golden_hc),
    .signature (sig_hc),
    .busy      (busy_hc),
    .done      (done_hc),
    .pass      (pass_hc),
    .yw        (yw_hc),
    .cut_in    (),
    .cut_out   ()
  );

endmodule
