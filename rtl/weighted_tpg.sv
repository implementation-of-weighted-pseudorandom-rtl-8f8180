// weighted_tpg: weighted pseudorandom test pattern generator built on a
// Galois-field multiplication.
//
// An M-bit register X (the chain of D flip-flops) holds the current pattern.
// Each step it is replaced by Z = A * X in GF(2^M), where A is the pseudo
// primary seed held in a second register; with A = x (the value 2) this is
// the ordinary internal-XOR LFSR, and with any primitive element A the
// patterns run through all 2^M - 1 non-zero values before repeating. From
// each pattern three bits are formed:
//   Y   - the pseudorandom output, the last flip-flop X[M-1];
//   W_A - the actual weight, parity of (A AND X), i.e. W(Z) = sum W(a_i)W(x_i)
//         taken modulo 2 by an XOR tree;
//   W_E - the estimated weight: parity of the next pattern, captured by the
//         weight generator only when weight_en is high.
// The weighted mux then sends W_E (Y = 1) or W_A (Y = 0) out as Yw.
// The paper gives the blocks (register chain, Galois operation on seeds A
// and X, weight generator with a weight enabled clock, weighted mux) and the
// weight equations; the update X <- A*X, taking Y from the last flip-flop,
// the seed registers and the reset values are this design's reading.
//
// Interface: load (1 cycle) takes seed_a and seed_x and clears W_E; step
// advances one pattern per clock; weight_en enables the weight generator
// (it acts only together with step). pattern, y and w_a come from the
// registers of the current cycle, w_e from the weight register, and yw
// combinationally from them; load has priority over step. Asynchronous
// active-low reset clears all registers (a cleared generator stays at 0 until
// loaded). Seeds must be non-zero for a useful sequence.
module weighted_tpg
  import gf_pkg::*;
#(
  parameter int unsigned      M    = 3,
  parameter logic [MAX_M-1:0] POLY = prim_poly(M)
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         load,
  input  logic [M-1:0] seed_a,
  input  logic [M-1:0] seed_x,
  input  logic         step,
  input  logic         weight_en,
  output logic [M-1:0] pattern,
  output logic         y,
  output logic         w_a,
  output logic         w_e,
  output logic         yw
);

  logic [M-1:0] a_q;   // pseudo primary seed A
  logic [M-1:0] x_q;   // current pattern X[i]
  logic [M-1:0] z;     // next pattern Z = A * X[i]

  gf_multiplier #(.M(M), .POLY(POLY)) u_galois (
    .a (a_q),
    .x (x_q),
    .z (z)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      a_q <= '0;
      x_q <= '0;
    end else if (load) begin
      a_q <= seed_a;
      x_q <= seed_x;
    end else if (step) begin
      x_q <= z;
    end
  end

  weight_generator #(.M(M)) u_weight (
    .clk       (clk),
    .rst_n     (rst_n),
    .clear     (load),
    .weight_en (weight_en && step),
    .z_next    (z),
    .w_e       (w_e)
  );

  assign pattern = x_q;
  assign y       = x_q[M-1];
  assign w_a     = ^(a_q & x_q);

  weighted_mux u_wmux (
    .w_e (w_e),
    .w_a (w_a),
    .y   (y),
    .yw  (yw)
  );

  // A zero seed would lock the generator at zero.
  property p_seed_nonzero;
    @(posedge clk) disable iff (!rst_n) load |-> (seed_a != '0 && seed_x != '0);
  endproperty
  a_seed_nonzero : assert property (p_seed_nonzero)
    else $error("weighted_tpg: zero seed loaded");

endmodule
