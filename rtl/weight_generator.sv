// weight_generator: the "weight generator (D)" of the weighted TPG.
//
// A single D flip-flop that, on a clock edge where weight_en (the weight
// enabled clock) is high, stores the weight of the pattern the generator is
// about to move to: W_E = W(Z[i+1]), where the weight of a vector is its
// parity (0 for an even number of ones, 1 for an odd number). Between enables
// it holds, so W_E is an estimate taken every k-th cycle and reused for the
// cycles in between. The paper gives the flip-flop, its enable and the
// parity meaning of a weight; building the weight enabled clock as a clock
// enable on the common clock, and clearing to 0 on reset and on a new seed
// load (so every test session starts from the same state), are this design's
// choices.
//
// Interface: z_next (M bits), weight_en, clear in; w_e out. One register,
// updated on the rising edge of clk: clear has priority over weight_en.
// Asynchronous active-low reset.
module weight_generator #(
  parameter int unsigned M = 3
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         clear,
  input  logic         weight_en,
  input  logic [M-1:0] z_next,
  output logic         w_e
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)         w_e <= 1'b0;
    else if (clear)     w_e <= 1'b0;
    else if (weight_en) w_e <= ^z_next;
  end

endmodule
