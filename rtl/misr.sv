// misr: multiple-input signature register, the response analyzer of the BIST.
//
// Each clock with en high the W-bit signature is multiplied by x modulo the
// primitive polynomial POLY (an internal-XOR LFSR step) and the response word
// d is XORed in: sig' = (sig << 1) ^ (sig[W-1] ? POLY : 0) ^ d. After the
// last pattern the signature stands for the whole response stream; a fault
// that changes any response word changes it with probability 1 - 2^-W. The
// document names the MISR as the response analyzer; its form and polynomial
// are this design's choice. clear has priority over en.
//
// Interface: d (W bits), en, clear in; sig (W bits) out from the register.
// Asynchronous active-low reset clears the signature.
module misr
  import gf_pkg::*;
#(
  parameter int unsigned      W    = 5,
  parameter logic [MAX_M-1:0] POLY = prim_poly(W)
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         clear,
  input  logic         en,
  input  logic [W-1:0] d,
  output logic [W-1:0] sig
);

  localparam logic [W-1:0] FB = POLY[W-1:0];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)     sig <= '0;
    else if (clear) sig <= '0;
    else if (en)    sig <= {sig[W-2:0], 1'b0} ^ (sig[W-1] ? FB : '0) ^ d;
  end

endmodule
