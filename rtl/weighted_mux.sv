// weighted_mux: the self-controlled output multiplexer of the weighted TPG.
//
// The pseudorandom bit Y of the generator chooses which weight goes out as the
// weighted pattern bit Yw: the estimated weight W_E when Y is 1, the actual
// weight W_A when Y is 0. Its output is what is shifted into the scan chain,
// so the mux plays the part of the phase shifter between generator and scan
// chain. The paper gives the three inputs, the output and that Y controls
// the choice; which value of Y picks which weight is this design's choice.
//
// Interface: w_e, w_a, y in, yw out. Combinational.
module weighted_mux (
  input  logic w_e,
  input  logic w_a,
  input  logic y,
  output logic yw
);

  always_comb begin
    if (y) yw = w_e;
    else   yw = w_a;
  end

endmodule
