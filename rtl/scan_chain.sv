// scan_chain: serial-in, parallel-out scan chain of the test-per-scan BIST.
//
// On each clock with shift high the chain moves one place towards its most
// significant end and takes the weighted TPG bit at si into cell 0. After LEN
// shifts it holds a complete test pattern, which is applied in parallel to
// the inputs of the circuit under test; the first bit shifted in ends in cell
// LEN-1. The paper gives scan chains loaded from the weighted TPG; a single
// chain spanning all CUT inputs is this design's choice.
//
// Interface: si, shift in; q (LEN bits) and so (= q[LEN-1]) out, from
// registers. Asynchronous active-low reset clears the chain.
module scan_chain #(
  parameter int unsigned LEN = 8
) (
  input  logic           clk,
  input  logic           rst_n,
  input  logic           shift,
  input  logic           si,
  output logic [LEN-1:0] q,
  output logic           so
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)     q <= '0;
    else if (shift) q <= {q[LEN-2:0], si};
  end

  assign so = q[LEN-1];

endmodule
