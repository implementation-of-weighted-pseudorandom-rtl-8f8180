// gf_pkg: types and constants shared by the weighted pseudorandom test pattern
// generator and the BIST around it.
//
// prim_poly(m) returns a primitive polynomial of degree m (2..32) over GF(2),
// written without its x^m term: bit k of the result is the coefficient of x^k.
// The same polynomials serve three purposes: the field polynomial of the
// GF(2^m) multiplier, the feedback of the signature register, and (through the
// multiplier) the period of the pattern sequence. The paper does not name
// any polynomial; the table is the usual list of primitive trinomials and
// pentanomials (x^m + x^a [+ x^b + x^c] + 1), so any m in range gives a
// maximal-length sequence.
package gf_pkg;

  // Which adder sits in a BIST engine as the circuit under test.
  typedef enum logic [1:0] {
    CUT_RCA = 2'd0,  // N-bit ripple carry adder
    CUT_HC  = 2'd1,  // N-bit Han-Carlson parallel-prefix adder
    CUT_FA  = 2'd2   // single full adder, a three-input combinational circuit
  } cut_e;

  // Number of CUT inputs (= scan chain length) and outputs (= MISR width).
  function automatic int unsigned cut_in_w(cut_e cut, int unsigned n);
    return (cut == CUT_FA) ? 3 : 2 * n;
  endfunction

  function automatic int unsigned cut_out_w(cut_e cut, int unsigned n);
    return (cut == CUT_FA) ? 2 : n + 1;
  endfunction

  // States of the BIST controller.
  typedef enum logic [2:0] {
    ST_IDLE    = 3'd0,  // wait for start
    ST_LOAD    = 3'd1,  // load seeds, clear signature
    ST_SHIFT   = 3'd2,  // shift one weighted bit into the scan chain
    ST_CAPTURE = 3'd3,  // compact the CUT response into the MISR
    ST_DONE    = 3'd4   // compare signature, hold result
  } bist_state_e;

  localparam int unsigned MAX_M = 32;

  // Primitive polynomial of degree m, x^m term omitted.
  function automatic logic [MAX_M-1:0] prim_poly(input int unsigned m);
    case (m)
      2:       return 32'h0000_0003;  // x^2+x+1
      3:       return 32'h0000_0003;  // x^3+x+1
      4:       return 32'h0000_0003;  // x^4+x+1
      5:       return 32'h0000_0005;  // x^5+x^2+1
      6:       return 32'h0000_0003;  // x^6+x+1
      7:       return 32'h0000_0003;  // x^7+x+1
      8:       return 32'h0000_0071;  // x^8+x^6+x^5+x^4+1
      9:       return 32'h0000_0011;  // x^9+x^4+1
      10:      return 32'h0000_0009;  // x^10+x^3+1
      11:      return 32'h0000_0005;  // x^11+x^2+1
      12:      return 32'h0000_0053;  // x^12+x^6+x^4+x+1
      13:      return 32'h0000_001B;  // x^13+x^4+x^3+x+1
      14:      return 32'h0000_002B;  // x^14+x^5+x^3+x+1
      15:      return 32'h0000_0003;  // x^15+x+1
      16:      return 32'h0000_A011;  // x^16+x^15+x^13+x^4+1
      17:      return 32'h0000_0009;  // x^17+x^3+1
      18:      return 32'h0000_0081;  // x^18+x^7+1
      19:      return 32'h0000_0047;  // x^19+x^6+x^2+x+1
      20:      return 32'h0000_0009;  // x^20+x^3+1
      21:      return 32'h0000_0005;  // x^21+x^2+1
      22:      return 32'h0000_0003;  // x^22+x+1
      23:      return 32'h0000_0021;  // x^23+x^5+1
      24:      return 32'h00C2_0001;  // x^24+x^23+x^22+x^17+1
      25:      return 32'h0000_0009;  // x^25+x^3+1
      26:      return 32'h0000_0047;  // x^26+x^6+x^2+x+1
      27:      return 32'h0000_0027;  // x^27+x^5+x^2+x+1
      28:      return 32'h0000_0009;  // x^28+x^3+1
      29:      return 32'h0000_0005;  // x^29+x^2+1
      30:      return 32'h0000_0053;  // x^30+x^6+x^4+x+1
      31:      return 32'h0000_0009;  // x^31+x^3+1
      32:      return 32'h0040_0007;  // x^32+x^22+x^2+x+1
      default: return 32'h0000_0003;
    endcase
  endfunction

endpackage
