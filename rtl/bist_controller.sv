// bist_controller: finite state machine that runs one test-per-scan BIST
// session and checks its signature.
//
//   IDLE    wait for start
//   LOAD    one cycle: load the TPG seeds, clear the MISR
//   SHIFT   SCAN_LEN cycles: step the TPG and shift its weighted bit into the
//           scan chain; every WEIGHT_K-th shift cycle also pulses weight_en
//           (the weight enabled clock of the weight generator)
//   CAPTURE one cycle: the complete pattern sits on the CUT inputs and the
//           MISR compacts the CUT response; back to SHIFT until NUM_PATTERNS
//           patterns are done
//   DONE    done = 1 and pass = (signature == golden) until the next start
// A session takes 1 + NUM_PATTERNS * (SCAN_LEN + 1) clocks from the clock edge
// that samples start to the edge that raises done. The paper asks for an
// FSM controller and a comparator against the expected response; the states,
// the weight enable spacing and the cycle counts are this design's choice.
//
// Interface: start in (sampled in IDLE and DONE); control strobes out,
// decoded from the state register; signature and golden in, SIG_W bits.
// Asynchronous active-low reset to IDLE.
module bist_controller
  import gf_pkg::*;
#(
  parameter int unsigned SCAN_LEN     = 8,
  parameter int unsigned NUM_PATTERNS = 64,
  parameter int unsigned WEIGHT_K     = 4,
  parameter int unsigned SIG_W        = 5
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             start,
  input  logic [SIG_W-1:0] signature,
  input  logic [SIG_W-1:0] golden,
  output logic             tpg_load,
  output logic             tpg_step,
  output logic             weight_en,
  output logic             scan_shift,
  output logic             misr_clear,
  output logic             misr_en,
  output logic             busy,
  output logic             done,
  output logic             pass
);

  localparam int unsigned BW = $clog2(SCAN_LEN + 1);
  localparam int unsigned PW = $clog2(NUM_PATTERNS + 1);
  localparam int unsigned KW = $clog2(WEIGHT_K + 1);

  bist_state_e     state, state_n;
  logic [BW-1:0]   bit_cnt;
  logic [PW-1:0]   pat_cnt;
  logic [KW-1:0]   k_cnt;

  wire last_bit = (bit_cnt == BW'(SCAN_LEN - 1));
  wire last_pat = (pat_cnt == PW'(NUM_PATTERNS - 1));

  always_comb begin
    state_n = state;
    unique case (state)
      ST_IDLE:    if (start) state_n = ST_LOAD;
      ST_LOAD:    state_n = ST_SHIFT;
      ST_SHIFT:   if (last_bit) state_n = ST_CAPTURE;
      ST_CAPTURE: state_n = last_pat ? ST_DONE : ST_SHIFT;
      ST_DONE:    if (start) state_n = ST_LOAD;
      default:    state_n = ST_IDLE;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state   <= ST_IDLE;
      bit_cnt <= '0;
      pat_cnt <= '0;
      k_cnt   <= '0;
    end else begin
      state <= state_n;
      unique case (state)
        ST_LOAD: begin
          bit_cnt <= '0;
          pat_cnt <= '0;
          k_cnt   <= '0;
        end
        ST_SHIFT: begin
          bit_cnt <= last_bit ? '0 : bit_cnt + 1'b1;
          k_cnt   <= (k_cnt == KW'(WEIGHT_K - 1)) ? '0 : k_cnt + 1'b1;
        end
        ST_CAPTURE: pat_cnt <= pat_cnt + 1'b1;
        default: ;
      endcase
    end
  end

  always_comb begin
    tpg_load   = (state == ST_LOAD);
    misr_clear = (state == ST_LOAD);
    tpg_step   = (state == ST_SHIFT);
    scan_shift = (state == ST_SHIFT);
    weight_en  = (state == ST_SHIFT) && (k_cnt == KW'(WEIGHT_K - 1));
    misr_en    = (state == ST_CAPTURE);
    busy       = (state == ST_LOAD) || (state == ST_SHIFT) || (state == ST_CAPTURE);
    done       = (state == ST_DONE);
    pass       = done && (signature == golden);
  end

  // Loading and stepping the generator are exclusive; capture never shifts.
  a_load_step_excl : assert property (@(posedge clk) disable iff (!rst_n)
    !(tpg_load && tpg_step));
  a_capture_no_shift : assert property (@(posedge clk) disable iff (!rst_n)
    !(misr_en && scan_shift));

endmodule
