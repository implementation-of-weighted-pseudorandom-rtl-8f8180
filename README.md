# Weighted pseudorandom test pattern generator with Galois-field multiplication, in a test-per-scan BIST

Built-in self test (BIST) puts the tester on the chip: a pattern generator
feeds the circuit under test (CUT), a signature register compacts its
responses, and a controller compares the final signature with the one a
fault-free circuit gives. This design is such a BIST. Its pattern generator is
not a plain LFSR. It steps through the elements of the Galois field GF(2^M) by
repeated multiplication with a seed. From each state it derives two one-bit
"weights", and a multiplexer controlled by the pseudorandom bit picks which
weight goes out as the test bit.

The RTL follows the paper *Implementation Of Weighted Pseudorandom Test
Pattern Generator For A Built In Self Test Architecture* (K. Roja,
S. Kishore Reddy, P. Sagar). The paper gives the block diagram of the
generator, its weight equations and the BIST around it, and evaluates the
BIST with a ripple carry adder and a Han-Carlson adder as circuits under
test. Many details are left open: the field polynomial, the mux polarity,
the controller, the MISR and the pattern counts. For each of these this RTL
makes its own choice, listed in
[Where this design departs from or fills in the paper](#where-this-design-departs-from-or-fills-in-the-paper).

## The generator (`weighted_tpg`)

```
             seed_a --> [ A reg ]---------------+------------------+
                                                |                  |
             seed_x --> [ X reg ] --X--> [ GF(2^M) multiply ] --Z--+--> back into X reg
                            |                   |                  |
                            |               parity(Z) --> [ weight generator D ] --W_E--+
                            |                   ^ weight_en                              |
                            +--> parity(A & X) ------------------------------W_A-------+ |
                            |                                                          v v
                            +--> X[M-1] = Y ------------------------------select--> [ mux ] --> Yw
```

**State sequence.** The register X holds an element of GF(2^M). Each `step`
replaces it by Z = A * X, a multiplication modulo a primitive polynomial of
degree M (`gf_multiplier`). With A = x (the value 2) this is the usual
internal-XOR LFSR. Any other primitive element A gives a different
maximal-length ordering of the same 2^M - 1 non-zero states. For M = 3 the
polynomial is x^3 + x + 1. With A = 2 and X = 1 the states run
1, 2, 4, 3, 6, 7, 5, 1, ...

**Weights.** The weight W(v) of a vector is its parity: 0 for an even number
of ones, 1 for an odd number.

- **Actual weight, W_A** = W(A AND X) = the sum over i of a_i * x_i, mod 2. It
  is the current pattern's weight measured through the seed, computed by an
  XOR tree every cycle.
- **Estimated weight, W_E** = W(Z), the parity of the *next* pattern. The
  weight generator is a single D flip-flop. It captures this only on cycles
  where `weight_en` (the "weight enabled clock") is high, and holds it in
  between. In the BIST the controller raises `weight_en` on every
  WEIGHT_K-th shift (default 4). W_E is therefore a sample of the sequence's
  weight that is reused for the next k cycles.
- **Weighted mux.** The pseudorandom bit Y = X[M-1], the last flip-flop,
  is the select: Yw = W_E when Y = 1, and W_A when Y = 0.

`load` takes both seeds and clears W_E, so every session is reproducible.
Neither seed may be zero: a zero A or X locks the sequence at zero, and an
assertion reports it.

### What the weighting does to the scan-in stream

The paper's goal is lower switching activity during scan shifting.
`tb_switching_activity` measures this on a 32-bit generator over 20,000
cycles. The plain pseudorandom bit Y toggles on 0.49 of the cycles. The
weighted bit Yw, with `weight_en` on every 4th cycle, toggles on 0.40. The
reduction comes from W_E being held between weight enables. With the enable
on every cycle the weighted stream toggles more than Y (0.50 to 0.62,
depending on the seed). For spacings of 4 to 8 cycles it settles near 0.39
to 0.41. About half of the bits of Yw are ones (0.49), so the stream is not
biased toward 0 or 1.

## The BIST engine (`bist_engine`)

```
 weighted_tpg --Yw--> scan_chain (IN_W cells) --pattern--> CUT --response--> misr --signature--> == golden ? pass
        ^                  ^                                                   ^
        +------------------+------------ bist_controller ---------------------+
```

This is test-per-scan. The generator's serial output Yw is shifted into a
scan chain that spans all CUT inputs. When the chain is full, the CUT
response is captured into the multiple-input signature register (MISR).

### Session timing

| state   | cycles       | what happens                                                        |
|---------|--------------|---------------------------------------------------------------------|
| LOAD    | 1            | seeds into the TPG, MISR cleared, W_E cleared                       |
| SHIFT   | IN_W         | TPG steps, scan chain shifts in Yw; `weight_en` every WEIGHT_K-th   |
| CAPTURE | 1            | full pattern on the CUT; MISR absorbs the response                  |
| DONE    | until start  | `done` = 1, `pass` = (signature == golden)                          |

SHIFT and CAPTURE repeat NUM_PATTERNS times. From the clock edge that
samples `start` to the edge that raises `done` takes
**1 + NUM_PATTERNS x (IN_W + 1)** clocks. The weight-enable counter runs
across pattern boundaries and is reset only by LOAD. `start` is accepted in
IDLE and in DONE.

### Circuits under test

| `CUT`     | circuit                               | IN_W (chain) | response (OUT_W = MISR width) |
|-----------|---------------------------------------|--------------|-------------------------------|
| `CUT_RCA` | N-bit ripple carry adder, cin = 0     | 2N           | {cout, sum}, N+1              |
| `CUT_HC`  | N-bit Han-Carlson adder               | 2N           | {cout, sum}, N+1              |
| `CUT_FA`  | one full adder (three-input circuit)  | 3            | {cout, s}, 2                  |

For the adders, the upper N scan cells are operand A and the lower N are
operand B. For the full adder, scan bits 2, 1 and 0 are A, B and Cin. The
bit shifted in first ends in the top cell.

**Ripple carry adder** (`ripple_carry_adder`, `full_adder`): N full adders.
The carry out of each stage is the carry in of the next.

**Han-Carlson adder** (`han_carlson_adder`, `half_adder`): a parallel-prefix
adder built on the propagate and generate bits from the half adders. It first
merges each odd bit with its even neighbour. It then runs Kogge-Stone levels
(spans 2, 4, ..., N/2) over the odd positions only. A last level gives each
even position its carry from the odd position below it. That makes
log2(N) + 1 levels with a fan-out of 2. It has no carry in, and N must be a
power of two.

**MISR** (`misr`): sig' = sig * x mod P(x) + response, with P primitive of
degree OUT_W. A single wrong response bit always changes the signature.
Errors in several words can cancel (aliasing) with probability about 2^-OUT_W.
That is high for the 2-bit full-adder MISR.

## Top level (`bist_top`)

The top holds three engines side by side. They share `clk`, `rst_n` and
`start`; everything else is separate:

| instance     | TPG width | CUT                     | clocks to done (64 patterns) |
|--------------|-----------|-------------------------|------------------------------|
| `u_bist_fa`  | 3         | full adder              | 1 + 64 x 4 = 257             |
| `u_bist_rca` | 32        | 4-bit ripple carry      | 1 + 64 x 9 = 577             |
| `u_bist_hc`  | 32        | 16-bit Han-Carlson      | 1 + 64 x 33 = 2113           |

The 3-bit engine takes the low three bits of `seed_a` and `seed_x`, and these
must be non-zero. Each engine has its own `golden_*`, `sig_*`, `busy_*`,
`done_*`, `pass_*` and `yw_*`. The expected signatures must come from
elsewhere, for example from simulating a fault-free design. The testbench
computes them with an independent model.

## Parameters

| module            | parameter      | default | origin |
|-------------------|----------------|---------|--------|
| `weighted_tpg`    | `M`            | 3       | the paper's 3-bit generator |
| `weighted_tpg`, `gf_multiplier`, `misr` | `POLY` | `gf_pkg::prim_poly(width)` | own choice: primitive trinomials/pentanomials for degrees 2..32 |
| `bist_engine`/`bist_top` | `TPG_W` | 32 | the paper's 32-digit generator |
| `bist_top`        | `FA_TPG_W`     | 3       | the paper's 3-bit generator |
| `bist_top`        | `RCA_N`        | 4       | the paper's 4-bit ripple carry adder |
| `bist_top`        | `HC_N`         | 16      | the paper's 16-bit Han-Carlson adder |
| `bist_engine`/`bist_top`/`bist_controller` | `NUM_PATTERNS` | 64 | own choice |
| `bist_engine`/`bist_top`/`bist_controller` | `WEIGHT_K` | 4 | own choice (the paper's k) |

All registers have an asynchronous active-low reset (`rst_n`), and the
design uses one clock.

## Where this design departs from or fills in the paper

- **Generator update.** The paper says the data vector X is continuously
  multiplied by the seed A in GF(2^m). Here the whole register is replaced by
  A * X each step. The paper's figure instead shows the product XORed into
  the first flip-flop of a shift chain. For A = x the two are the same LFSR.
  The paper's state equation, Y_n[i+1] = Y_(n-1)[i] + x_n * Y[i], can also
  be read another way: an LFSR whose tap coefficients are the data vector X.
  That reading is not followed, because arbitrary taps do not give a
  maximal-length sequence.
- **Field and MISR polynomials** are not given in the paper. They come from
  the table in `gf_pkg`. The testbench checks that every entry (degrees 2 to
  32) is primitive.
- **W_A** is read from the paper's weight equation W(Z) = sum W(a_i)W(x_i)
  with parity weights. **W_E** is read from "the estimated weight obtained
  from the (i+1)th clock cycle". The paper's "weight enabled clock" is a
  clock enable here, not a separate clock.
- **Mux polarity** (Y = 1 selects W_E) is an own choice; the paper only says
  that Y controls the mux.
- **The weights are parities.** The generator does not aim for a chosen
  signal probability (such as 1/4 or 3/4) per scan cell. The paper states the
  weights as parities and gives no target probabilities.
- **One scan chain per engine.** The paper speaks of several scan chains fed
  through the weighted mux acting as a phase shifter, but gives no chain
  count or phase-shifter taps.
- **Three-input circuit.** The paper mentions testing "a three input
  combinational logic circuit" without naming it. The full adder is used.
- **Not built:**
  - test-point insertion in the CUT, which the paper names without details;
  - test-per-clock operation, which the paper mentions only next to
    test-point insertion; its proposal is test-per-scan;
  - the paper's FPGA delay and LUT figures, which depend on the device and
    the vendor tool (switching activity is measured, see above);
  - the comparison generators that the paper describes only as prior work.

## Verification

Every module has a self-checking testbench in `tb/`. Each ends by printing
`TB_RESULT checks=<n> failures=<n>`, and each has a watchdog. The
testbenches use `tb/bist_ref_pkg.sv`, reference models written without the
RTL: GF multiplication by carry-less product and long division, the MISR
step, and a complete bit-level model of a BIST session that yields golden
signatures.

| testbench               | what it checks |
|-------------------------|----------------|
| `tb_gf_multiplier`      | all 64 products at M=3; published AES-field products; random products at M=8 and M=32; primitivity of every polynomial in the table |
| `tb_weight_generator`   | capture on enable, hold, clear, against a model |
| `tb_weighted_mux`       | all 8 input combinations |
| `tb_weighted_tpg`       | cycle model of X, Y, W_A, W_E, Yw; period 7 for every primitive A at M=3; period 65535 at M=16 |
| `tb_half_adder`, `tb_full_adder` | full truth tables |
| `tb_ripple_carry_adder` | exhaustive at 4 bits, random at 12 bits |
| `tb_han_carlson_adder`  | exhaustive at 2 and 4 bits, corner and random cases at 16 and 32 bits |
| `tb_scan_chain`, `tb_misr` | against models; the MISR catches a single-bit error |
| `tb_bist_controller`    | strobe schedule cycle by cycle, latency 17 for a small session, pass/fail compare |
| `tb_bist_engine`        | all three CUT types: signatures against the model, pass and forced fail, latency, CUT response every cycle |
| `tb_bist_top`           | the whole top at default parameters: three sessions (pass, forced fail, new seeds); counts that every mechanism occurred |
| `tb_switching_activity` | 32-bit generator against the model for 20,000 cycles; reports the toggle rates of Y and Yw and the fraction of ones |

To run one testbench with Verilator 5 (from the directory that holds `rtl/`
and `tb/`):

```
verilator --binary --timing --assert -Wno-fatal --top-module tb_bist_top \
    -y rtl -y tb +libext+.sv -Irtl rtl/gf_pkg.sv tb/bist_ref_pkg.sv tb/tb_bist_top.sv
./obj_dir/Vtb_bist_top
```

Replace `tb_bist_top` with any other testbench name. All of them finish in
seconds. The full top at its default parameters completes three sessions in
under 7,000 clocks.

## Changing the design

- **Other generator width:** set `M` or `TPG_W` to any value from 2 to 32.
  The polynomial follows from `gf_pkg::prim_poly`. For another polynomial,
  override `POLY`, with bit k as the coefficient of x^k and the x^M term
  left out.
- **Other circuit under test:** add a value to `cut_e` in `gf_pkg`, give it
  widths in `cut_in_w` and `cut_out_w`, and instantiate the circuit in the
  generate block of `bist_engine`.
- **Longer tests:** raise `NUM_PATTERNS`. The counters size themselves.
- The golden signature of a new configuration can be taken from
  `bist_ref_pkg::bist_golden`. That model follows the same cycle-level
  conventions: scan order, operand split, weight-enable spacing and MISR
  form.
