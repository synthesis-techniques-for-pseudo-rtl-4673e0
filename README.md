# LFSR-based built-in self-test with a Berlekamp–Massey test generator

This design is a complete built-in self-test (BIST) for a small sequential
circuit, the ISCAS'89 benchmark **s27**. Its main idea is how the test pattern
generator is made. A classic BIST uses a maximal-length LFSR and hopes its
pseudo-random patterns find the faults. Here the designer first writes a short
*deterministic* test that is known to detect every fault. The
Berlekamp–Massey algorithm then gives the *shortest* LFSR whose output is
exactly that test. The LFSR costs no more than an ordinary pseudo-random
generator. It applies the deterministic test first, and if it keeps running it
goes on with pseudo-random patterns, with no extra logic.

The CUT's responses are compacted in a multiple-input signature register
(MISR). At the end of the run the signature is compared with a stored "gold"
(fault-free) signature, and the result is a single pass/fail bit.

```
            +-------------------+   pattern   +---------+   G17   +------+
 start ---> | bist_controller   |-----------> | s27_cut |-------> | misr |--+ signature
            |  IDLE INIT RUN    |  (mux with  +---------+         +------+  |
            |  CMP  DONE        |   func_in)                                 v
            +-------------------+                     +--------------+  +----------------+
               |  tg_en / init                        | gold_sig_reg |->| sig_comparator |-> pass
               v                                      +--------------+  +----------------+
   +--------------+   +--------------+
   | seq_test_gen |   | par_test_gen |   (tg_mode selects one)
   |  1 x alfsr   |   |  4 x alfsr   |
   +--------------+   +--------------+
```

## From a test sequence to an LFSR

This is the part that needs the most care, because every constant in
`bist_pkg` comes from it.

**Linear complexity.** Let a bit sequence s0, s1, … be given. Berlekamp–Massey
returns the smallest L and the coefficients c1…cL of
C(D) = 1 + c1·D + … + cL·D^L such that every bit after the first L obeys

    s[N] = c1·s[N-1] + c2·s[N-2] + … + cL·s[N-L]   (mod 2)

An L-stage autonomous LFSR (one with no data input) seeded with s0…s(L-1)
then reproduces the whole sequence. For a random string of n bits, L is close
to n/2. For example, `001101110` gives L = 5 and C(D) = 1 + D³ + D⁵. This
polynomial is primitive, so the LFSR then runs through all 31 non-zero states.

**Register encoding used by `alfsr`.** The register is a sliding window over
the stream. `state[0]` is the oldest bit, and it is also the serial output.
Each shift drops `state[0]` and appends the XOR of the tapped stages at
`state[WIDTH-1]`. With this layout:

* `TAPS[WIDTH-i] = c_i` for i = 1…L, and all other bits are 0;
* `SEED[j] = s[j]` for j = 0…WIDTH-1.

`WIDTH` may be larger than L. The same recurrence then runs in a longer
register, and the extra stages only delay the stream. This lets the parallel
generator use one register width for all its LFSRs. A polynomial whose highest
coefficient is 0 leaves `TAPS[0]` clear. Its last stage is then just a delay
stage.

**The s27 test.** s27 has inputs G0…G3, output G17 and three flip-flops, and its
17 nets have 34 single stuck-at faults. Starting from the all-zero state, the
six patterns below (written G0 first) detect all 34 faults at G17:

    0111 1011 0100 1011 0001 0010

*Sequential generator.* The 24 bits, read as one string, have L = 11 and

    C(D) = 1 + D^5 + D^6 + D^7 + D^8 + D^10 + D^11     (primitive)

This gives `SEQ_TAPS = 11'h07B` and `SEQ_SEED = 11'h2DE`.

*Parallel generator.* Each input column is treated on its own:

| input | column | C(D) | L | TAPS (4-bit register) | SEED |
|---|---|---|---|---|---|
| G0 | 010100 | 1 + D² + D⁴ | 4 | 4'h5 | 4'hA |
| G1 | 101000 | 1 | 3 | 4'h0 | 4'h5 |
| G2 | 110101 | 1 + D² | 3 | 4'h4 | 4'hB |
| G3 | 110110 | 1 + D + D² | 2 | 4'hC | 4'hB |

To target another circuit or test, recompute these values. Run
Berlekamp–Massey on the new string (for the sequential generator) or on each
column (for the parallel one). Apply the two encoding rules above. Then
recompute the gold signatures (see below).

## The two test generators

`seq_test_gen` uses one LFSR, and its serial stream is the test written out
pattern after pattern. One pattern is P = 4 bits, so a new pattern is ready
every 4 shifts. The window layout means that pattern t lies in `state[3:0]`
once 4t bits have been shifted out. The pattern is therefore read in parallel
from the first four stages whenever a 2-bit phase counter is 0
(`pattern_valid`), and no serial-to-parallel register is needed. This requires
WIDTH ≥ P, and elaboration stops with an error otherwise.

`par_test_gen` uses four independent LFSRs, one per CUT input. Each one is the
LFSR of its column, so every clock gives a new pattern. Both generators hold
about the same number of flip-flops (11 against 16 here). The parallel one is
four times faster.

In both generators the first six patterns are the deterministic test. After
that the LFSRs keep running:

* The sequential LFSR is primitive, so it continues with an m-sequence of
  period 2047 bits.
* The column LFSRs are not primitive, and G1's column even becomes constant 0.
  The parallel generator's pseudo-random part is therefore weak. This follows
  from taking the shortest LFSR of each column as it is.

## A self-test run

`bist_controller` is a five-state machine:

| state | cycles | what happens |
|---|---|---|
| IDLE | – | s27 runs functionally from `func_in`, clocked every cycle |
| INIT | 1 | reseed the generator, clear the s27 flip-flops and the MISR, load the gold register, clear the result |
| RUN | (N−1)·4+1 sequential, N parallel | on each cycle with `pattern_valid`, step s27 once and absorb G17 into the MISR |
| CMP | 1 | compare the signature with the gold value |
| DONE | until next start | `done`, `pass` and `signature` are held |

`start` is a one-clock pulse. It is accepted in IDLE or DONE and ignored while
`busy`. `tg_mode` is sampled together with `start`: 0 selects the sequential
generator, 1 the parallel one. From the `start` edge to `done` takes
3 + (N−1)·4 + 1 = 256 clocks (sequential) or 3 + N = 67 clocks (parallel),
with N = `NUM_PATTERNS` = 64.

The CUT's flip-flops only advance when a pattern is applied. Its combinational
output G17 is sampled by the MISR on the same clock edge. The response of
pattern t therefore depends on patterns 0…t, exactly as in functional
operation.

**Signature analysis.** `misr` is a 16-bit internal-XOR register with the
primitive polynomial x¹⁶ + x⁵ + x³ + x² + 1 (`16'h002D`). Each step computes

    sig' = {sig[14:0], 0} ^ (sig[15] ? 16'h002D : 0) ^ d

For a single-input MISR this is the remainder of the response stream divided by
the polynomial. Any error stream that is not a multiple of the polynomial
(such as any single-bit error) is detected.

**Gold signature and comparator.** `gold_sig_reg` captures a gold value at
INIT. This is either the built-in value for the selected generator, or
`gold_ext` when `gold_ext_sel` is high. The built-in values are the fault-free
signatures of the 64-pattern test: `16'hFC5A` sequential and `16'h8413`
parallel. Any change to the generators, the MISR, the CUT or `NUM_PATTERNS`
invalidates them. You must then recompute them from a model, or run a
fault-free test once with `gold_ext_sel = 0` and read `signature`.
`sig_comparator` registers the equality, so `pass` is valid with `done`.

## Circuit under test and fault injection

`s27_cut` is the public ISCAS'89 s27 netlist, one assignment per net.
`fault_en`, `fault_net` and `fault_val` force any one net to a stuck value for
every gate that reads it. The net numbering is the `s27_net_e` enum in
`bist_pkg`: G0–G3 = 0–3, G5–G17 = 4–16. This port exists so that a failing
self-test can be demonstrated. Every one of the 34 faults makes the test fail
with either generator.

## Parameters

| module | parameter | default | meaning |
|---|---|---|---|
| `bist_top` | `NUM_PATTERNS` | 64 | patterns per self-test run |
| | `MISR_WIDTH`, `MISR_POLY` | 16, `16'h002D` | signature register |
| | `GOLD_SEQ`, `GOLD_PAR` | `16'hFC5A`, `16'h8413` | built-in gold signatures |
| `alfsr` | `WIDTH`, `TAPS`, `SEED` | 11, `11'h07B`, `11'h2DE` | register size, taps and seed (encoding above) |
| `seq_test_gen` | `P`, `WIDTH`, `TAPS`, `SEED` | 4, 11, … | pattern width and LFSR |
| `par_test_gen` | `P`, `WIDTH`, `TAPS[P]`, `SEEDS[P]` | 4, 4, … | one LFSR per pattern bit |
| `misr` | `WIDTH`, `N_IN`, `POLY` | 16, 1, `16'h002D` | N_IN ≤ WIDTH responses per clock |
| `bist_controller` | `NUM_PATTERNS` | 64 | |

All modules share the constants and types in `rtl/bist_pkg.sv`. Every module
uses an asynchronous active-low reset `rst_n`.

## Simulating

Each testbench checks itself and ends by printing
`TB_RESULT checks=N failures=M`. For example, with Verilator 5:

```
verilator --binary --timing --assert -Wno-fatal -y rtl rtl/bist_pkg.sv \
          tb/tb_bist_top.sv --top-module tb_bist_top
./obj_dir/Vtb_bist_top
```

| testbench | what it shows |
|---|---|
| `tb_bist_top` | the whole system at its default parameters: functional mode; fault-free runs with both generators (signature equal to an independent model and to the built-in gold, exact start-to-done latency); all 34 stuck-at faults detected with both generators; external gold right and wrong; restart from DONE; start while busy ignored. It counts each of these and fails if one never happened. |
| `tb_bist_det_only` | the system cut to its six deterministic patterns (`NUM_PATTERNS = 6`, external gold from a model): all 34 faults are detected with both generators, so the deterministic part alone reaches full single stuck-at coverage |
| `tb_alfsr` | six published Berlekamp–Massey examples (9 to 20 bits, degree 5 to 10) each reproduced bit for bit and then continued by its recurrence; period 31 for the primitive degree-5 case; hold and reload |
| `tb_seq_test_gen`, `tb_par_test_gen` | pattern streams against a reference built from the test string and the polynomials; one pattern per 4 clocks or per clock |
| `tb_s27_cut` | against a flattened sum-of-products model, and against a fault-aware model for all 34 faults |
| `tb_misr` | against polynomial division; linearity; single-error detection; a 3-input 8-bit instance |
| `tb_gold_sig_reg`, `tb_sig_comparator`, `tb_bist_controller` | selection and hold; registered equality; state sequence, pattern count and latency |

## What is not included, and where the design makes its own choices

* **s386**, the second benchmark the method was tried on, is not included.
  Its netlist and its deterministic test are not available here. The
  generators and the MISR are parameterised (`P`, `N_IN`), but a new CUT, a new
  test and new constants would be needed.
* **BILBO** (Built-In Logic Block Observer) realisations, against which the
  LFSR version was compared for area and speed, are not built.
* **Berlekamp–Massey and the primitivity check** are an offline software
  step. The hardware only holds their results as parameters.
* **Own choices**, because the method leaves them open:
  * the deterministic s27 test itself (found by fault simulation);
  * the pattern bit order (G0 first);
  * reading the pattern in parallel from the LFSR window;
  * the MISR width and polynomial (a standard primitive polynomial, not one
    derived from a sequence);
  * the test length of 64 patterns;
  * the per-generator gold values;
  * the controller's states and handshake;
  * the functional/test input multiplexer;
  * the clock enable, clear and fault-injection ports on s27;
  * the reset style.
* No timing or area figures for FPGA or standard cells are claimed for this
  RTL.
