# Spectral response compactors for built-in self-test

In built-in self-test (BIST), a pattern generator on the chip drives the
circuit under test (CUT). A response compactor squeezes the long stream of
output bits into a short *signature*, and that signature is compared with the
signature of a fault-free circuit. The usual compactor is a multiple-input
signature register (MISR), which is an LFSR that divides the output stream
by a polynomial.

This RTL implements the alternative described in *Spectral Analysis for
Statistical Response Compaction During Built-In Self-Testing*: compact the
responses by their **Hadamard spectrum**. Each output bit stream is cut into
overlapping 2-bit chunks `(prev, cur)`. Each chunk is multiplied by the 2×2
Hadamard matrix

```
H(1) = | 1  1 |      row 1:  prev + cur   (0, 1 or 2)
       | 1 -1 |      row 2:  prev - cur   (-1, 0 or +1)
```

and the results are summed in counters. The first row measures how many ones
the stream holds (its "DC" tone). The second row measures how often the
stream falls or rises (its alternating tone). The counters are the signature.
Five variants, SRC1 to SRC5, trade counter count against aliasing, which is
the chance that a faulty circuit ends with the good signature.

All five are in `rtl/`, together with a two-run test controller and a top
level that runs them side by side on the same outputs.

## The five compactors

| Block | What is correlated | Counters | Runs of the test set | Overflow handling |
|---|---|---|---|---|
| `src1` | each PO with its own previous bit (auto-correlation), both tones | 2 per PO (add and subtract) | 1 | wraps, two's complement |
| `src2` | POs with each other in pairs (cross-correlation) | 1 shared | 2 (`sub`=0, then 1) | end-around carry |
| `src3` | each PO with its previous bit, first tone only | 1 per PO | 1 | end-around carry |
| `src4` | each PO with its previous bit, second tone only | 1 per PO | 1 | end-around carry/borrow |
| `src5` | each PO with its previous bit, both tones, summed over all POs | 1 shared | 2 (`sub`=0, then 1) | end-around carry |

The source reports the fault-simulation results below on ISCAS '89 circuits:

* SRC1 never aliased.
* SRC2 aliased about as often as a MISR and used the fewest gates. Its
  flip-flop count grows with the log of the PO count, not with the PO count.
* SRC5 came next in aliasing, then SRC3 and SRC4.

**SRC1** (`src1.sv`) has one flip-flop per PO for the previous bit. For each
PO, a half adder (`prev + cur`) feeds an add counter and a half subtracter
(`prev - cur`, as difference and borrow) feeds a subtract counter. The
subtract result `{borrow, diff}` is the 2-bit two's complement of
`prev - cur`. It is sign-extended and added, so the subtract counter reads
`1111` for -1 when the counters are 4 bits wide. The carry out of the top bit
is dropped. The half adder's sum and the half subtracter's difference are the
same XOR, so one gate serves both.

**SRC3 / SRC4** (`src3.sv`, `src4.sv`) are SRC1 with one tone removed.

**SRC2** (`src2.sv`) has no per-PO state. POs `(0,1)`, `(2,3)`, … go through
one full adder per pair with carry-in `sub`. When `sub=0` the pair gives
`a + b`. When `sub=1`, `b` is inverted and the pair gives
`a + ~b + 1 = a - b + 2`. An adder tree sums the pairs into one tone counter.
The test set is therefore applied twice, once for each tone, and the counter
is read after each run.

**SRC5** (`src5.sv`) has one `ht_block` per PO. Each block is a flip-flop with
the previous bit plus a full adder. Its A input is `prev`, its B input is
`po ^ sub` and its carry-in is `sub`. An adder tree sums the blocks' 2-bit
outputs into one tone counter, and the test set is applied twice as for SRC2.

## Counter arithmetic (the subtle part)

### Two's complement, wrap-around (SRC1)

SRC1's counters are modulo-2^`CNT_W` accumulators of signed values. Here is a
worked example on one PO whose bits are `0,1,0,0,0,1` in time order. The flip
-flop starts at 0, which gives the chunks `00 01 10 00 00 01`. These are the
values `tb_src1` checks step by step:

| chunk | add | add counter | sub | subtract counter |
|---|---|---|---|---|
| 00 | 0 | 0000 | 0 | 0000 |
| 01 | 1 | 0001 | -1 | 1111 |
| 10 | 1 | 0010 | +1 | 0000 |
| 00 | 0 | 0010 | 0 | 0000 |
| 00 | 0 | 0010 | 0 | 0000 |
| 01 | 1 | 0011 | -1 | 1111 |

### End-around carry (SRC2 to SRC5)

A counter that wraps can alias: a faulty circuit that makes 2^n more ones
than the good circuit ends on the same count. The other compactors keep the
carry out of the top bit and add it back into the least significant bit, as
in one's-complement addition. `tone_counter` holds that carry in an extra
flip-flop, `eac`, and adds it back on the next enabled cycle. This is the
extra flip-flop below the counter stages in the original SRC2/SRC5 drawings.
The signature is therefore the pair `(eac, cnt)`:

* `cnt + eac ≡ Σ values (mod 2^CNT_W − 1)`.
* An overflow moves the count on by one instead of returning it to an
  earlier state.
* The top level compares the raw pair, which is deterministic for a given
  response stream.

The original text says that adding the end-around carry cut SRC2's aliased
faults from 822 to 135, and SRC5's from 634 to 369.

SRC4 adds negative values. Here -1 is fed to the counter as the
one's-complement of 1 (`1…10`), which with the end-around carry is a
subtraction modulo 2^n − 1, i.e. an end-around borrow. Feeding `1…11`
(two's complement) instead would be wrong with an end-around carry. The
fault test for `src4` checks exactly that.

### The `sub=1` offset (SRC2, SRC5)

The full adders subtract in invert-and-carry form, so in the second run each
SRC2 pair or SRC5 HT block adds `prev − cur + 2` rather than `prev − cur`.
The counter thus holds the second-tone content plus a constant
`2 × vectors × (pairs or POs)`. The constant is the same for good and faulty
circuits, so it changes the golden value but not what can be detected.

### What still aliases

* **Bit flipping.** Moving one response bit by one cycle (`…0 1 0…` →
  `…0 0 1…`) leaves every chunk count unchanged, so SRC1 ends with the
  same signature. Swapping two equal subsequences has the same effect.
  `tb_src1` and the top-level test reproduce this.
* **Too-narrow counters.** The counter width should be
  `CNT_W = ⌈log2(test length)⌉`. With the default 4 bits that covers 16
  vectors. SRC2 and SRC5 add up to 3 × POs per vector, so real test sets
  need wider counters: set `CNT_W` accordingly.

## Test sequencing: `bist_ctrl`

SRC2 and SRC5 need the test set twice, so the controller runs two identical
runs after `start`. Each run has three phases:

1. **INIT**, 1 cycle. `clr` is high. It clears every compactor flip-flop, and
   the top passes it out as `bist_init` so the pattern generator and CUT
   restart from the all-zero state.
2. **RUN**, `test_len` cycles. `en` (`tpg_en` at the top) is high, and one
   vector is applied and compacted per cycle.
3. **CHECK**, 1 cycle. The signatures of the run are final.

`sub` is 0 in the first run and 1 in the second. After the second CHECK the
controller holds `done` until the next `start`. A session is
`2 × (test_len + 2)` cycles long, counted from the first cycle after `start`.
The state machine and this handshake are this design's own; the source gives
only the two runs and the `sub` signal.

## Top level: `spectral_bist_top`

```
start, test_len ──► bist_ctrl ──► clr/en/sub ──► SRC1..SRC5 ◄── po (CUT outputs)
                          │                          │
                          └─ check ──► compare with golden_* ──► fail[4:0], pass[4:0]
```

* **Inputs:** `clk` and `rst_n` (asynchronous, active low), `start`,
  `test_len`, `po[NUM_PO-1:0]`, and one golden signature per compactor and
  run (`golden_src1_add/_sub`, `golden_src2[run]`, `golden_src3_cnt/_eac`,
  `golden_src4_cnt/_eac`, `golden_src5[run]`). The `golden_src2` and
  `golden_src5` entries are packed `{eac, cnt}`.
* **Outputs:**
  * `bist_init`, `tpg_en` and `sub`, which go to the pattern generator and
    CUT.
  * `busy` and `done`.
  * Every signature (`sig_*`).
  * A sticky mismatch flag per compactor, `fail`, indexed by
    `src_pkg::src_id_e`. `pass = done ? ~fail : 0`.
* **When signatures are checked:** SRC1, SRC3 and SRC4 need one run, so they
  are checked at the end of run 0. SRC2 and SRC5 are checked after each run.
* **Assertion:** the top asserts that `sub` does not change within a run.

All five compactors sit side by side, as in the fault-simulation experiment
the design comes from. A product would keep one of them, normally SRC2 for
area or SRC1 for the least aliasing: instantiate that block alone with
`bist_ctrl`.

## Parameters

| Parameter | Default | Meaning |
|---|---|---|
| `NUM_PO` | 4 | primary outputs compacted (the four-output example and drawings) |
| `CNT_W` | 4 | counter width (the 4-bit counters of the worked examples) |
| `LEN_W` | 16 | width of `test_len`; covers the longest published test set, 4832 vectors |

Each block stops elaboration if its adder-tree value is wider than `CNT_W`,
because one carry bit per cycle must suffice. The PO and vector counts of the
benchmark circuits need larger settings:

* s298: `NUM_PO=6`, 512 vectors, so `CNT_W=9`.
* s38584: `NUM_PO=278`, 1024 vectors, so `CNT_W=10`.
* SRC5 additionally needs `CNT_W ≥ ⌈log2(3·NUM_PO+1)⌉`.

## Files

| File | Contents |
|---|---|
| `rtl/src_pkg.sv` | compactor indices, controller state enum |
| `rtl/tone_counter.sv` | accumulator with optional end-around carry |
| `rtl/ht_block.sv` | one-PO Hadamard transform (flip-flop + full adder) |
| `rtl/src1.sv` … `rtl/src5.sv` | the five compactors |
| `rtl/bist_ctrl.sv` | two-run test controller |
| `rtl/spectral_bist_top.sv` | everything together with signature checking |
| `tb/tb_<block>.sv` | one self-checking testbench per block |
| `tb/wl_harness.sv`, `tb/tb_workloads_*.sv` | benchmark-size runs (below) |

## Simulating

Every testbench prints `TB_RESULT checks=N failures=M` and ends with
`$finish`. Each one also has a watchdog. Build and run one, for example:

```
verilator --binary --timing --assert -Irtl rtl/src_pkg.sv tb/tb_src1.sv \
          --top-module tb_src1 -Mdir obj_src1 && obj_src1/Vtb_src1
```

Verilator finds the other modules through `-Irtl`. What each testbench checks:

* `tb_tone_counter`: the counter modulo 15 (end-around) and modulo 16
  (plain), and the exact overflow step: 15 → (0, carry) → 2.
* `tb_ht_block`: exhaustive over `prev`/`cur`/`sub`, plus the hold and clear
  rules.
* `tb_src1`: the chunk table above, the two aliasing cases, and random
  streams against modular sums.
* `tb_src2` … `tb_src5`: random streams in both runs against a
  modulo-(2^n−1) reference.
* `tb_bist_ctrl`: run lengths, `sub`, the clr/check pulses and the exact
  session length for `test_len` = 0, 1, 6, 10 and 512.
* `tb_spectral_bist_top`: end to end at the default parameters. The
  testbench plays the pattern generator and CUT by replaying a table of PO
  vectors after every `bist_init`. A reference model computes the golden
  signatures. Fault-free sessions must pass on all five compactors, with the
  signatures checked at each run end. Injected faults (stuck-at outputs,
  single and burst bit errors) must be flagged. An adjacent bit swap must
  alias in SRC1. The testbench also counts that end-around carries, SRC1
  wrap-around, both tones and detections all occurred.

## Benchmark-size runs

`tb/tb_workloads_small.sv`, `tb_workloads_mid.sv` and `tb_workloads_large.sv`
instantiate the top level once per ISCAS '89 circuit of the published
aliasing experiment (25 circuits, 2 to 320 outputs, 64 to 2048 vectors),
through the harness `tb/wl_harness.sv`. For each circuit:

* `NUM_PO` is set to the circuit's number of outputs.
* `CNT_W` is `max(⌈log2 vectors⌉, ⌈log2(3·POs+1)⌉)`.
* The response streams are random, because the benchmark netlists are not
  part of this design.

Each harness runs one fault-free session and six faulty ones, alternating a
single flipped response bit and an output stuck at 0 or 1.

* **Fault-free sessions** must match the reference signatures exactly.
* **A single flipped bit** changes the first-tone sums by 1 or 2, so SRC1,
  SRC2, SRC3 and SRC5 must always flag it, and they do.
* **SRC4** misses every such error except one in the last vector. Its two
  chunks around the flipped bit contribute -1 and +1, which cancel; it does
  catch the stuck outputs. This matches SRC4's place
  as the worst of the five in the published aliasing ranking.

The small and mid testbenches build in about a minute each. The large one
(278 and 320 outputs) takes a few minutes to build with Verilator. Each runs
in seconds.

## What is not here

* **The circuit under test and the spectral pattern generator.** They come
  from elsewhere (ISCAS '89 benchmarks and an earlier hardware generator that
  holds spectral vectors at the inputs). Here they are only the ports `po`,
  `bist_init` and `tpg_en`.
* **The MISR and transition-count compactors.** They are only baselines for
  comparison.
* **The published aliasing and gate-count figures.** They come from fault
  simulation of the benchmark netlists, which are not included. The gate
  counts describe the original gate-level construction, not this RTL.

## Choices made here where the description is silent or incomplete

* **Adder trees.** The trees of SRC2 and SRC5 are written as word-level sums,
  and the counters as word-level adders.
* **SRC2 inputs.** Every SRC2 pair inverts its B input and takes `sub` as
  carry-in. This is the same subtract form as the HT block. An odd last PO
  is added alone.
* **End-around carry in SRC3 and SRC4.** They use it because the description
  says every compactor except SRC1 keeps the carries out of the top bit.
* **Start of a run.** Every run starts with a preceding 0 at each PO, and the
  compactor flip-flops are cleared synchronously by `clr`.
* **Reset.** It is asynchronous and active low.
* **Signature checking.** It is done on chip against golden input ports, with
  sticky flags. The source only says signatures are compared with the good
  machine's.
