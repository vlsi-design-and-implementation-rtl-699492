# SEA crypto core with a low-transition built-in self-test

A block cipher on a secure chip cannot be tested the usual way: scan chains
that make every flip-flop controllable and observable also let an attacker
read out key-dependent state. This design tests the cipher from the inside
instead. A small multiple-single-input-change (MSIC) pattern generator drives
the cipher's own round logic, a multiple-input signature register (MISR)
compacts the responses, and a BIST controller compares the final signature
with the fault-free one and reports pass or fail. No internal state leaves
the chip. Each new test vector differs from the last in only one bit per
group, so the circuit switches little during the test and test power stays
low.

The cipher is SEA (Scalable Encryption Algorithm), a Feistel cipher built
only from XOR, a 3-bit S-box, word and bit rotations and modular addition,
chosen because it is small. It is configured here as SEA_96,8: 96-bit
blocks, a 96-bit key, 8-bit words and 93 rounds. It uses an iterative
architecture that computes one round per clock.

```
             data_in ──►┌──────────────────────────┐──► data_out
                        │ sea_core                 │
  mode, start ─┐        │  sea_datapath  (L, R)    │
               ▼        │  sea_key_schedule (KL,KR)│
        ┌───────────┐   └──▲───────────────┬───────┘
        │ bist_ctrl │      │ test_vec 144b │ test_resp 96b
        └─┬───┬───┬─┘   ┌──┴───────┐   ┌───▼───┐
          │   │   └────►│ msic_tpg │   │ misr  │──► signature
          │   └────────────────────────►       │
          └──► test_en / test_dec to core  └───────┘ ──► test_pass
```

## The cipher: SEA_96,8

A 96-bit block is split into two 48-bit halves, and each half into six
8-bit words. Word `i` of a half sits in bits `[8*i +: 8]`. Four word-level
operations make up every round:

| operation | definition |
|---|---|
| `+` | word-wise addition modulo 2^8 |
| `S` | the 3-bit S-box `{0,5,6,7,4,3,1,2}`, applied bit-sliced to each triple of words (x0,x1,x2) = (word 3t, 3t+1, 3t+2): `x0 ^= x2&x1; x1 ^= x2&x0; x2 ^= x0\|x1`, in that order |
| `r` | bit rotation: word 3t rotated right by one bit, word 3t+2 left by one bit, word 3t+1 unchanged |
| `Rw` | word rotation: word i moves to word i+1, the last wraps to word 0 (a left rotation of the half by 8 bits) |

`sea_f` computes the shared core `f(x,k) = r(S(x + k))`.

**Data round** (`sea_round`). For encryption, `L' = R` and
`R' = Rw(L) ^ f(R, K)`. For decryption, `L' = R` and
`R' = Rw^-1(L ^ f(R, K))`. Both directions share one circuit. The left path
is "word rotation, XOR, inverse word rotation", and the `dec` input bypasses
either the first rotation or the last. A decryption round undoes an
encryption round that used the same key. The input block is
`P = L0 & R0` (L0 in the upper half), and the output is the swapped
`C = R_nr & L_nr`.

**Key round** (`sea_key_round`). `KL' = KR` and `KR' = KL ^ Rw(f(KR, C))`.
The round constant `C(i)` holds `i` in word 0 and zeros in every other word.

### The key schedule's switch (the subtle part)

The key register pair is updated once per data round, but not
monotonically. With `nr` odd and `h = floor(nr/2)`:

1. In rounds `i = 1..h`, `(KL,KR) <- FK(KL,KR,C(i))`. After round `h` the
   two halves are exchanged.
2. In rounds `i = h+1..nr-1`, `(KL,KR) <- FK(KL,KR,C(nr-i))`.
3. After round `nr` the halves are exchanged once more.

FK is a Feistel round, so `FK(swap(FK(x,c)),c) = swap(x)`. After the
switch, running FK with the constants in reverse order walks the schedule
back. This has two consequences:

* The key registers end exactly where they started, at the master key.
* The sequence of round keys is a palindrome. Round `i` uses `KR` for
  `i <= ceil(nr/2)` and `KL` after that. Round keys `KR_0, KR_1, ...,
  KR_{h-1}` are used on the way up, and the same keys in reverse order on
  the way down.

Because the sequence is a palindrome, decryption uses the same schedule
and the same order as encryption. Only the data round changes direction.
`sea_key_schedule` implements this with a single FK instance, a mux for
the constant index (`i` or `nr-i`) and an exchange at rounds `h` and `nr`.
`nr` must be odd, and `sea_core` asserts this at elaboration.

The number of rounds is 93. SEA's usual rule, `nr = 3n/4 + 2(nb + b/2)`,
gives 92 for n = 96 and b = 8. The loop bounds above only meet when `nr` is
odd, so this design uses 93.

### Core timing (`sea_core`)

* `start` while idle loads `data_in` and `key_in` and latches `decrypt`.
* The next `NR` clocks each compute one round.
* `done` pulses for one clock exactly `NR` clocks after the edge that took
  `start`. At that point `data_out` is valid, and it holds until the next
  start.
* A `start` while busy is ignored.
* Encryption and decryption take the same time.
* The key register is back at the master key when `done` rises.

## The self-test

### What is tested

While `test_en` is high, the core ignores `start` and its registers hold.
One 144-bit test vector `{K/C, R/KR, L/KL}` drives **both** round functions
directly:

* The data round takes `L = vec[47:0]`, `R = vec[95:48]` and
  `K = vec[143:96]`.
* The key round takes `KL`, `KR` and the full 48-bit constant from the same
  three fields.

Feeding the full constant exercises every adder bit, not only the low word
used in normal operation. The response is the XOR of the two 96-bit round
outputs, one response per clock. This is the test-per-clock arrangement:
pattern generator, then combinational logic, then MISR. The round logic is
almost all of the core's logic. The L/R and KL/KR registers and their load
multiplexers are not covered by this test.

### MSIC pattern generator (`msic_tpg`)

* `seed_lfsr` is an M = 12-stage Fibonacci LFSR with polynomial
  `x^12+x^6+x^4+x+1` and period 4095. It steps on the slow tick CLK1.
* `rj_counter` is an L = 11-stage reconfigurable Johnson counter that steps
  on CLK2:
  * `RJ_Mode = 0`: Johnson counter, with 2L states and one bit flip per step.
  * `RJ_Mode = 1`, `Init = 1`: circular shift register, back to the same
    vector after L steps.
  * `RJ_Mode = 1`, `Init = 0`: clear.
* An array of M×L XOR gates combines them:
  `X[(j-1)L + i] = J_i ^ S_j` (X_1 = bit 0). The seed bits themselves follow
  on top, so `vec = {S, X}` has M×L + M = 132 + 12 = 144 bits, exactly one
  round's input. Each Johnson step flips one bit in each of the 12 groups of
  11 bits, and the seed part changes only every 2L vectors.
* The direct seed bits matter. The complement of a Johnson state is again a
  Johnson state, so a seed S and its complement ~S would give the same 2L
  XOR-array vectors. The direct seed bits keep them apart, so no vector
  repeats during a test (checked over a whole default self-test).
* `msic_ctrl` is the clock and control circuit. CLK1 and CLK2 are one-cycle
  enables on the single system clock, not separate clock nets. It supports
  two sequences:
  * **Test-per-clock** (the configuration this design is built around): a
    vector every clock. After 2L = 22 vectors the seed also steps, so every
    seed is combined with all 22 Johnson states.
  * **Test-per-scan**: for each seed, one CLK1 tick, then 22 times: one
    Johnson step with `RJ_Mode = 0`, then L shift clocks with
    `RJ_Mode = Init = 1`, then a capture clock. During the shift clocks
    `tpg_shift` is high and the codewords would enter scan chains. No scan
    chains are part of this design: the top brings `tpg_vec`, `tpg_shift`
    and `tpg_capture` out for them. Inside, the core's response is compacted
    at each capture, when the Johnson register has rotated back to its
    vector.

### Signature register (`misr`)

`misr` is a 96-bit internal-XOR MISR with polynomial
`x^96+x^94+x^49+x^47+1`: `sig <= shift(sig) ^ (msb ? POLY : 0) ^ d`. A
faulty response stream aliases to the good signature with a probability of
about 2^-96.

### Test sequence (`bist_ctrl`)

A self-test runs in five steps:

1. **Clear**: one clock that resets the generator and clears the MISR.
2. **Encryption pass**: `PATTERNS` = 1408 vectors (64 seeds × 22) with the
   encryption round selected.
3. **Decryption pass**: 1408 more vectors with the decryption round selected.
4. **Check**: compares the signature with the fault-free one.
5. **Done**: `test_done` and `test_pass` hold until the next start.

Vectors are counted by the generator's `vec_valid`, so the same controller
serves both schemes. With the defaults, a self-test takes about 2,820 clocks in the
test-per-clock scheme and about 36,740 in the test-per-scan scheme.

The fault-free signatures `GOLDEN_CLOCK = 96'h67bdf22704c26bf3bee1b3f8` and
`GOLDEN_SCAN = 96'h185687893c0c847a6808a93e` belong to the default
parameters, including the LFSR seed `12'h001`. **If you change any size, the
seed, the polynomials or `PATTERNS`, recompute both values.** The function
`selftest_sig(patterns, per_scan)` in `tb/sea_ref_pkg.sv` gives them from an
independent model: call it from any small testbench and `$display` the
result.

## Top level (`crypto_bist_top`)

| port | dir | width | meaning |
|---|---|---|---|
| `clk`, `rst_n` | in | 1 | clock; synchronous active-low reset for everything |
| `mode` | in | 1 | `MODE_NORMAL` or `MODE_SELFTEST`, sampled with `start` |
| `scan_scheme` | in | 1 | `SCHEME_PER_CLOCK` or `SCHEME_PER_SCAN`; keep it stable during a self-test |
| `start` | in | 1 | start a cipher operation or a self-test, depending on `mode` |
| `decrypt` | in | 1 | 1 = decrypt |
| `data_in`, `key_in` | in | 96 | block and key |
| `data_out` | out | 96 | result, valid with `done` |
| `busy`, `done` | out | 1 | cipher running; one-clock completion pulse |
| `test_busy`, `test_done`, `test_pass` | out | 1 | self-test running; finished (level); verdict |
| `signature` | out | 96 | MISR contents |
| `tpg_vec`, `tpg_shift`, `tpg_capture` | out | 144, 1, 1 | generator outputs for external scan chains |

A start in one mode is ignored while an operation of the other mode runs.
The `crypto_bist_pkg` package holds the default sizes and the two enums.

## Files

| file | contents |
|---|---|
| `rtl/crypto_bist_pkg.sv` | default sizes, `tpg_scheme_e`, `bist_mode_e` |
| `rtl/sea_f.sv` | `r(S(x + k))` |
| `rtl/sea_round.sv`, `rtl/sea_key_round.sv` | data round (both directions), key round |
| `rtl/sea_datapath.sv`, `rtl/sea_key_schedule.sv`, `rtl/sea_core.sv` | iterative cipher |
| `rtl/seed_lfsr.sv`, `rtl/rj_counter.sv`, `rtl/msic_ctrl.sv`, `rtl/msic_tpg.sv` | pattern generator |
| `rtl/misr.sv`, `rtl/bist_ctrl.sv` | compaction and test control |
| `rtl/crypto_bist_top.sv` | top level |
| `tb/sea_ref_pkg.sv` | independent reference models: cipher, generator, MISR, whole self-test |
| `tb/tb_<module>.sv` | one self-checking testbench per module |

## Simulating

Every testbench prints `TB_RESULT checks=N failures=M` and stops itself. A
watchdog ends a hung run with a failure. For example, the end-to-end test
at the default sizes:

```
verilator --binary --timing --assert -Wno-fatal -Irtl -Itb \
  rtl/crypto_bist_pkg.sv tb/sea_ref_pkg.sv rtl/*.sv tb/tb_crypto_bist_top.sv \
  --top-module tb_crypto_bist_top -o sim && ./obj_dir/sim
```

For a block testbench, swap in `tb/tb_<module>.sv` and `--top-module`.

`tb_crypto_bist_top` runs in about a second and covers the following:

* encryptions checked against the reference cipher
* decryptions back to the plain text, with the latency checked
* starts that must be ignored
* a test-per-clock self-test and a test-per-scan self-test, each with the
  reference signature and a pass verdict
* a self-test with a stuck-at-0 fault forced on one response bit, which
  must fail
* normal operation afterwards

It counts each of these mechanisms and fails if one never happened.

## What to trust, and where this departs from the original description

The parts follow a published description of a BIST-equipped SEA crypto
system. The following parts of that description are followed directly:

* the block structure: BIST controller, encryption/decryption unit, key
  schedule, seed circuit, clock and control circuit, Johnson counter, XOR
  array, MISR
* the data and key round datapaths, including where the shaded rotation
  boxes sit
* the key-schedule pseudocode with its mid-way switch
* the XOR-array indexing `X_(j-1)n+i = J_i ^ S_j`
* the `RJ_Mode`/`Init` behaviour for Johnson and circular-shift operation
* both test procedures, including the 2l Johnson vectors per seed

The following are this design's own choices:

* **Sizes**: SEA_96,8 with 93 rounds; M = 12, L = 11; a 96-bit MISR; 1408
  patterns per pass.
* **Exact SEA operations**: the S-box table, the rotation amounts and the
  constant `C(i)` are taken from the SEA specification, not from the
  description.
* **Polynomials**: both polynomials, and the LFSR seed.
* **Clocking and reset**: a single clock with enables in place of CLK1 and
  CLK2; synchronous active-low reset.
* **`RJ_Mode = 1` with `Init = 0`**: the clear function.
* **Test connection**: how the generator connects to the core, and the XOR
  folding of the two round outputs into one response. The MISR takes only
  the round-logic response: the original block diagrams also feed it from
  scan chains, which this design does not have.
* **BIST sequence**: the two-pass sequence and the golden-signature
  comparison.
* **Ports**: full-width parallel ports. The original simulation showed
  8-bit `datain`/`cout`/`fout`/`tout` signals and `rxd`/`txd` lines whose
  roles are not explained, so they are not reproduced.

Not built:

* scan chains (see above)
* the "scalable SIC counter", named as an alternative to the Johnson counter
  but not described
* the idea of using the cipher itself as pattern generator and compactor,
  which the main configuration replaces with the MSIC generator and the MISR

Reported FPGA area, power and delay figures are not reproduced.

The reference model in `tb/sea_ref_pkg.sv` is written independently: a
table S-box, an array-based key schedule and a state model of the
generator. It implements the same reading of SEA as the RTL. Agreement with
it therefore shows that the RTL matches that reading, not that the reading
matches official SEA test vectors, which were not available. The
decrypt-after-encrypt checks hold regardless.
