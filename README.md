# Matching ECC-protected tags without decoding them

A cache tag array or a TLB often stores each tag as an ECC codeword, so that a
flipped bit in the array does not cause a wrong hit. The straightforward lookup
reads the codeword, decodes and corrects it, and only then compares it with the
incoming tag. Decoding then sits on the critical path. This design avoids it. It
**encodes the incoming tag** and measures the **Hamming distance** `d` between the
two codewords, then classifies the result:

| distance `d`            | outcome    | meaning                                                  |
|-------------------------|------------|----------------------------------------------------------|
| `d <= T_MAX` (1)        | `match`    | same tag; the stored copy has at most one correctable error |
| `T_MAX < d <= R_MAX` (2) | `fault`    | stored word has a detectable but uncorrectable error     |
| `d > R_MAX`             | `mismatch` | a different tag                                          |

Two ideas keep this fast and small:

1. **Systematic codewords are split.** The codeword is `{data, parity}`, and its
   data part *is* the tag. So the K data bits can be compared with the incoming
   tag immediately. Only the N-K parity bits have to wait for the encoder. The
   long K-bit comparison runs in parallel with encoding, and the short
   (N-K)-bit comparison runs after it.
2. **Differences are counted with half adders only.** The ones from the XOR
   banks are counted by *butterfly-formed weight accumulators* (BWAs), whose
   every stage is one gate deep. The full count is never assembled. Only enough
   is kept to tell 0, 1, 2 and "more than 2" apart.

The default configuration is a (40,33) code: 33 tag bits and 7 parity bits. The
whole matcher is combinational.

## Datapath

```
 retrieved[39:7] ──┐
                   XOR bank (33) ── BWA for tags ─────┐
 tag[32:0] ────────┤                                   │ first level
                   └─ encoder ── XOR bank (7) ── BWA for parities ─┤
 retrieved[6:0] ───────────────┘                                    │
                        interconnection (group the bits by weight)  │
            ┌──────────────┬──────────────────┬───────────────┘       second level
      OR-gate tree   BWA for 2's       BWA for 1's
            └──────────────┴────── decision unit ── match / mismatch / fault
```

## The butterfly-formed weight accumulator (`bwa.sv`)

A BWA with 2^S inputs has S stages of 2^(S-1) half adders. A half adder (HA)
adds two bits of the same weight `w`. Its carry has weight `2w` and its sum has
weight `w`.

**Wiring.** Stage `t` splits the wires into blocks of 2^t. Inside each block,
HA `i` adds bit `i` of the left half and bit `i` of the right half. It writes
its carry to slot `2i` of the block and its sum to slot `2i+1`. Both halves of
a block went through identical networks, so the two bits an HA adds always have
the same weight.

**Output weights.** After S stages, output slot `p` has weight 2^z, where `z` is
the number of zero bits among the low S bits of `p`. For 8 inputs (slots I..P)
the weights are

```
slot    I  J  K  L  M  N  O  P
weight  8  4  4  2  4  2  2  1
```

The number of ones at the input equals the sum of the weights of the output
bits that are 1. For example, a single 1 on any input ends up in P, and eight
ones end up as I alone. This is not a binary number: several output bits can
share a weight. That does not matter, because the next level groups bits by
weight anyway. `ecc_match_pkg::bwa_weight(s, p)` computes the weight.

**Pruning.** Counts above `R_MAX` never need to be known exactly. An HA whose
inputs weigh more than `KEEP_MAX` is therefore not built. Its two input bits
are ORed into the `sat` output instead. `sat = 1` means the count is at least
`2*KEEP_MAX`. Output slots behind a removed HA read 0. For an 8-input BWA with
`KEEP_MAX = 1`, only the half adders on the weight-1 path remain, and
everything else collapses into one OR gate.

Inputs that are not a power of two wide (33 and 7 here) are padded with
constant zeros. Synthesis removes the hardware behind them.

## Two-level counting (`bwa_second_level.sv`, `decision_unit.sv`)

**First level.** One BWA counts the tag differences and one counts the parity
differences, both pruned at `P_MAX`. `P_MAX` is the largest power of two not
above `R_MAX`, so 2 by default.

**Interconnection and OR-gate tree.** All first-level output bits are grouped
by weight. Any bit heavier than `P_MAX` proves `d > R_MAX` on its own. These
bits and the first-level `sat` flags go into one OR tree, `or_flag`.

**Per-weight BWAs.** Each weight `2^c <= P_MAX` gets its own BWA, built with
`BASE_W = 2^c`. For (40,33) these are:

- a BWA for 1's with 2 inputs, one from each first-level BWA;
- a BWA for 2's with 9 inputs (6 from the tag BWA, 3 from the parity BWA),
  padded to 16.

Both are pruned at `P_MAX` in the same way.

**Decision unit.** A mismatch is declared when any of these holds:

- `or_flag` is set;
- a second-level `sat` flag is set;
- any second-level bit heavier than `R_MAX` is set.

Otherwise the few remaining bits of weight at most `R_MAX` are added in a
small adder, and the sum is compared with `T_MAX` and `R_MAX`.

**Worked example: (8,4).** With `N=8, K=4` the structure reduces to:

- two 4-input first-level BWAs with weights 4,2,2,1;
- the two weight-4 bits ORed into `Q`;
- a BWA for 2's with 4 inputs, whose weight-4 carries are ORed into `R` and
  whose remaining HA gives `S` (weight 4) and `T` (weight 2);
- a BWA for 1's giving `U` (weight 2) and `V` (weight 1).

`d > 2` exactly when `Q | R | S | (T & U) | ((T | U) & V)`.

## The code (`ecc_encoder.sv`)

The matcher works with any systematic code. What matters to it is the code's
minimum distance, which sets `T_MAX` and `R_MAX`. The encoder here implements a
shortened extended Hamming code, which is SEC-DED: it corrects one error and
detects two.

- Data bit `j` gets the j-th Hamming position that is not a power of two:
  3, 5, 6, 7, 9, …
- Parity bit `i` (for `i < N-K-1`) is the XOR of the data bits whose position
  has bit `i` set.
- The top parity bit is the overall parity. It reduces to the XOR of the data
  bits whose position has an even number of ones.

The parity masks are computed at elaboration. An elaboration error is raised
when `(N,K)` is too short for the code. The minimum distance is 4 for all of
(8,4), (16,8), (16,11), (24,18), (31,25) and (40,33). Any other systematic
encoder can be swapped in if `T_MAX`/`R_MAX` are set to match its distance.

## Interface of `ecc_tag_match`

| port        | dir | width              | meaning                                          |
|-------------|-----|--------------------|--------------------------------------------------|
| `retrieved` | in  | N                  | stored codeword `{data[K], parity[N-K]}`, data in the upper bits |
| `tag`       | in  | K                  | incoming tag, not encoded                        |
| `match`     | out | 1                  | `d <= T_MAX`                                     |
| `fault`     | out | 1                  | `T_MAX < d <= R_MAX`                             |
| `mismatch`  | out | 1                  | `d > R_MAX`                                      |
| `dist_sat`  | out | clog2(R_MAX+2)     | `min(d, R_MAX+1)`                                |

Exactly one of `match`, `fault` and `mismatch` is 1. There is no clock and no
reset. The outputs follow the inputs after the combinational delay. Register
the inputs and outputs outside if the lookup is pipelined.

The parameters are `N` (40), `K` (33), `T_MAX` (1) and `R_MAX` (2). Every
other size is derived from them.

**Size and depth.** Synthesised with yosys to generic two-input gates, the
(40,33) matcher has 314 gates. Its longest path is 19 gates. For (16,11) the
longest path is 14 gates, and for (8,4) it is 9. These numbers depend on the
gate library and on how the XOR trees are balanced. They are not comparable
one-for-one with published gate counts.

## Files

| file | contents |
|------|----------|
| `rtl/ecc_match_pkg.sv` | weight and grouping functions shared by the blocks |
| `rtl/half_adder.sv` | HA cell |
| `rtl/bwa.sv` | butterfly weight accumulator with optional pruning |
| `rtl/ecc_encoder.sv` | systematic SEC-DED parity generator |
| `rtl/xor_bank.sv` | bitwise difference |
| `rtl/bwa_second_level.sv` | interconnection, OR-gate tree, per-weight BWAs |
| `rtl/decision_unit.sv` | match / fault / mismatch classification |
| `rtl/ecc_tag_match.sv` | top level |
| `tb/tb_*.sv` | one self-checking testbench per module |
| `tb/tb_ecc_tag_match_codes.sv`, `tb/tag_match_checker.sv` | the matcher at six code sizes |

## Verification

Every testbench is self-checking. It prints
`TB_RESULT checks=<n> failures=<m>` and stops itself with a watchdog if
something hangs. The expected values come from models written separately in
the testbenches:

- a reference encoder written as a syndrome over Hamming positions;
- `$countones` for distances;
- slot weights recomputed from the index.

The testbenches:

- `tb_ecc_tag_match` runs the default (40,33) matcher with about 44,000
  vectors: exact codewords, 1 and 2 errors in the data part, the parity part
  or both, 3 to 6 errors, neighbouring and random tags, and random words. It
  also counts how often each decision path fired: exact match, corrected data
  error, corrected parity error, fault, and mismatch via the OR tree, via
  first-level pruning, via second-level pruning and via the small adder. It
  fails if any path never fired.
- `tb_ecc_tag_match_codes` runs the (8,4), (16,8), (16,11), (24,18), (31,25)
  and (40,33) sizes. (8,4) is checked exhaustively over all tag/word pairs.
- The block testbenches check the 8-input butterfly's weight table and its
  counts for all 256 inputs, a 33-input BWA, a pruned BWA and a BWA for 2's.
  They also check the code's validity and minimum distance, the OR tree and
  second-level sums, and the decision thresholds.

To run one with Verilator:

```
verilator --binary --timing -Irtl -Itb rtl/ecc_match_pkg.sv tb/tb_ecc_tag_match.sv \
          --top-module tb_ecc_tag_match
./obj_dir/Vtb_ecc_tag_match
```

Put `rtl/ecc_match_pkg.sv` first on the command line. Verilator finds the
other modules through `-Irtl -Itb`.

## What follows the published architecture and what does not

**Follows it:**

- encode-and-compare with the data and parity comparisons in parallel;
- the XOR banks;
- the 8-input butterfly wiring and output weights;
- the reduced BWA in which heavy half adders become an OR gate;
- the two-level organisation: interconnection, OR-gate tree, a BWA per weight
  up to `P_MAX`, and a decision unit;
- the three outcomes;
- the (40,33) default size.

**Choices made for this RTL where the description is open:**

- **The code.** The shortened extended Hamming code and its bit order, with
  the overall parity as the top parity bit.
- **The thresholds.** `T_MAX = 1` and `R_MAX = 2`, the SEC-DED reading.
- **Pruning and padding.** The general pruning rule (`KEEP_MAX`) and zero
  padding to a power of two.
- **Bit order at the second level.** Parity bits come before tag bits at each
  second-level BWA.
- **The decision unit's insides.** A small adder over the light bits.
- **Extra output.** The `dist_sat` output.
- **No enable input.** The matcher has none.

The matcher does not include the memory that holds the codewords (the cache
tag array or TLB). It does not include the decode-and-compare or
saturating-adder designs it improves on either. `retrieved` is where a tag
array connects.
