# Hybrid test-data compressor: block matching, BWT and pattern overlapping

Testing a system-on-chip means shifting a very large set of test vectors into
its scan chains, and both the tester memory and the test time grow with that
volume. This design compresses a test set in hardware. Several techniques are
chained, and each one takes advantage of a different kind of redundancy in
scan test data:

* **Don't cares are filled** so that the same block values recur as often as
  possible.
* **Block matching**: each vector is compared block by block with the vector
  before it, and the blocks that changed are found.
* **The frequency split**: block columns that change often (*high-frequency*
  columns) are separated from those that rarely change (*low-frequency*
  columns).
* **Burrows-Wheeler transform (BWT)**: each high-frequency column is
  rearranged by this reversible sort, which groups equal symbols together.
* **Merge**: the two paths are joined back into whole vectors.
* **Pattern overlapping**: the vectors are chained into one serial bitstream.
  Each vector starts as soon after the previous one as the bits allow, so
  overlapping bits are stored only once.

The output is a serial stream, one bit per clock, together with the small
amount of side information needed to undo each step.

```
 raw vectors ──► vector store ──► don't-care filler ──► block matcher ──► frequency range separator
 (value+care)        ▲   │             ▲                                         │
                     │   │     minterm frequency counter                        │ high_mask
                     │   └───────────────────────────────────────┐              ▼
                     │                                 low-frequency columns   BWT of each
                     └── filled vectors written back               │           high-frequency column
                                                                    ▼              │
                                                          block adder (merge) ◄────┘
                                                                    │
                                                           pattern overlapper ──► so_bit (serial stream)
```

## How test data is represented

Every test bit is a pair (value, care). `care = 0` marks a don't care (X), and
the value bit of an X is ignored and stored as 0. A vector has `NB` blocks of
`BW` bits (defaults: 7 blocks of 4 bits, so 28 bits), and a test set has `NV`
vectors (default 3). These sizes come from a worked three-vector example,
which is also used in the tests.

Bit order is the printed order. The leftmost bit of a vector is its MSB,
*block 1* is the leftmost block, and it sits in bits `[W-1 -: BW]`. In all
per-block masks (`high_mask`, `chg_mask`, `diff`), bit `NB-1` is block 1 and
bit 0 is block `NB`. The pattern overlapper shifts the MSB of a pattern out
first.

## Don't-care filling by minterm frequency

A block with *k* don't cares *contains* 2^k fully specified values (minterms):
all the values that agree with it on every specified bit.
`minterm_freq_counter` keeps one counter per minterm (16 for 4-bit blocks).
For each block of the test set, it adds one to the counter of every minterm
the block contains. It takes a whole vector per clock.

Example: in the three-vector example set of `tb_minterm_freq_counter`,
minterm `1001` is contained in five blocks. Those blocks are `10XX` and
`X0X1` of vector 1, `10X1` of vector 2, and `10X1` and `XX01` of vector 3.

`x_filler` replaces each block by the most frequent minterm it contains (on a
tie, the smaller minterm). After filling, many blocks share the same value,
which helps both block matching and the BWT. A fully specified block contains
only itself, so it passes through unchanged. The top has one filler per block
column and fills one vector per clock, writing it back into the store.

## Block matching and the frequency split

`block_matcher` compares every block of the filled vector with the same block
of the previous filled vector:

* `diff[c] = 1` means the block changed. A decoder that holds the previous
  vector needs only these blocks to rebuild the current one.
* The first vector of a set has no reference, so all of its flags are 1.

The per-vector flags are brought out as `chg_mask`.

`freq_range_separator` counts, per column, how many vector-to-vector changes
occurred. A column that changed at least `HF_THRESH` times (default 2) is a
high-frequency column.

Example: in the three-vector block-matching example, vector 2 differs from
vector 1 in blocks 1, 4, 5 and 7, and vector 3 differs from vector 2 in
blocks 1, 2, 5 and 7. So blocks 1, 5 and 7 are high frequency and blocks 2, 3,
4 and 6 are low frequency. The threshold is this design's way of turning that
example into a rule. A different threshold is one parameter away.

## The Burrows-Wheeler transform of a column

For each high-frequency column, the `NV` filled blocks down the vectors form a
string of `NV` 4-bit symbols, symbol 0 from vector 1. `bwt_unit` computes the
BWT of this string:

1. It forms the `N` cyclic rotations of the string.
2. It sorts the rotations lexicographically.
3. It returns the **last column** of the sorted matrix, plus **`primary`**:
   the row in which the unrotated string ended up.

The primary index is what makes the transform reversible.

The hardware does not sort. Instead it *ranks*:

* `N×N` comparators decide, for each pair of rotations (i, j), whether
  rotation j sorts before rotation i.
* Each comparator walks the symbols until the first difference.
* Equal rotations (periodic strings) are ordered by rotation index, so the
  sort is stable and the result is unique.
* `rank(i)` is the number of rotations that sort before rotation i. Row
  `rank(i)` of the output receives the last symbol of rotation i, which is
  `sym[(i+N-1) mod N]`.
* `primary = rank(0)`.

The result is registered, so `done` follows `start` by one clock.

Worked examples (with 8-bit characters):

| string  | last column | primary |
|---------|-------------|---------|
| DRDOBBS | OBRSDDB     | 3       |
| $WORK   | KRWO$       | 0       |

**Inverse transform.** The decoder inverts each column with the standard
LF mapping:

* `LF(r)` = (number of symbols in `last` smaller than `last[r]`) + (number of
  earlier rows with the same symbol as `last[r]`).
* Start at row `primary`. For k = N-1 down to 0: `s[k] = last[row]`, then
  `row = LF(row)`.

Both testbenches use this to check that nothing is lost. The
comparator array grows as N²·N symbol comparisons. That is trivial for the
3-symbol columns of the default top, and about 950 cells for the 7-character
default of the block itself.

`block_adder` then builds each merged vector. It takes high-frequency
columns from the BWT result (row v of the transformed column goes to vector
v) and low-frequency columns from the filled vector.

## Pattern overlapping

The merged vectors (one pattern of `L = NB·BW` bits each) are chained into one
stream. Call s the *shift* of a pattern: the number of new stream bits it
adds. For each new pattern, `pattern_overlap` tries s = 1 … L and takes the
smallest s for which:

* the last `L−s` bits of the stream and the first `L−s` bits of the pattern
  agree;
* a don't care on either side agrees with anything;
* an X already in the stream takes the value of the pattern bit placed over
  it.

So s = 1 is a near-complete overlap, s > 1 means link bits are needed, and
s = L means no overlap. The first pattern of a stream always costs L.

Example: the ten 5-bit patterns `0010- 010-- 101-- 01010 10100 100-- 00111
0111- 11100 10001` (50 bits) chain into `0010101001110001` (16 bits). Their
shifts are 5,1,1,1,1,2,1,1,1,2.

Hardware:

* Only the last `L−1` stream bits can still be overlapped, so the unit keeps
  just a window of that size.
* A `2L−1`-bit buffer holds the window with the new pattern merged into it at
  the chosen offset.
* The pattern's s new bits are shifted out one per clock on `out_*`. So a
  pattern costs exactly s clocks after the clock that accepts it, in the same
  way that it costs s shift clocks on the tester.
* `flush` drains the `L−1` window bits at the end of a stream and empties the
  window.
* An X that no later pattern resolved leaves with `out_care = 0`. Inside the
  top this cannot happen, because every vector is already filled.

An assertion in the module checks the input handshake: a pattern offered
while the unit is busy must be held, stable, until it is taken.

## What a decoder needs

The compressed stream alone does not identify the vectors. For each set, the
top also provides:

| output | width | use |
|---|---|---|
| `shift` (with `shift_valid`, once per vector) | clog2(L+1) | vector v starts `shift[v]` bits after vector v−1 (vector 1 at bit 0) |
| `high_mask` | NB | which columns were transformed |
| `bwt_primary` | NB × clog2(NV) | row index to invert each transformed column; 0 for others |
| `chg_mask` | NV × NB | blocks that changed from the previous vector |
| `xfill_blocks` | CNT_W | number of blocks that had don't cares (statistics) |

Decoding a set takes three steps:

1. Cut the vectors out of the stream at the positions given by the shifts.
2. Invert the BWT of each high-frequency column.
3. The result is the filled test set. It agrees with every specified bit of
   the original.

`tb_hybrid_compressor` performs exactly this decode on the design's own
outputs. The change flags are informative here: the stream carries whole
vectors, so they are not needed for decoding.

## Controller and timing

`hybrid_compressor` runs the phases one after the other. Let H be the number
of high-frequency columns and s_v the shift of vector v.

| phase | clocks | what happens |
|---|---|---|
| LOAD | NV handshakes | `in_ready` is high; each vector is stored and counted |
| FILL | NV | fill, write back, match, count changes |
| BWT | NB + H | 2 clocks per high-frequency column, 1 per low-frequency column |
| OVL | Σ(1 + s_v) | accept each merged vector, shift out its new bits |
| FLUSH | L + 1 | flush request, L−1 window bits, idle check |
| done | 1 | `done` is registered |

From the clock that accepts the last vector to the clock where `done` is
seen, the total is `NV + NB + H + Σ(1+s_v) + L + 2` clocks. At the defaults
this is between about 72 and 132 clocks per set. The testbench checks it
exactly. After `done` the unit is back in LOAD. The side outputs hold their
values until the next set is filled.

## Parameters

| parameter | default | meaning |
|---|---|---|
| `BW` | 4 | bits per block (from the worked examples) |
| `NB` | 7 | blocks per vector (from the worked examples) |
| `NV` | 3 | vectors per test set (from the worked examples) |
| `HF_THRESH` | 2 | changes that make a column high frequency (own choice) |
| `CNT_W` | 8 | width of the frequency and change counters; they saturate (own choice) |

The pattern length inside the top is `NB·BW`. `bwt_unit` defaults to N = 7,
W = 8, and `pattern_overlap` to L = 5; these are the sizes of their worked
examples. The top sets them to its own sizes. Shared constants and the
controller state type are in `rtl/hc_pkg.sv`.

## Files

| file | block |
|---|---|
| `rtl/hc_pkg.sv` | constants, state enum, containment function |
| `rtl/hybrid_compressor.sv` | top level and phase controller |
| `rtl/test_vector_store.sv` | register file for the test set |
| `rtl/minterm_freq_counter.sv` | minterm frequency table |
| `rtl/x_filler.sv` | don't-care filler for one block |
| `rtl/block_matcher.sv` | change flags against the previous vector |
| `rtl/freq_range_separator.sv` | per-column change count, high/low split |
| `rtl/bwt_unit.sv` | Burrows-Wheeler transform by parallel ranking |
| `rtl/block_adder.sv` | merge of the two paths |
| `rtl/pattern_overlap.sv` | greedy overlap, serial stream output |
| `tb/tb_<block>.sv` | one self-checking testbench per block |

## Simulating

Every testbench prints `TB_RESULT checks=N failures=M` and ends with
`$finish`. Each one has a watchdog. For example:

```
verilator --binary --timing --assert -Irtl -y rtl -y tb +libext+.sv \
    rtl/hc_pkg.sv tb/tb_hybrid_compressor.sv --top-module tb_hybrid_compressor
./obj_dir/Vtb_hybrid_compressor
```

Replace the testbench name to run another block. The simulator is two-state,
so everything that is read is reset or initialised.

What the testbenches establish:

* **tb_hybrid_compressor**, at the default size with no parameter override.
  It runs 63 sets: both worked examples, an all-zero set and 60 random sets
  of varying X density. It compares every output with a reference model of
  the whole flow written in the testbench, decodes the stream as described
  above, and checks the clock count. It counts each mechanism (fill, changed
  and unchanged blocks, high and low columns, BWT, partial overlap, no
  overlap, back-to-back sets) and requires each one to occur.
* **tb_bwt_unit**: both worked strings, 21 constant strings, and 300 random
  strings over a 3-letter alphabet, compared with a rotation-matrix sort and
  inverted.
* **tb_pattern_overlap**: the 10-pattern example, its 16-bit result, shifts
  and clock count, and 200 random streams with don't cares, compared with a
  string-based reference.
* The remaining block testbenches check the worked examples where there are
  any, plus random cases against direct computations.

## Where this design makes its own choices

The method defines what each step does. In several places it leaves open how
that is realised in hardware, and the following choices are this design's
own:

* **The compression runs in hardware.** The method is also described as a
  software compressor whose output is decompressed by a program on the
  SoC's embedded processor. That processor and its program are not part of
  this RTL. No decompressor is provided in hardware. The decode procedure
  above is what such a program has to do.
* **One BWT string per high-frequency column, down the vectors.** The method
  applies the BWT to "the high-frequency blocks" without fixing how they are
  strung together.
* **The high/low rule** is a change-count threshold. Its value, 2, is
  chosen so that the worked example splits as intended.
* **The block adder** is read as a column-wise merge, not as arithmetic.
* **Matching and overlapping operate on filled vectors.** As a result the
  overlapper never sees don't cares inside the top, even though it supports
  them. Filling first favours block matching and the BWT. Overlapping the
  unfilled vectors would give the overlapper more freedom, at the cost of the
  other two steps.
* **No pattern reordering.** The method notes that reordering patterns can
  increase overlap but gives no rule, so vectors are chained in input order.
* **Not built: the LFSR.** The method's implementation results mention a
  test-pattern LFSR but do not describe it, so it is not part of this design.
* **Own choices of mechanism:** tie rules (smaller minterm; stable sort),
  saturating counters, the valid/ready load port, the serial output and the
  phase-sequential controller (one set at a time, no overlap between
  phases).

Known limits:

* The BWT comparator array is quadratic-by-linear in `NV`, and the overlap
  search is quadratic in `L`. Both are fine at the default sizes. Large test
  sets would call for a sequential sort and a sequential overlap search.
* `CNT_W` must hold `NV·NB` for the frequency counts to stay exact.
* Only the default size of the top has been simulated. The blocks have
  also been simulated at the sizes of their own worked examples.
