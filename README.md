# SCAN picture scrambling with feedback associative memories

A picture can be scrambled for transmission without touching its pixel
values: it is enough to send the pixels in a secret order. SCAN describes
such an order as a pyramid. The picture is cut into `a1 x a1` blocks. Each
block is cut into `a2 x a2` smaller blocks, and so on down to single
pixels. Each level has its own scan pattern (raster, a spiral-like pattern,
a diagonal one, ...), named by a letter. A whole key is written
`L1 a1 # L2 a2 # ... # LN aN`. For example, `B2#A4#X2` scans a 16x16 picture:
the 2x2 top blocks in pattern B, the 4x4 sub-blocks of each in pattern A,
and the 2x2 pixels of each sub-block in pattern X.

In software the address sequence comes from N nested loops. This RTL makes
it in hardware, one pixel address per clock. Each pyramid level has a small
**binary associative memory with feedback**. The memory has learned the
level's scan order as a chain of associations "current index -> next index".
A chain of divide-by-n counters makes the levels step like the digits of
an odometer. The RTL is written in SystemVerilog-2017 and is synthesizable.

## Pixel addresses in a scan pyramid

Every level side `a_l` is a power of two. A picture side is then
`n = a1*a2*...*aN`, and a pixel address has `2*log2(n)` bits: row in the
high half, column in the low half. Level `l` contributes `log2(a_l)` bits
to the row and as many to the column. Coarse levels take the high bits.
A level's pel index `p` (0 .. a_l^2-1, numbered row by row) splits the same
way: `p = row_l * a_l + col_l`. So the high half of its bits is the row
field and the low half is the column field. The pixel address is therefore
pure wiring:

    scan_row = {row_1, row_2, ..., row_N}
    scan_col = {col_1, col_2, ..., col_N}
    scan_addr = {scan_row, scan_col}        (= row * n + col)

Example: `B2#R2` on a 4x4 picture. B visits the 2x2 blocks in the order
0,1,3,2 (top-left, top-right, bottom-right, bottom-left). R visits the
pixels of each block in raster order. The sequencer emits

    0 1 4 5   2 3 6 7   10 11 14 15   8 9 12 13

This is the same as the nested-loop algorithm: the pixel index is
`sum_l (p_l div a_l) * s_l` for the row and `sum_l (p_l mod a_l) * s_l`
for the column, where `s_l` is the pixel size of a level-`l` pel.

## A memory that replays a sequence (`seq_assoc_memory`, `binary_assoc_matrix`)

This is the unusual part of the design.

**The matrix.** `binary_assoc_matrix` holds an `N_OUT x N_IN` array of
single-bit weights.

- *Storing* the pair of binary patterns `(x, y)` sets every weight whose
  row is active in `y` and whose column is active in `x`:
  `w[i][j] |= y[i] & x[j]`. Weights only ever go from 0 to 1. Storing is
  an OR of outer products.
- *Recall* of an input `x` counts, for each output line `i`, the active
  inputs that hit a set weight: `z[i] = popcount(w[i] & x)`. It then
  thresholds: `y[i] = (z[i] >= THETA)`.

If every input pattern has the same number of ones `|x|`, and `THETA = |x|`,
an output bit is set only if *all* active input lines were stored together
with it. The memory then acts like a set of AND gates learned from examples.

**Sparse input coding.** The constant weight comes from 1-out-of-d
encoders (`onehot_encoder`, `sparse_encoder`). A dense digit `c` becomes a
single 1 on line `c` of `d` lines. The memory's input is the
concatenation of:

- the *key*, meaning the scan-pattern number: 1-out-of-`N_KEYS` lines;
- the fed-back *current index* `y(t)`: `DIGITS` digits, each 1-out-of-`2**DIGIT_BITS`.

So `|x| = 1 + DIGITS`, and that is the threshold.

**Feedback.** The recalled pattern is the next index `y(t+1)`. It is
registered on the clock and fed back through the index encoder. To teach
the memory a scan order `p[0], p[1], ..., p[M-1]`, store the tuples
`(key, p[t]) -> p[t+1]` for every `t`, with the last one wrapping to
`p[0]`.

**Closing the cycle.** The register starts at 0, so an order must begin
with pel 0 (all patterns used here do). The last index is associated with
0, and storing an all-zero target writes no weights. Recalling that input
gives nothing, which is index 0 again, so the cycle closes on its own.
An unused key line has no weights set, so selecting it recalls 0 forever.

**Why one index digit.** The default `DIGIT_BITS = STATE_BITS` codes the
index as one 1-out-of-`a^2` digit. The memory then returns exactly the
stored successor. If the index were split into a row digit and a column
digit, the input `(r, c)` would also pick up weights stored by `(r, c')`
and `(r', c)`. A full scan order stores all of those, so recall would be
wrong.

**Limit on keys.** A complete scan order uses every non-zero index as a
target, so it sets every weight of its key line. The key line therefore
passes every output bit, and recall depends only on the index lines. Two
complete orders stored in the *same* memory under different keys get
mixed. The key inputs are in the design, and an unloaded key recalls 0.
In practice, though, a memory holds one order at a time. To change a
level's pattern, clear that level and load the new order. The testbench
does this in a pause between frames, in well under one frame time. Loading
takes one clock per pel: 4, 16 and 4 clocks for B2#A4#X2.

## Chaining the levels (`level_divider`, `key_select`, `scan_encoder`)

The top module `scan_encoder` holds one stage per level. Each stage is:

- a `seq_assoc_memory`;
- a `level_divider` that counts the level's steps modulo `a_l^2`;
- a `key_select` register that holds the level's active scan-pattern
  number.

Everything runs on one clock with enables:

- The innermost (last) level steps on every `pix_en`.
- A divider raises `level_done[l]` during the last step of its level's
  loop. In that cycle, at the next clock edge:
  - memory `l` restarts at index 0 (it would recall 0 anyway; the restart
    keeps the stages in step);
  - `key_select` `l` takes `next_key[l]`, so a new pattern starts at a
    loop boundary;
  - level `l-1` takes its own step.
- `frame_done = level_done[0]` marks the last pixel of a frame.

`scan_addr` and `raster_addr` belong to the pixel of the *current* cycle.
Both come straight from registers, through wiring only. The first pixel
after reset is available at once.

`raster_addr` is built the same way from the divider counts. It is the
position of the pixel in level-by-level raster order, which is the
destination index of the nested-loop algorithm. So:

- encrypt: `new[raster_addr] = old[scan_addr]` (or send `old[scan_addr]`
  in order);
- decrypt: `dec[scan_addr] = new[raster_addr]`.

Both use the same sequencer and the same key.

## Interface

`scan_encoder` parameters:

| parameter | default | meaning |
|-----------|---------|---------|
| `NLEVELS` | 3 | pyramid levels |
| `A` | `'{2, 4, 2}` | side of each level, coarse first, powers of two (default B2#A4#X2 geometry, 16x16 pixels) |
| `N_KEYS` | 4 | key lines per memory |

To override `A`, pass a named array constant, e.g.
`localparam int unsigned SIDES [2] = '{2, 2};` then
`scan_encoder #(.NLEVELS(2), .A(SIDES)) u (...)`. Some tools size a
literal `'{...}` by the default `NLEVELS`.

Derived widths: `KW = clog2(N_KEYS)`, `LW = clog2(NLEVELS)` (at least 1),
`AW = 2*sum log2(A[l])`, `SWM` = widest level index.

| port | dir | width | meaning |
|------|-----|-------|---------|
| `clk`, `rst` | in | 1 | clock; synchronous active-high reset (clears weights, counters, indices; loads `next_key`) |
| `pix_en` | in | 1 | one pixel step |
| `next_key` | in | NLEVELS x KW | pattern number each level uses from its next loop |
| `active_key` | out | NLEVELS x KW | pattern number in use |
| `learn` | in | 1 | store `(learn_key, learn_state) -> learn_next` in level `learn_level` |
| `clear` | in | 1 | erase the weights of level `learn_level` |
| `learn_level`, `learn_key`, `learn_state`, `learn_next` | in | LW, KW, SWM, SWM | learning bus; indices use the low `2*log2(A[l])` bits |
| `scan_addr`, `scan_row`, `scan_col` | out | AW, AW/2, AW/2 | scrambled pixel address |
| `raster_addr`, `raster_row`, `raster_col` | out | AW, AW/2, AW/2 | raster-order address of the same pixel |
| `level_done` | out | NLEVELS | end-of-loop pulse per level |
| `frame_done` | out | 1 | last pixel of the frame |

The sequencer holds while `learn` or `clear` is high. Loading is one
association per clock. After reset, load each level, then raise `pix_en`.

## What follows the original scheme and what is added here

Taken from the SCAN-by-associative-memory scheme:

- the per-level feedback memory with binary weights;
- OR storage and threshold recall with threshold `|x|`;
- 1-out-of-d input coding;
- closing the sequence through the all-zero state;
- one stage per level, chained by divide-by-`a^2` stages;
- key activation at loop ends;
- row/column regrouping of the address.

Choices made here:

- one synchronous clock with enables, instead of separate clocks per
  stage driven by the dividers;
- the learning/clear bus, and holding the sequence during it (loading
  keys was left open in the scheme);
- the raster address output;
- `N_KEYS = 4`, one index digit, synchronous reset;
- flip-flop weight storage.

Not covered:

- **Non-power-of-two pyramids.** Example: a 400x400 picture as
  B2#A5#I5#R8. The bit-field address needs power-of-two sides, and the
  I pattern is not defined here.
- **More than one complete order per memory** (see "Limit on keys").
- **The picture memory, the transmitter/receiver and the circuits that
  distribute keys.** These are outside the sequencer.
- **Clock frequency.** A 1024x1024 picture at 50 frames/s needs one
  address every 20 ns, so a clock of at least 52.4 MHz. This RTL gives one
  address per clock; no timing closure has been done.

## Verification

Each testbench is self-checking. It prints
`TB_RESULT checks=<n> failures=<n>` and has a watchdog.

| testbench | what it checks |
|-----------|----------------|
| `tb_onehot_encoder` | all codes for D = 8 and D = 5 (out-of-range codes drive nothing) |
| `tb_sparse_encoder` | all 64 two-digit patterns |
| `tb_binary_assoc_matrix` | exact recall of disjoint tuples, clear, and 300 random recalls against a model built from the list of stored tuples |
| `tb_seq_assoc_memory` | replay of the 4x4 A order for 40 steps, hold, restart, hold during learning, unloaded key, reload with raster order; cross-talk cases (two complete orders under two keys, and a two-digit index) follow a reference model of the storage and recall rules and are shown to depart from the stored order |
| `tb_level_divider` | count and pulse of divide-by-5 and divide-by-16 under a random enable |
| `tb_key_select` | the key changes only on reset or load |
| `tb_scan_encoder` | default size (B2#A4#X2, 16x16). Three frames with random stalls and a mid-frame learning cycle. Every `scan_addr` and `raster_addr` is checked against the nested-loop algorithm. Encrypt then decrypt must give back the original. The level-3 key changes at the frame boundary to a reloaded raster pattern. Loop-end, frame-end and key-activation counts are checked. |
| `tb_scan_b2r2` | the B2#R2 sequence listed above, over two frames |
| `tb_scan_1m` | one 1024x1024 frame (A4#A8#X2#R16, 2^20 addresses): every address checked, the addresses must form a permutation, and `frame_done` must come on clock 2^20. Takes about 30 s. |

The scan orders used by the tests are in `tb/scan_tb_pkg.sv`:

- B2 = 0,1,3,2;
- X2 = 0,3,1,2;
- raster order;
- the A pattern: for each k, go down column k from row 0 to row k, then
  left along row k. For a 5x5 level this gives 0,1,6,5,2,7,12,11,10,3,...

These orders are data loaded at run time. The RTL does not depend on them.

Running a testbench with Verilator 5:

    verilator --binary --timing -Irtl -Itb rtl/scan_pkg.sv tb/scan_tb_pkg.sv \
        tb/tb_scan_encoder.sv --top-module tb_scan_encoder -Mdir obj -o sim
    ./obj/sim

Replace `tb_scan_encoder` with any other testbench name.
`verilator --lint-only -Wall -Irtl rtl/scan_pkg.sv rtl/scan_encoder.sv`
lints the synthesizable part.

## Files

- `rtl/scan_pkg.sv`: width helper functions
- `rtl/onehot_encoder.sv`, `rtl/sparse_encoder.sv`: 1-out-of-d coding
- `rtl/binary_assoc_matrix.sv`: binary weights, OR storage, threshold recall
- `rtl/seq_assoc_memory.sv`: encoders + matrix + feedback register
- `rtl/level_divider.sv`: divide-by-n stage
- `rtl/key_select.sv`: per-level pattern-number register
- `rtl/scan_encoder.sv`: the complete sequencer (top)
- `tb/`: the testbenches above and `scan_tb_pkg.sv`
