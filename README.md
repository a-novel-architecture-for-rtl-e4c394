# Rational 9/7 lifting wavelet transform: a pipelined 2D-DWT engine

This design computes the 9/7 discrete wavelet transform used by JPEG2000-type
lossy image coders. It uses the lifting scheme and does no multiplication at
all. The irrational 9/7 lifting coefficients are replaced by the *rational* set
α = −3/2, β = −1/16, γ = 4/5, δ = 15/32, k = 4/5, 1/k = 5/4. Each coefficient
becomes a 16-fraction-bit integer, so every "multiplier" is a handful of shifted
additions. Those additions are split into register stages to keep the clock
fast. The 1D core is an 18-stage pipeline that accepts one even/odd sample pair
every clock.

Around the core sits a complete 2D engine. An image held in memory is transformed
in place: first along the rows, then along the columns. This is repeated on the
shrinking low-low (LL) band for up to five levels. Image edges are handled by
mirroring.

```
             +---------------+
 cfg_levels->| level_select  |--band_len--+
             +---------------+            v
                                   +-------------+  raddr/we/waddr  +----------+
 start ------------------------->  |  mem_ctrl   |----------------->| coef_mem |<-- host write
                                   +-------------+<------ rdata ----| N*N x 16 |--> host read
                                     | line load  ^ line read back  +----------+
                                     v            |
                              +--------------------+   pairs    +---------------+
                              |  boundary_process  |----------->| dwt1d_lifting |
                              |  (mirror, collect) |<-----------|  18 stages    |
                              +--------------------+  low/high  +---------------+
```

## The lifting arithmetic

A line x(0..N−1) is split into even samples e[n] = x(2n) and odd samples
o[n] = x(2n+1). Four lifting steps and a scaling follow:

| step  | operation                                      | constant word (×2⁻¹⁶) | set bits | tree stages |
|-------|------------------------------------------------|------------------------|----------|-------------|
| α     | d1[n] = o[n] − ⌊3/2 · (e[n] + e[n+1])⌋         | 0x18000                | 2        | 1           |
| β     | s1[n] = e[n] − ⌊1/16 · (d1[n−1] + d1[n])⌋      | 0x01000                | 1        | 0 (shift)   |
| γ     | d2[n] = d1[n] + ⌊γ · (s1[n] + s1[n+1])⌋        | 0x0CCCC (≈ 4/5)        | 8        | 3           |
| δ     | s2[n] = s1[n] + ⌊15/32 · (d2[n−1] + d2[n])⌋    | 0x07800                | 4        | 2           |
| k     | low[n] = ⌊k · s2[n]⌋                           | 0x0CCCC (≈ 4/5)        | 8        | 3           |
| 1/k   | high[n] = ⌊5/4 · d2[n]⌋                        | 0x14000                | 2        | 1           |

Points that are easy to get wrong:

* **The constant words.** γ and k are 4/5 written as a binary fraction, with
  the pattern cut after 16 bits: 0xCCCC / 65536 = 0.79999. The others are exact.
* **Products and rounding.** `const_mult` forms the exact product: one
  left-shifted copy of the operand for each set bit, summed in a balanced adder
  tree. It then shifts right by 16 bits, which rounds toward −∞. Each product is
  therefore rounded exactly once.
* **Negative coefficients.** α and β are applied by *subtracting* the product of
  the magnitude. Note that −⌊x⌋ is not ⌊−x⌋. Any bit-exact model must use the
  same convention. The models in `tb/dwt_ref_pkg.sv` do.
* **Scaling.** The low band is multiplied by 4/5 and the high band by 5/4. With
  the rational coefficients, the unscaled low-pass DC gain is exactly 5/4
  (1 − 4β). The scaled transform therefore passes a constant line through
  unchanged, apart from rounding.
* **Widths.** Inputs are W = 16 bits and the datapath is W + 4 = 20 bits wide.
  Worst-case gains are at most 6 for the low band and 8 for the high band, so
  every value stays within ±2¹⁸ and nothing inside the core can overflow.

## The 18-stage pipeline (`dwt1d_lifting`)

Every lifting step has three parts, and each ends in a register:

1. a pre-add of two neighbours;
2. the shift-add tree;
3. the update add into the other sample stream.

Neighbours come from one-clock taps on the stream. Looking *ahead* (α needs
e[n+1], γ needs s1[n+1]) means waiting one clock for the next pair. Looking
*back* (β, δ) uses the older tap. Operands not being multiplied are carried
along in `delay_line`s to stay aligned with the trees.

| stages | what                                  |
|--------|---------------------------------------|
| 1      | input register                        |
| 2–4    | α: pre-add, 1 tree level, update      |
| 5–6    | β: pre-add, update (β is a shift)     |
| 7–11   | γ: pre-add, 3 tree levels, update     |
| 12–15  | δ: pre-add, 2 tree levels, update     |
| 16–18  | k: 3 tree levels (1/k: 1 level + 2 delay) |

**Timing contract.** The core runs freely; `in_valid` and `in_tag` only travel
down an 18-deep shift register. The output that appears with the valid/tag of
the pair sampled at clock t (visible at t + 18) is coefficient pair n − 2, where
n is the pair sampled at t. Coefficient n is complete only once pair n+2 has
been read, because α and γ each look one pair ahead. Pairs of the same line must
arrive on consecutive clocks. What flows between lines does not matter.

Inside the core each register stage holds at most one adder. Adders in the multiplier trees are up to 38 bits wide, because they keep the full product.

## Edges: mirror extension and the tag trick (`boundary_process`)

A finite line needs values beyond its ends. This design uses whole-sample
symmetric extension: x(−i) = x(i) and x(N−1+i) = x(N−1−i). The four lifting
steps together reach four samples past an edge. Rather than special-casing every
step at the edges, the boundary process streams the line extended by four
mirrored samples on each side: N + 8 samples, or N/2 + 4 pairs. The core then
treats the line as an infinite signal. Because every step adds two neighbours
symmetrically, this gives exactly the same integers as mirroring inside each
step. The reference model uses the in-step form, so the testbenches check the
one form against the other.

The core's results are sorted out with the tag. Pair p (0 … N/2+3) carries
`{keep = (p ≥ 4), p − 4}`. Two effects shift the index by two each:

* the core's output lags by two pairs;
* the extension adds two pairs in front.

The results carrying `keep = 1` are therefore exactly the N/2 coefficient pairs
of the real line, and the tag is their index. These are saturated to the 16-bit
memory word (`sat_event` flags it) and stored in a low and a high buffer.
`rd_idx` reads them back in band order: low band first, then high band.

Line length must be even and at least 8. The boundary process asserts this.

## The 2D engine

**Memory (`coef_mem`).** The memory holds N × N words of 16 bits, in row-major
order (address = row·N + column). It has one write port and one read port per
clock. Read data comes back one clock after the address, and a read of an
address written in the same clock returns the old word. The image is loaded
into it, transformed in place, and read out of it.

**Levels (`level_select`).** `start` captures `cfg_levels`, clamped to
1 … MAX_LEVELS (a request of 0 runs one level). Level l works on the band of
side N >> l.

**Sequencing (`mem_ctrl`).** For each level, every row of the current band is
transformed, then every column. Each line goes through three phases that do not
overlap:

| phase | clocks       | action                                            |
|-------|--------------|---------------------------------------------------|
| READ  | len + 1      | memory → boundary line buffer                     |
| RUN   | len/2 + 23   | mirrored stream through the core, results collected |
| WRITE | len          | results back to the same line, low half then high half |

Including one clock between lines, a line costs 2.5·len + 25 clocks. A level
costs 2·len lines plus one clock. After a level the LL band sits in the top-left
quarter and is the next level's input. The other three bands sit beside it and
below it: the usual Mallat layout.

A 512 × 512 image at five levels takes 1,795,525 clocks. Because the phases do
not overlap, the core is busy only about one fifth of that time. This keeps the
controller simple; it is not a limit of the core.

## Top-level interface (`dwt2d_top`)

| port | dir | width | meaning |
|------|-----|-------|---------|
| clk, rst_n | in | 1 | clock; asynchronous active-low reset |
| cfg_levels | in | 3 | levels for the run, sampled with `start` |
| start | in | 1 | start a run (taken while idle) |
| busy | out | 1 | run in progress; host port ignored |
| done | out | 1 | one-clock pulse at the end |
| sat_event | out | 1 | a coefficient was saturated to 16 bits |
| cur_level | out | 3 | level being computed |
| host_we, host_waddr, host_wdata | in | 1, 18, 16 | load image samples (while idle) |
| host_raddr / host_rdata | in / out | 18 / 16 | read coefficients, data one clock later |

Samples are 16-bit two's complement. 8-bit pixels are written as 0 … 255.
The parameters are `N` (512, a power of two), `MAX_LEVELS` (5) and `DW` (16).
`N >> (MAX_LEVELS−1)` must be at least 8.

## What follows the source architecture and what is this design's own

These parts follow the published architecture:

* the rational 9/7 coefficients and their 16-fraction-bit form;
* multiplication by constants as shifted integer additions;
* a register after each adder level, for an 18-stage 1D pipeline;
* the split/predict/update structure and the scaling by k and 1/k;
* the five-block 2D organisation: level select, 1D-DWT, boundary process,
  memory, memory control;
* mirrored boundaries;
* LL passed on to the next level;
* 512 × 512 images at five levels.

These are choices made here:

* **Stage placement.** The exact placement of the 18 stages, and the
  balanced-tree summing of the partial products. The original arrangement uses
  Horner's rule for γ, and its per-multiplier adder counts differ slightly.
* **Coefficient signs.** α and β are read as sign-magnitude words, and the low
  band is scaled by +4/5.
* **Widths, saturation and reset.** 16-bit samples and memory words, 20-bit
  datapath, saturation on write-back. Only the valid pipeline and the
  controllers are reset.
* **Edges and buffers.** Whole-sample symmetric extension, the tag scheme and
  the line buffers.
* **Memory organisation and sequencing.** One simple dual-port memory, rows
  before columns, and non-overlapped line phases.
* **Level handling.** The clamp on the level request and the host-port sharing.

Not included:

* **The coder.** Quantisation and entropy coding, which would be needed to
  reproduce rate/PSNR figures, are outside this design.
* **The unpipelined variant.** The variant with single-cycle shift-add stages
  (the slower, smaller comparison design) was not built.

## Verification

Every module has a self-checking testbench in `tb/`. Each prints
`TB_RESULT checks=… failures=…` and has a watchdog. The reference model
(`tb/dwt_ref_pkg.sv`) is written independently of the RTL: it mirrors inside
each lifting step and spells the coefficients out as plain numbers.

* `tb_const_mult` checks all six constants against ⌊x·C/2¹⁶⌋, at their latencies.
* `tb_dwt1d_lifting` streams mirrored lines of 8 … 128 samples back to back
  (8-bit, full-range and alternating-extreme data). It checks every coefficient
  and the 18-clock latency.
* `tb_boundary_process` uses the real core. It checks the mirrored pair
  stream, the tags, the number of pairs, the timing of `done`, the band-order
  read-back and saturation.
* `tb_level_select` checks requests 0 … 7: clamping, band size per level,
  `last_level` and `all_done`.
* `tb_coef_mem` checks random accesses against a shadow copy, including a read
  and a write of the same address in one clock.
* `tb_mem_ctrl` uses a behavioural memory and line processor. It checks the
  line order, addresses, in-place write-back and the exact clock count of 1-,
  2- and 3-level runs.
* `tb_dwt2d_top` runs 32 × 32 images at 1, 2 and 3 levels. It covers clamped
  requests, a full-range image that saturates, and host writes during a run
  (which must be ignored). It compares every coefficient and requires that row
  passes, column passes, level changes, left and right mirroring, saturation
  and clamping each happened.
* `tb_dwt2d_full` runs the design at its defaults: a 512 × 512 synthetic 8-bit
  image, five levels, and all 262,144 coefficients compared. It takes about a
  second in Verilator.

Run a testbench with plain Verilator from the directory that holds `rtl/` and
`tb/`:

```
verilator --binary --timing --assert -Wno-fatal --top-module tb_dwt2d_full \
    rtl/dwt_pkg.sv tb/dwt_ref_pkg.sv rtl/*.sv tb/tb_dwt2d_full.sv
./obj_dir/Vtb_dwt2d_full
```

Other testbenches work the same way; change the top module and the testbench
file.

Lint warnings that remain are harmless:

* unused `clk` inputs where a multiplier or delay has no stages;
* unconnected status outputs;
* the reset used both asynchronously and in assertion `disable iff` clauses.

## Files

| file | contents |
|------|----------|
| `rtl/dwt_pkg.sv` | coefficient words, guard bits, constant helper functions |
| `rtl/const_mult.sv` | pipelined shift-add constant multiplier |
| `rtl/delay_line.sv` | alignment delays |
| `rtl/dwt1d_lifting.sv` | 18-stage 1D lifting core |
| `rtl/boundary_process.sv` | mirror extension, result collection |
| `rtl/level_select.sv` | level count and band size |
| `rtl/coef_mem.sv` | image / coefficient memory |
| `rtl/mem_ctrl.sv` | line, pass and level sequencing |
| `rtl/dwt2d_top.sv` | the 2D engine |
| `tb/dwt_ref_pkg.sv` | bit-exact reference model |
| `tb/tb_*.sv` | testbenches |
