# Folded QR decomposition and back-substitution accelerator

This design solves the complex linear system **A x = B** for an n x n matrix A
in two steps:

1. Givens-rotation QR decomposition, A = Q R. The same rotations applied to B
   give B' = Q^H B.
2. Back substitution, R x = B'.

The matrix size is a runtime input: any multiple of 4 from 4 to 20.

The classic hardware for step 1 is a triangular systolic array (Gentleman–Kung),
which needs about n²/2 cells for an n x n matrix. This design instead
**folds** that array onto three fixed blocks and reuses them for every 4x4
tile of the array:

| block | cells | role in the array |
|---|---|---|
| Type I | 4 boundary + 6 internal, triangular | a diagonal 4x4 tile: makes the rotations |
| Type II | 16 internal, 4x4 | an off-diagonal 4x4 tile: applies the rotations |
| Type III | 4 internal, one column | the right-hand side B of one row band |

Four memories carry data between uses of the blocks:

| memory | holds |
|---|---|
| RAM I | the rotations made by Type I, replayed later into Type II / III |
| RAM II | vectors that one row band leaves for the next |
| RAM III | R and B' |
| RAM IV | x |

For back substitution the cells run in reverse. The boundary cells divide and
the internal cells multiply and subtract, on the same blocks and memories.

The RTL is SystemVerilog-2017 and synthesizable. The numeric format follows the
reference design, the thesis *Accelerator for Flexible QR Decomposition and
Back Substitution*:

- data: 40-bit signed fixed point with 38 fraction bits;
- reciprocal: 50 bits with 14 fraction bits.

The control schedule and several structural details are this implementation's
own (see [Departures](#departures-from-the-reference-design)).

## The arithmetic

### Givens rotations, row by row

The array absorbs the rows of [A | B] one at a time. Each cell keeps one
element of R.

The **boundary cell** on the diagonal holds a real R. It receives an element u
and produces a rotation:

    R' = sqrt(R² + |u|²),   C = R / R',   S = u / R',   R <- R'
    (if u = 0:  C = 1, S = 0, R unchanged)

C is real and S is complex.

The **internal cell** applies that rotation to its own element. It passes the
rotated value down to the next row:

    u_out = C·u − S·R,      R <- conj(S)·u + C·R

After the last row of a band has passed, the cells hold the band's rows of R.
The Type III column holds the band's part of B'.

In back substitution:

- the boundary cell computes x = b / R;
- the internal cell computes b_out = b_in − R·x.

### Number format

Every real part is a signed 40-bit word with 38 fraction bits (`qr_pkg::fix_t`),
so it covers [−2, 2). Products are formed at full width and truncated back.

- **Inputs** must be scaled so that nothing leaves that range. That means the
  column norms of [A | B] below 2, and |x| below 2.
- **The boundary cell** never squares R. It keeps R² as an exact running sum
  of |u|² (88 bits, 76 fraction bits) and takes an integer square root, which
  gives R with 38 fraction bits.
- **The reciprocal** 1/R' is 2^52 / R' kept as 50 bits with 14 fraction bits.
  This is the reference design's width, and its coarseness sets the accuracy
  limit: each C and S carries a relative error of up to about 2^-14 · R'.

### Boundary-cell pipeline

The boundary cell is a three-stage pipeline. A new element can enter every
cycle.

| stage | work |
|---|---|
| 1 | add \|u\|² to the running sum (or restart it on the first element of a band) |
| 2 | integer square root → R' |
| 3 | reciprocal of R', then C = R·(1/R') and S = u·(1/R') |

Because R² is accumulated rather than recomputed from R, no result is fed back
through the square root. The latency is 3 cycles, and the input rate is one
element per cycle.

Back substitution reuses stage 3's reciprocal and multipliers: x = b·(1/R)
leaves one cycle after its inputs.

The boundary cell also takes |u|² as an input. For row 0 of the Type I block
it is formed from the incoming element. For the other rows it comes from the
internal cell above, which computes |u_out|² alongside u_out.

## Folding: bands, tiles and passes

This is the part that takes the most care.

### Bands and tiles

For n = 4Q, R is cut into Q **row bands** of 4 rows and Q **column tiles** of
4 columns. Band p covers rows 4p..4p+3.

The rows of A enter at band 0. Each band absorbs four of them into its rows of
R, so band p has to process **m = n − 4p** row vectors. The first four of those
come out of the band as exact zeros and are dropped; the other m − 4 move on to
band p+1.

Band p involves three blocks:

- Tile (p, p) is the **Type I** block. It takes the band's m vectors restricted
  to tile p's columns. It finishes R's diagonal tile and produces the band's m
  rotations per row, 4 x m in all. It writes those rotations to **RAM I**.
- Every tile (p, q) with q > p is one **pass** of the **Type II** block. The
  pass takes the same m vectors restricted to tile q. It replays the band's
  rotations from RAM I and finishes R's tile (p, q).
- The band's B column is one pass of the **Type III** block. It runs alongside
  the band's first Type II pass and shares its replayed rotations.

### Where each pass's output goes

The m − 4 vectors a pass sends on are the next band's input for that tile.

- The **first** Type II pass of band p (tile p+1) feeds its output straight
  into the Type I block as band p+1. This is why Type I is busy again soon
  after each band's first pass starts.
- Later passes write their output to **RAM II**, in the region of their column
  tile.
- The Type III pass writes its output to RAM II's B region.

Band p+1's passes then read their vectors back from RAM II. Band 0 reads A and
B directly from the host.

### Order of passes (horizontal schedule)

All tiles of band p are processed before band p+1 starts. For n = 12 (Q = 3)
the passes are:

| band | passes, in order |
|---|---|
| 0 (12 vectors) | tile 1 + Type III, tile 2 |
| 1 (8 vectors) | tile 2 + Type III |
| 2 (4 vectors) | Type III alone (no tile right of the diagonal) |

Only two bands' rotations are ever needed at once: the one being replayed and
the one the Type I block is producing. So RAM I has two pages per row and
alternates between them by band parity.

### Timing inside a block

The rows of a block are skewed by 4 cycles:

- Row i's boundary cell receives vector k at t+4i.
- Its rotation leaves at t+4i+3.
- Each internal cell of row i holds its incoming element for 3 cycles in a
  delay line (`delay_line`), so element and rotation meet. The cell then
  hands its result to row i+1 one cycle later, at t+4i+4.

Type II and Type III use the same row structure, so a vector that enters at t
leaves the last row at t+16.

RAM I replay uses the same timing. The scheduler's issue word for each pass
vector is delayed by 3, 7, 11 and 15 cycles. Tap i addresses row i's bank of
RAM I (asynchronous read), so row i of the Type II/III block sees the rotation
of vector k exactly when vector k reaches it.

### Start rules (qr_scheduler)

- Band 0's Type I input starts the cycle after `start`.
- Band 0's first pass starts two cycles after that. One cycle is the least
  that lets RAM I be written before it is replayed.
- Vector k of band p > 0 is vector k+4 of band p−1. That vector leaves the
  Type II or Type III block 16 cycles after its issue and can be read back one
  cycle later. So a pass of band p on tile q starts at least `BAND_LAG` = 21
  cycles after band p−1's pass on tile q started; that pass is the source of
  its RAM II data.
- The first pass of band p also starts at least `BAND_LAG` cycles after band
  p−1's first pass. That pass fed the Type I block, whose rotations the new
  pass replays, and it produced the B' column that Type III continues.
- Otherwise a pass starts one idle cycle after the previous one. The scheduler
  keeps the start cycle of the latest pass on each tile to apply the rule.
- 21 is the least lag that works: with `BAND_LAG` = 20, a pass reads RAM II
  and RAM I one cycle before the data arrive, and the end-to-end test fails.
  The lag has to grow with any added latency in the Type II / III blocks.
- The forward phase ends `FWD_DRAIN` = 24 cycles after the last issue. By then
  every R and B' value is in RAM III.

An assertion in `type1_block` checks the one spacing rule the blocks need:
the R values of two bands never finish in the same column write port in the
same cycle. Under the lag rule, the last vectors of two Type I bands enter
at least 17 cycles apart, which keeps them clear of it.

## Back substitution

With `en_bs` high, the scheduler goes through the bands from the bottom,
p = Q−1 down to 0. For each band:

1. Load the band's four B' values from RAM III into a partial-sum register.
2. For each tile q = Q−1 down to p+1, run the Type II block once.
   - The block reads R's tile (p, q) from RAM III (16 read ports) and the four
     solved x of tile q from RAM IV.
   - It subtracts R·x from the partial sums, moving one column left per
     cycle, and returns them after 4 cycles.
3. Run the Type I block once.
   - Boundary cell 3 solves x at t+1. The internal cells of column 3 subtract
     its contribution, and so on leftwards.
   - This gives x(4p+3), x(4p+2), x(4p+1) and x(4p) at t+1, t+3, t+5 and t+7,
     one every two cycles.
   - Each x is written to RAM IV as it is solved.

The scheduler does not wait for the Type I run of step 3. Once the run has
started, it loads band p−1's B' and goes on with band p−1's Type II steps on
tiles Q−1 down to p+1, whose x are already in RAM IV. Only the step on tile
p needs the x being solved, so that step alone waits for the run's last x.

Two details make the overlap possible:

- The Type I block takes its partial sums when it starts. The register is
  then free for the next band.
- The block reads its R tile during all seven cycles. The top module copies
  that tile into a hold register at the start, with the band number that
  addresses the RAM IV writes. RAM III's read ports are then free for the
  Type II block.

`done` pulses once x(0) is written.

## Cycle counts and accuracy

The counts below are measured by the top-level testbench, from `start` to the
end of each phase. The reference design's figures come from its own
per-size schedule charts.

| n | forward | back subst. | total | reference: forward + back subst. |
|---|---|---|---|---|
| 4 | 31 | 9 | 40 | 25 + 8 |
| 8 | 52 | 22 | 74 | 33 (54 in its back-substitution chapter) + 16 |
| 12 | 86 | 35 | 121 | 80 + 28 |
| 16 | 137 | 52 | 189 | 127 + 47 |
| 20 | 221 | 74 | 295 | 220 + 73 |

From n = 12 up, the forward phase is within 8 % of the reference (221
against 220 cycles at n = 20). At n = 4 and 8, the fixed latencies dominate
and it is slower; the reference's two figures for n = 8 bracket this
design's. Back substitution behaves the same way: within 11 % of the
reference from n = 16 up (74 against 73 cycles at n = 20), and 25–40 % slower
for the small sizes. There, each Type II step costs a full start-to-done
handshake, and few steps can overlap. The Type II row skew is also longer
here (4 cycles against the reference's 2), which adds latency to each pass.

Normalised error against a double-precision Givens model, measured on random,
diagonally dominant test matrices:

| n | R and B' | x |
|---|---|---|
| 4 | −92 dB | −88 dB |
| 12 | −84 dB | −83 dB |
| 20 | −79 dB | −76 dB |

Both are far below the −40 dB target the 40/50-bit formats were chosen for.
The dominant error source is the 14-fraction-bit reciprocal.

## Interface of `qr_bs_top`

All ports are plain signals and arrays. The `vec_t`, `cplx_t` and `fix_t`
types come from `qr_pkg`.

| port | dir | meaning |
|---|---|---|
| `clk`, `rst_n` | in | clock; asynchronous active-low reset |
| `start`, `n` | in | pulse `start` with `n` = 4, 8, …, 20 (asserted) |
| `busy`, `done`, `en_bs` | out | run in progress; one-cycle end pulse; back-substitution phase |
| `a1_row` → `a1_data` | out/in | row `a1_row` of A, columns 0..3 (combinational read) |
| `a2_row`, `a2_grp` → `a2_data` | out/in | row `a2_row`, columns 4·`a2_grp`..+3 |
| `b_row` → `b_data` | out/in | element `b_row` of B |
| `r_rd_addr` → `r_rd_data` | in/out | R(i,j) at `qr_pkg::r_addr(i,j)`, B'(i) at `qr_pkg::b_addr(i)` |
| `x_rd_addr` → `x_rd_data` | in/out | x(i) |

The matrix stays in the host's memory. The accelerator drives the three row
addresses and expects the data back in the same cycle; a register file or an
asynchronous RAM will do.

R, B' and x stay readable after `done` until the next `start`.

R's diagonal is real and positive. R(i,j) is stored only for j ≥ i, packed
row by row for a 20 x 20 triangle:

    r_addr(i,j) = i·(41 − i)/2 + (j − i)
    b_addr(i)   = 210 + i

## Memories

| RAM | organisation | ports |
|---|---|---|
| I (`ram1_cs`) | 4 banks (one per Type I row) x 2 pages x 20 entries of (C, S) | 4 write, 4 asynchronous read |
| II (`ram2_u`) | 6 regions (5 column tiles + B) x 20 slots of 4-element vectors | 1 write, 2 asynchronous read |
| III (`ram3_r`) | 230 complex entries: 210 for R, 20 for B' | 9 write, 21 asynchronous read |
| IV (`ram4_x`) | 20 complex entries | 4 write, 5 asynchronous read |

RAM II is used in place. A pass reads slots 0..m−1 of its region and writes
its results to slots 0..m−5 of the same region, always behind its reads.

RAM III's ports by user:

- write: 4 from Type I, 4 from Type II, 1 from Type III;
- read: a 4x4 R tile, the band's four B', and the host.

All memories are written as arrays, with synchronous writes and asynchronous
reads. On an FPGA they map to distributed RAM or registers, not block RAM.

## Departures from the reference design

- **Back substitution overlap.** As in the reference, Type II steps overlap
  the Type I run of the band below. Each block, though, takes its steps one
  at a time, with a start/done handshake. The reference's charts give
  somewhat tighter timings for small n.
- **Schedule.** Passes start by the data-dependency rule above. The
  reference gives a cycle-exact chart for each size instead. The resulting
  forward times are close to the reference's, within 8 % from n = 12 up.
- **Type II row skew.** Type II uses the Type I row skew (4 cycles, output at
  t+16). The reference uses 2 cycles per row, output at +12.
- **Type I row skew.** Rotations of successive Type I rows are 4 cycles apart:
  3 cycles in the boundary cell, 1 in the internal cell. The reference quotes
  5 cycles.
- **Vertical delay.** The reference text mentions both a 2-cycle and a
  3-cycle vertical delay between rows. This design uses 3, which is what the
  3-stage boundary cell needs.
- **Boundary cell.** It keeps R² as a running sum of |u|² instead of squaring
  R. It computes the reciprocal with a single divider, where the reference
  uses an iterative reciprocal of unspecified form.
- **Arithmetic.** Products are truncated, not rounded.
- **Memory sizing.**
  - RAM II holds a full 20-slot region per column tile plus one for B; the
    reference does not say where B's partial column waits. This is more
    than the minimum the reference derives (528 bytes at n = 20).
  - RAM III is laid out for the 20 x 20 triangle whatever n is.
  - RAM I keeps two bands' rotations, which matches the reference's "first 8
    rows".
- **The scheduler and host interface are hardware here.** In the reference
  they were driven by a software testbench. The magnitude |u|² for the first
  boundary cell is also computed in hardware.
- **Largest size.** The largest matrix is fixed at build time by
  `qr_pkg::NMAX` = 20, the largest size the reference evaluates. Its memory
  analysis would allow far larger matrices on a big FPGA. Raising `NMAX`
  (a multiple of 4) scales every memory and counter.

## Files

`rtl/` (one module or package per file):

| file | contents |
|---|---|
| `qr_pkg.sv` | widths, types, fixed-point functions (multiply, magnitude, square root, reciprocal), RAM III address map |
| `delay_line.sv` | parameterised register chain |
| `boundary_cell.sv`, `internal_cell.sv` | the two cells, forward and backward |
| `type1_block.sv`, `type2_block.sv`, `type3_block.sv` | the three blocks |
| `ram1_cs.sv`, `ram2_u.sv`, `ram3_r.sv`, `ram4_x.sv` | the memories |
| `qr_scheduler.sv` | pass sequencing and back-substitution stepping |
| `qr_bs_top.sv` | the accelerator: blocks, memories, replay taps, output routing |

`tb/`:

- One self-checking testbench per module, `<module>_tb.sv`. Each prints
  `TB_RESULT checks=… failures=…` and has a cycle watchdog.
- `tb_util_pkg.sv` holds shared conversions between fixed point and `real`.

The unit benches compare against models written independently in `real`
arithmetic. Where the design has a fixed latency, they check it exactly:

- boundary cell: 3 cycles forward, 1 backward;
- Type I rows: rotations at 4i+3; x every two cycles;
- Type II / III: output at 16 cycles, backward result at 4 cycles.

`qr_bs_top_tb` runs the whole accelerator at its default size:

- sizes n = 4, 8, 12, 16, 20 and 20 again, back to back;
- random diagonally dominant A and random B;
- R, B' and x compared with a double-precision Givens model and back
  substitution;
- cycle budgets checked for n = 16 and n = 20 (forward and back substitution
  each within 1.5 x the reference's figures);
- every mechanism counted, and a failure reported if one never happens. The
  mechanisms are: bands fed from Type II into Type I, Type II and Type III
  passes, Type III-only passes, RAM II traffic, both RAM I pages, zero-input
  rotations, both back-substitution steps, and mode switches.

It runs in well under a second.

### Simulating with Verilator

Run from the repository root:

    verilator --binary --timing --assert -Wno-fatal -y rtl \
        rtl/qr_pkg.sv tb/tb_util_pkg.sv tb/qr_bs_top_tb.sv --top-module qr_bs_top_tb
    ./obj_dir/Vqr_bs_top_tb

Replace `qr_bs_top_tb` with any other testbench name to run that bench. The
RTL alone lints cleanly apart from one message per assertion: the assertions
are disabled during reset, which Verilator reports as `rst_n` being used both
asynchronously and synchronously.

### Synthesis notes

Yosys reads the RTL unchanged. At the default size the accelerator elaborates
to about 15,700 flip-flop bits plus 77,600 memory bits.

The longest path is in boundary-cell stage 3: a combinational 52-by-40-bit
division feeding a 40x50 multiply. For a high clock rate, replace
`qr_pkg::recip` with an iterative or table-seeded reciprocal, and lengthen the
pipeline. The row skew is set by the three delay-line stages in front of each
internal cell and by the replay taps, so both must follow.
