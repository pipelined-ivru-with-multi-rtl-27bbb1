# Jacobi SVD unit with a multi-bank matrix memory

This is synthesizable SystemVerilog for a small accelerator. It computes the
singular values and singular vectors of a symmetric N x N correlation matrix
(default 8 x 8, 16-bit signed elements). For a symmetric matrix the SVD is
the eigen-decomposition: the singular values are the magnitudes of the
eigenvalues, and the singular vectors are the eigenvectors. The unit uses the
classical Jacobi method: find the largest off-diagonal element a_pq, rotate
rows and columns p and q so that element becomes zero, and repeat until
every off-diagonal element is below a threshold.

The architecture rests on four ideas:

* a **multi-bank memory** (`mbm`) that spreads the matrix over N banks, so a
  whole row or column can be read in one clock;
* an **address and data synchronization unit** (`adsu`) that maps matrix
  coordinates to banks, detects when two requests need the same bank,
  serialises them, and hands the data over aligned;
* a **parallel scan search module** (`pssm`) that compares a whole row of
  candidates per clock in a comparator tree to find the pivot;
* an **iterative vector rotation unit** (`ivru`) that finds the rotation
  angle with a shift-and-add loop. The loop stops as soon as the vector has
  been turned onto the axis. A multi-bit rotation stage then turns the angle
  into cos and sin.

A controller sequences these units. A small rotation datapath (`rot_alu`,
the "adders and multipliers") applies each rotation.

```
            x, y              c, s
 controller ─────► ivru ──────────► rot_alu
   │  ▲                                │ rotated pairs
   │  │ rows / pivots / pairs          ▼
   │  └──────────── adsu ◄─────── (write-back)
   │                 │ ▲
   ▼                 ▼ │  N bank ports
  pssm ◄─ rows      mbm (N banks x 2N words)
```

In this RTL every memory access, including the write-back of rotated pairs
and the rows sent to the scan unit, goes through the controller and the
ADSU. The controller alone decides what happens when.

## One run, step by step

`svd_controller` works strictly one step after another:

| step | what happens | ADSU batches |
|---|---|---|
| load | while idle, each accepted `ld_row` beat is written as one matrix row | 1 write per row |
| V init | on `start`, the rotation accumulator V is set to the identity (1.0 = 16384) | N writes |
| scan | rows 0..N-1 are read and streamed into the PSSM | N reads |
| decide | if max \|a_pq\| < `threshold`, or `MAX_ROT` rotations are done, go to output | – |
| pivot | a_pp, a_qq, a_pq are read; x = a_pp − a_qq, y = 2·a_pq go to the IVRU | 1 read |
| rows | rows p, q: RL column pairs per batch are read, rotated, written back | N/RL × (read + write) |
| columns | the same for columns p, q of A (this completes RᵀAR) | N/RL × (read + write) |
| vectors | the same for columns p, q of V (V := V·R) | N/RL × (read + write) |
| output | the diagonal is read in one batch and shown on `out_diag`; then the N rows of V | 1 + N reads |

At the defaults (N = 8, RL = 2), one rotation (rescan plus update) takes
about 150 clock cycles. In the tests a random 8 x 8 matrix needed 44–61
rotations to reach a threshold of 2 LSB, or 6,700–9,300 cycles in all. The
schedule does not overlap steps. A pipelined schedule, for example scanning
while the previous update is written back, is the obvious next step. It is
not built here.

## Where each element lives: the skewed bank mapping

The matrix and V share `N` banks of `2N` words each. Element (r, c) of
matrix m (0 = A, 1 = V) is stored in

```
bank = (r + c) mod N        word = m*N + r
```

With this mapping the N elements of a row are in N different banks, and so
are the N elements of a column. Rows p and q at the same column k are in
banks p + k and q + k, which differ. So the scan reads a full row per
batch, and the diagonal is the only batch shape with collisions: (k, k) is
in bank 2k mod N, so k and k + N/2 collide.

Batches can still collide. The rotation batches read (p,k), (q,k),
(p,k+1), (q,k+1): when q = p ± 1 mod N, bank q + k equals bank p + k + 1.
The pivot read (p,p), (q,q), (p,q) collides when q = p + N/2. The ADSU
resolves this each cycle. The lowest-numbered pending lane wins its bank.
Every losing lane stays pending and retries in the next cycle, and the
`conflict` output is high in that cycle. A batch whose busiest bank is
asked for m times therefore takes m issue cycles:

* a write batch is finished (and `cmd_ready` is high again) m clock edges
  after the edge that accepted it;
* a read batch shows `rsp_valid` with all lanes in lane order m + 1 edges
  after acceptance, and holds them until `rsp_ready`.

The ADSU takes one batch at a time. Its command and response sides are
valid/ready handshakes. Two assertions guard them: no empty batch, and a
response is held until taken.

## The rotation unit (ivru)

Inputs are x = a_pp − a_qq and y = 2·a_pq, as 17-bit signed integers. The
rotation that zeroes a_pq has angle θ = ½·atan(y/x), |θ| ≤ π/4, and with
R = [c −s; s c] in the (p, q) plane the new matrix is RᵀAR. The unit works
in these stages:

1. **Input.** x and y get 4 guard fraction bits. If x < 0, both are negated,
   which folds the vector into the right half plane. If y = 0, the loop is
   skipped.
2. **Change in sequences / iterative sequences.** In each clock, one
   micro-rotation by ±atan(2⁻ⁱ) (shift and add) turns the vector towards
   the x axis. The sign of y picks the direction. An accumulator sums the
   angles applied.
3. **Convergence test.** The loop ends when |y| ≤ `CONV_TOL` (default 0)
   or after `VEC_ITER` = 16 passes. Otherwise it goes round again. In
   the tests, 40–75 % of the pivots stop early.
4. **Multi-bit rotation.** θ = (accumulated angle)/2 is turned into
   (cos θ, sin θ) by rotating the gain-compensated vector (0.60725, 0).
   Each clock resolves `MB` = 2 angle bits with two chained micro-rotations,
   so 16 micro-rotations take 8 clocks.

The latency from `start` to `done` is passes + 9 clocks (9 when y = 0).
The outputs are c and s in Q1.14, within ±2 LSB of the exact values for
vectors of length ≥ 256. Very short vectors, such as x, y of a few LSB,
give a coarser angle because the integer inputs define it only coarsely.

Number formats: matrix elements are signed integers; c, s and V are Q1.14
(16384 = 1.0); angles are radians × 2¹⁶ (`svd_pkg::ATAN_TABLE` holds
round(atan(2⁻ⁱ)·2¹⁶), and `CORDIC_K14` = round(2¹⁴·∏ 1/√(1+2⁻²ⁱ)) over 16
terms).

## The scan search (pssm)

Each row beat is split into N channels. A channel keeps its element only
if it lies above the diagonal (column > row), and takes its magnitude. The
magnitude of −32768 saturates to 32767. A binary comparator tree of
log2(N) levels finds the row's largest element and its column in the same
cycle. A running register keeps the best value over the rows. On ties the
lower column and then the earlier row win. One cycle after the last row,
`res_valid` carries the magnitude, p < q, and `converged` = (magnitude <
threshold). Only the upper triangle is searched, because the matrix is
symmetric.

## Rotation datapath and accuracy (rot_alu)

For each of `RL` = 2 lanes, the datapath computes u' = c·u + s·v and
v' = c·v − s·u at full width, rounds half up from Q1.14 and saturates to
16 bits, with one register stage. It serves three passes: rows of A
(u = a_pk, v = a_qk), columns of A and columns of V.

What to expect numerically, from the end-to-end tests at the default size:

* eigenvalues within 3.5 LSB of a double-precision Jacobi reference, for
  matrices with entries up to about ±900;
* the trace is preserved to within that error;
* ‖AV − VD‖ ≤ 3.6 LSB per element and |VᵀV − I| < 0.001 after a converged
  run.

With threshold 0 the run always ends at `MAX_ROT` = 1024 rotations. The
extra rotations act on rounding noise, and V drifts: in the test,
|VᵀV − I| reached 0.017. Use a threshold of a few LSB.

Keep |a_ij| well below 2¹⁴. Rotated values are bounded by the largest
eigenvalue magnitude, and anything beyond ±32767 saturates. Nothing flags
saturation.

## Top-level interface (svd_top)

| port | dir | width | meaning |
|---|---|---|---|
| `clk`, `rst_n` | in | 1 | clock; asynchronous active-low reset |
| `ld_valid`, `ld_ready`, `ld_row` | in/out/in | 1/1/N×16 | matrix rows 0..N−1 in order, one per accepted beat, while idle |
| `start` | in | 1 | begin a run (ignored while busy) |
| `threshold` | in | 16 | stop when max \|a_pq\| < threshold |
| `busy` | out | 1 | run in progress |
| `out_valid`, `out_diag` | out | 1, N×16 | one-cycle pulse with the diagonal (eigenvalues, unsorted) |
| `converged` | out | 1 | 1: threshold met; 0: rotation limit reached |
| `vec_valid`, `vec_row`, `vec_data` | out | 1, 3, N×16 | the N rows of V in Q1.14; column j is the eigenvector of `out_diag[j]` |
| `done` | out | 1 | pulse with the last row of V |
| `off_max` | out | 16 | largest off-diagonal magnitude of the last scan |
| `stat_rotations`, `stat_conflicts`, `stat_ivru_early` | out | 32 each | rotations; cycles with a bank conflict; IVRU runs stopped by the convergence test (cleared by `start`) |

The matrix stays in memory after a run, in its (nearly) diagonal form. To
run again, load a new matrix first.

Parameters: `N` (8), `DW` (16), `RL` (2 element pairs per rotation batch,
at most N/2), `MAX_ROT` (1024). N must be a power of two: the PSSM tree and
the index widths assume it.

## Files

| file | content |
|---|---|
| `rtl/svd_pkg.sv` | sizes, number formats, arctangent table, access-kind enum |
| `rtl/mbm.sv` | N banks, one read and one write port each |
| `rtl/adsu.sv` | bank mapping, conflict arbitration, alignment, handshakes |
| `rtl/pssm.sv` | parallel off-diagonal maximum search with threshold |
| `rtl/ivru.sv` | convergence-checked vectoring loop and multi-bit rotation stage |
| `rtl/rot_alu.sv` | rotation multipliers and adders |
| `rtl/svd_controller.sv` | sequencer |
| `rtl/svd_top.sv` | top level |
| `tb/tb_*.sv` | one self-checking testbench per module; `tb_svd_top` runs the whole unit at its default size |

## Simulating

Each testbench prints `TB_RESULT checks=<n> failures=<n>` and stops. It has
a watchdog. From the folder that holds `rtl/` and `tb/`:

```
verilator --binary --timing --assert -Irtl -Itb rtl/svd_pkg.sv tb/tb_svd_top.sv \
          --top-module tb_svd_top -Mdir obj_top
./obj_top/Vtb_svd_top
```

Use the same command with `tb_mbm`, `tb_adsu`, `tb_pssm`, `tb_ivru` or
`tb_rot_alu` for a single block. `tb_svd_top` finishes in about a second.

What the testbenches check:

* **`tb_svd_top`** runs 13 matrices end to end at the default parameters:
  random positive semi-definite correlation matrices, random indefinite
  symmetric matrices, a matrix whose first pivot is a 45° vector, an
  already diagonal matrix (no rotation may happen), and a threshold-0 run
  that must stop at exactly 1024 rotations. It compares the eigenvalues
  and eigenvectors with a floating-point reference. It also counts bank
  conflicts, early IVRU exits, threshold stops and limit stops, and fails
  if any of them never happened.
* **The block testbenches** check against models in the testbench:
  * bit-exact rotation arithmetic, with saturation;
  * search results, tie rules and restart;
  * memory contents and read-before-write;
  * the bank mapping, conflict timing and response holding;
  * cos/sin/θ accuracy and the IVRU cycle count.

## How this relates to the original architecture description

The source description gives the block structure, what each block does and
the flow of each unit. It names the sizes N = 8 and 16-bit data. It does
not give the arithmetic inside the units, the bank mapping, the handshakes
or any timing. Everything in those areas is this design's own choice, and
the head comment of each file says which parts are which. In particular:

* The rotation unit's loop is a shift-and-add (CORDIC-style) iteration with
  an early-exit test. The description contrasts its unit with conventional
  CORDIC processors but gives no other iteration. "Change in sequences" is
  read as the half-plane fold plus the choice of the next micro-rotation.
  "Multi-bit rotation unit" is read as resolving two angle bits per clock.
* The original block diagram draws direct paths from the multipliers into
  the memory and from the memory into the scan unit. Here both pass
  through the controller and the ADSU, which the text names as the unit
  that hands memory data to the processing blocks. Every access is then
  mapped and checked for conflicts in one place. The cost is one extra
  hand-over per batch.
* The title speaks of a pipelined rotation unit. No pipeline is described,
  and the unit here is iterative, one loop pass per clock.
* The number of banks (N), the mapping, lane-priority arbitration,
  `RL` = 2, `MAX_ROT`, the threshold as a run-time input, and the
  accumulation of V in the memory are all this design's choices.
* The published evaluation shows a complex-valued port pair (`real_in`,
  `imag_in` → `real_out`, `imag_out`) with sample values. The function
  behind those values is not described. This design has no such port.
* Reported FPGA figures (LUT, DSP, power and path delays) belong to the
  original implementation. Nothing here was sized to match them.
