# Hough transform by crossed recursion in distributed arithmetic

This design computes the line Hough transform of an edge image, and it gets
every ρ value without a multiplier, a sine table or a CORDIC. For a pixel
(x, y) the transform needs
ρ(θ) = x·cos θ + y·sin θ for every quantised angle θ. The design does not
evaluate the trigonometry. It steps a pair of values through a rotation
recursion. Each step is a fixed linear combination of the previous pair, so it
can be done with table lookups and additions alone, in the style of
distributed arithmetic (DA). The ρ values of each pixel are counted in a voting
grid, and a peak search returns the best-supported line.

The RTL is synthesizable SystemVerilog (IEEE 1800-2017). It has been checked
with Verilator 5 (lint and simulation) and with the slang front end of Yosys.

## 1. The recursion

The angle range [0, π) is cut into two halves. With Δθ = π/N_THETA and
θ_i = i·Δθ for i = 0 … N_THETA/2 − 1:

    ρ_I(i)  = x·cos θ_i + y·sin θ_i        = ρ(θ_i)
    ρ_II(i) = y·cos θ_i − x·sin θ_i        = ρ(θ_i + π/2)

Write α = cos Δθ and β = sin Δθ. Advancing the angle by Δθ is a rotation:

    ρ_I(i+1)  = α·ρ_I(i)  + β·ρ_II(i)
    ρ_II(i+1) = α·ρ_II(i) − β·ρ_I(i)
    ρ_I(0) = x,  ρ_II(0) = y

Each of the two values is updated from itself (the "self" operand) and from
the other one (the "cross" operand). This is why the engine is a cross-coupled
pair of identical units (`cbrm_pair`). One iteration gives one angle of each
half, so a pixel needs N_THETA/2 − 1 iterations for all N_THETA angles. α and β
never change during a transform.

The sign of the β term in the ρ_II update comes from the definition of ρ_II.
Writing it with +β would turn the rotation into a hyperbolic mapping.
The testbenches check both values against x·cos + y·sin computed in
floating point.

## 2. One step in distributed arithmetic

Each unit computes `next = C_SELF·self + C_CROSS·cross`. Unit I uses
(C_SELF, C_CROSS) = (α, β) and unit II uses (α, −β). The coefficients exist
only inside a table, the Convolution-LUT (`conv_lut`). There are two tables,
one per coefficient pair. They sit in the top level, outside the units, and
have as many read ports as the units need. Each unit drives table addresses
and gets the words back in the same cycle.

**Number formats.** The ρ registers hold N-bit two's complement numbers with
FRAC fractional bits (16 and 7 by default, a range of ±256 pixels).
`sm_recode` turns each register into a sign and an N-bit magnitude before the
table is addressed. The magnitude is N bits wide so that −2^(N−1) is exact.

**Blocks.** The magnitudes are cut into T = N/K blocks of K bits. For block j
the table address is

    {sign_self, sign_cross, self_block_j, cross_block_j}      (2K + 2 bits)

The table word is the signed partial product

    (±C_SELF)·self_block_j + (±C_CROSS)·cross_block_j

stored as an LUT_W-bit two's complement number with LF = LUT_W − K − 2
fractional bits. The sign bits choose among the four columns (+,+), (+,−),
(−,+), (−,−). For K = 1 the table is 16 words: 0, ±β, ±α and ±α±β. Table sizes
for N = LUT_W = 16 are:

| K | words  | bytes  |
|---|--------|--------|
| 1 | 16     | 32 B   |
| 2 | 64     | 128 B  |
| 4 | 1024   | 2 KB   |
| 8 | 262144 | 512 KB |

The table contents are computed at elaboration in `cbrm_pkg::lut_entry`. The
coefficients are first rounded to 30 fractional bits, α_q = round(cos(π/N_THETA)·2^30)
and β_q likewise. Then each word is rounded half up to LF fractional bits.

**Sum.** The result is Σ_j word_j · 2^(K·j). It is then rounded half up from LF
fractional bits and saturated to N bits (`da_round_sat`). The result never
leaves two's complement, so the partial products only need to be added.

**Rounding error.** A table word has only LUT_W bits. The rounding error of the
top block is therefore scaled by 2^(N−K), which gives about 2 LSB of error per
step at the default widths. Over the 63 iterations of a 128-angle pixel, the
largest error seen was 0.67 pixel (`tb_cbrm_pair`). With N = LUT_W = 32 the
error stays below 1e-5 pixel after 36 steps (`tb_cbrm_error`).

## 3. Serial and parallel units (`IMPL`)

The blocks can be added in two ways:

* **IMPL = 1, `da_unit_serial`.** One table read port and one adder. The
  blocks are added most significant first: acc = (acc << K) + word_j. An
  iteration takes T = N/K clock cycles (16 for the bit-serial K = 1). The
  handshake is `start` → `busy` → `done`. `done` is high in the T-th cycle, and
  `rho_next` is valid during that cycle, so iterations can run back to back.
* **IMPL = 2, `da_unit_parallel`** (default). All T blocks read the table
  through T ports in the same cycle. The aligned words go through a tree of 3:2 counters
  (`csa_reduce`, built from `csa32` rows) down to two words, and one
  carry-propagate adder adds them. The unit is combinational, so one iteration
  takes one clock cycle. The critical path is table + tree + adder.

Both units give bit-identical results.

## 4. Pixels, angles and votes

* `ht_sequencer` takes edge pixels on a valid/ready handshake. It loads (x, y)
  into the pair. In every cycle where the pair is ready it issues one vote pair
  for angle index i, and it steps the pair unless i is the last index. The next
  pixel is loaded in the cycle of the last vote. One pixel therefore costs
  N_THETA/2 cycles with IMPL = 2 and (N_THETA/2 − 1)·N/K + 1 cycles with
  IMPL = 1.
* `hough_accumulator` maps ρ to cell round(ρ) + RHO_OFS, with a unit step in ρ
  and the origin at pixel (0, 0). ρ_I is counted in bank 0 (θ in [0, π/2)) and
  ρ_II in bank 1 (θ in [π/2, π)), so the two votes of a cycle never meet in
  one memory. A value that falls outside 0 … NRHO−1 is not stored and is
  counted in `dropped`. The defaults (NRHO = 320, RHO_OFS = 128) cover every ρ
  of a 128 × 128 image.
* `vote_bank` holds THETAS × NRHO counters. It does a read-modify-write
  increment in a single cycle and has a read port with one cycle of latency.
  Counters saturate at their maximum. A clear sweep (one counter per cycle)
  starts by itself after reset and again on `clear_start`.
* `peak_finder` scans every cell once and returns the cell with the most votes
  (on a tie, the first cell in θ-major order). It takes
  N_THETA·NRHO + 2 cycles.

## 5. Several engines (`M`)

`cbrm_engine` bundles a sequencer, a pair and a private grid. The top
instantiates M engines (default 1). A new pixel goes to the lowest-numbered
engine that is ready. Every grid read returns the sum over all engines, which
saturates at the counter maximum. The result is the same as with one engine,
and a frame takes about 1/M of the time. With M = 21, a fully set
128 × 128 image takes 49,988 cycles instead of 1,048,577. Private grids avoid the voting
conflicts that engines working on the same angle would otherwise cause. The
cost is that vote memory grows with M. The tables are not replicated: all
engines read the same two tables, each through its own group of ports
(N/K ports per engine and table with IMPL = 2, one with IMPL = 1).

## 6. Top-level interface (`hough_cbrm_top`)

| port | dir | meaning |
|---|---|---|
| `clk`, `rst_n` | in | clock; asynchronous reset, active low |
| `clear_start` / `clear_busy` | in / out | clear the grid; do not send pixels while busy (cleared also after reset) |
| `pix_valid`, `pix_ready`, `pix_x`, `pix_y` | in, out, in, in | edge-pixel stream (CW-bit coordinates) |
| `ht_idle` | out | no pixel in flight, grid idle |
| `peak_start` / `peak_busy` / `peak_done` | in / out / out | peak search; `peak_done` pulses at the end |
| `peak_theta`, `peak_rho`, `peak_count` | out | best cell: θ = peak_theta·π/N_THETA, ρ = peak_rho − RHO_OFS |
| `rd_en`, `rd_theta`, `rd_rho`, `rd_count` | in, in, in, out | read any cell, data one cycle after `rd_en` (while no peak search runs) |
| `dropped_votes`, `vote_saturated` | out | votes outside the grid; a counter has reached its maximum |

A typical frame goes like this:

1. Wait for `clear_busy` to go low.
2. Stream the edge pixels.
3. Wait for `ht_idle`.
4. Pulse `peak_start` and wait for `peak_done`, or read cells directly.
5. Pulse `clear_start` before the next frame.

At the defaults, a fully set 128 × 128 image takes 64·128·128 + 1 cycles.

## 7. Parameters

| parameter | default | meaning |
|---|---|---|
| `N` | 16 | data width of ρ |
| `K` | 4 | block size; N must be a multiple of K |
| `LUT_W` | 16 | table word width |
| `FRAC` | 7 | fractional bits of ρ; CW + FRAC < N is required |
| `IMPL` | 2 | 1 = serial units, 2 = parallel units |
| `N_THETA` | 128 | angles over [0, π); even |
| `CW` | 7 | coordinate width (128 × 128 image) |
| `NRHO`, `RHO_OFS` | 320, 128 | ρ cells and offset of ρ = 0 |
| `CNT_W` | 16 | vote counter width |
| `M` | 1 | number of engines |

The 16-bit data, the 128 angles, the 128 × 128 image and the table word width
of N bits come from the evaluated configuration of the method. K = 4 is the
block size with the best area/delay balance in that evaluation. FRAC, the grid
range, the counter width, all handshakes, the rounding rules, the
single-engine default and the engine dispatch are choices made for this RTL.

## 8. Departures and limits

* The edge detector that produces the input pixels is not part of the design.
  The top takes edge-pixel coordinates.
* A multi-engine build shares the two tables but gives each engine its own
  voting grid, so vote memory grows with M.
* The parallel unit does a whole iteration in one clock cycle. Its clock rate
  is set by table + 3:2 tree + adder. No pipelining is added.
* The peak search finds the single global maximum. It does not find every
  local maximum.
* A faster variant with four recursions, each covering a quarter of the
  angles, is not built. Its extra starting values would need the coordinates
  rotated by π/4, which takes a multiplication.
* Accuracy at the default 16-bit width is limited by the N-bit table words
  (section 2). Widen `LUT_W` and `N` for more precision. At 12 bits
  (N = LUT_W = 12, FRAC = 3) the error reaches about 16 pixels after 63
  iterations, so a 12-bit build is only useful for short angle ranges.

## 9. Simulating

Every testbench prints `TB_RESULT checks=<n> failures=<n>` and stops. Each one
has a cycle watchdog. Build a testbench with plain Verilator, for example:

    verilator --binary --timing --assert -Wno-fatal -Irtl -Itb -y rtl -y tb \
        rtl/cbrm_pkg.sv tb/tb_ref_pkg.sv tb/tb_hough_cbrm_top.sv \
        --top-module tb_hough_cbrm_top -o sim
    ./obj_dir/sim

| testbench | what it covers |
|---|---|
| `tb_sm_recode`, `tb_conv_lut`, `tb_csa_reduce` | recoder, every table word (K = 4 and K = 1), 3:2 tree sums |
| `tb_da_unit_parallel`, `tb_da_unit_serial` | one step against the reference model (K = 1, 2, 4, 8); serial cycle count |
| `tb_cbrm_pair` | whole pixels, both IMPL settings, bit-exact and against floating point |
| `tb_ht_sequencer`, `tb_vote_bank`, `tb_hough_accumulator`, `tb_peak_finder` | control and grid blocks |
| `tb_hough_cbrm_top` | end to end: default build, bit-serial build (K = 1, IMPL = 1), three-engine build |
| `tb_hough_full` | default build, two frames, every grid cell compared |
| `tb_full_image` | all 16384 pixels of a 128 × 128 image, cycle count and whole grid |
| `tb_cbrm_error` | 32-bit accuracy for Δθ = π/4, π/72, π/360 after 12 and 36 steps |
| `tb_parallel_cbrm` | 21 engines, 12-bit data, all 16384 pixels: cycle count, whole grid, dropped votes |

The reference models are in `tb/tb_ref_pkg.sv`. They restate each step in
plain integer and real arithmetic. `tb/top_check.sv` drives a top instance
through two frames of synthetic lines plus noise.
