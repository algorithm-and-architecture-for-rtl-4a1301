# CORDIC simultaneous-diagonalization speech enhancer (SystemVerilog)

This design removes noise from speech, frame by frame, in the eigen-domain
(a subspace method). Each frame of N samples yields two covariance matrices:
one for the noisy speech and one for the noise. The noise matrix comes from
the most recent frame classified as a pause. The key step diagonalizes **both
matrices with one common set of Jacobi rotations**. Every rotation is built
from CORDIC shift-and-add micro-rotations, so the diagonalization uses no
multipliers at all. The rotations give:

- a common eigenvector basis V;
- two diagonals, d1 for noisy speech and d2 for noise;
- per direction, the speech-to-noise ratio `lambda_i = (d1_i - d2_i) / d2_i`.

A Wiener-like gain `g_i = lambda_i / (lambda_i + mu)` keeps directions with a
high SNR and suppresses the rest. The enhanced frame is `x = V diag(g) V^T y`.
It is overlap-added with the previous frame. A single multiplier-accumulator
(MAC) does all the remaining multiplications: autocorrelation, `V.G`, `V^T.y`
and the final product.

## Data flow of one frame

```
samples --> autocorrelation --> speech/pause --> coefficient store rs / rn
 (N)        unit + MAC          decision            |
   \                                                v
    FIFO Y                      Toeplitz build: DMSM A = T(rs), DMSM B = T(rn)
       \                                            |
        \                       Mode I   simultaneous Jacobi (CORDIC PE chain),
         \                               V in DMSM V
          \                     Mode II  gains g_i -> FIFO G
           `------------------> Mode III Tmp = V.G (DMSM Tmp), z = V^T.y -> FIFO G
                                Mode IV  x = Tmp.z, overlap-add --> N-OV samples out
```

| Module | Role |
|---|---|
| `speech_processor` | Top level. Holds the four DMSMs (A, B, V, Tmp), FIFOs G and Y, and the shared MAC. It multiplexes memories and MAC by mode. |
| `top_ctrl` | Frame controller. Takes N samples, starts the autocorrelation, decides speech/pause, starts the memory controller. |
| `top_mem_ctrl` | Keeps the coefficient sets, builds the Toeplitz matrices, runs Modes I-IV in order. Read-only status registers: 00 P, 01 Q, 10 n, 11 Mode. |
| `jacobi_engine` | Mode I: sweeps of simultaneous Jacobi rotations on A and B in place. Accumulates V. |
| `pe_chain`, `cordic_pe`, `pe_master_ctrl` | R cascaded CORDIC processing elements. PE i performs micro-rotation i and records its direction. |
| `vec_rotator` | Replays the R recorded directions on any element pair of lines p, q, then removes the CORDIC gain. |
| `pq_gen_serial`, `pq_gen_parallel` | Index-pair tables: cyclic by rows, or N/2 disjoint pairs per set (round-robin). |
| `dmsm` | N x N "dual-port multiple row/column shift memory". Detailed below. |
| `autocorr_unit` | r(0..N-1) from two recirculating frame FIFOs and the MAC. |
| `gain_unit`, `serial_divider` | lambda, SNR, mu and the gains, all through one serial divider. |
| `mode2_ctrl`, `mode3_ctrl`, `mode4_ctrl` | The Mode II-IV sequencers. |
| `mac_unit`, `frame_fifo` | Shared MAC (registered product, 40-bit accumulator). Ring FIFO readable in either direction. |
| `sd_pkg` | Widths and types (`word_t` Q1.15, `peword_t` 32-bit, `acc_t` 40-bit), the DMSM request struct, the mode enum, and helpers. |

Defaults: N = 256, R = 20 CORDIC iterations, NSWEEP = 40 sweeps, 16-bit data
and 25 % overlap. These match the full-band reference configuration.

## The simultaneous CORDIC Jacobi rotation (the hard part)

For a pair (p, q), the rotation is `J = [1 s; -s 1]` with `s = d * 2^-i`. Each
matrix is updated as `A <- J^T A J`, which needs only shifts and adds. The
direction `d` of micro-rotation `i` is chosen from both matrices at once:

    d = sign( (a1qq - a1pp) + (a2qq - a2pp) ) * sign( a1pq + a2pq ),  sign(0) = +1

This drives the summed off-diagonal term towards zero. After R micro-rotations,
the total angle `sum d_i atan(2^-i)` is close to the Jacobi angle that best
diagonalizes the pair of 2x2 blocks jointly.

**Signals of one PE.** A PE (`cordic_pe`) receives eight words serially:

- a1pp, a1pq, a1qp, a1qq, a2pp, a2pq, a2qp, a2qq.

It then runs two modes:

- **Sign mode:** sets the direction bit.
- **Execution mode:** one clock for the row step (`p' = p - s q`,
  `q' = s p + q`), one for the column step.

Finally it shifts the eight results out, straight into the next PE. Stage
latency is 13 clocks. The whole chain takes 13R + 9 clocks from the first
input word to `done`.

**Why a separate rotator.** A Jacobi rotation changes whole rows and columns p
and q, not only the 2x2 block. The engine therefore does this per pair:

1. It rotates rows p and q of A and B out of their DMSMs into line buffers.
   These are rotations, so the memory contents stay where they were.
2. It sends the two 2x2 blocks through the PE chain to get the R direction
   bits.
3. It rewrites rows p and q through `vec_rotator`, which applies the same R
   shift-and-add steps to every element pair.
4. It repeats the read and rewrite on columns p and q of A, B and V. This
   completes `J^T A J` and `V J`.

Cost: `8N + 13R + 12` clocks per pair, plus N^2 clocks to set V to the
identity.

**CORDIC gain.** Every micro-rotation stretches a vector by `sqrt(1+2^-2i)`.
`vec_rotator` multiplies both results by the constant
`K = prod 1/sqrt(1+2^-2i)`. For R = 20, K is about 0.6073 (Q1.15 constant
19899). This restores the gain once for each side of each rotation. The
original method leaves the gain in the matrices and corrects it later. Over 40
sweeps that would overflow a 16-bit V, so this design compensates at once.

**Guard bits.** The PEs and the rotator use 32-bit words with 8 extra fraction
bits, and round only when writing back to 16 bits.

**Pair orders.** `pair_order = 0` uses the cyclic-by-rows order (0,1), (0,2),
..., (N-2,N-1). `pair_order = 1` uses N-1 sets of N/2 disjoint pairs, set s
holding:

- (0, 1+s);
- for k = 1 .. N/2-1, `(1+(s+k) mod (N-1), 1+(s-k) mod (N-1))`.

A fully parallel machine would rotate a whole set at once on N/2 PE rows.
This design has one PE row and walks through the set.

## DMSM: the shift memory

Each DMSM is an N x N array. One clock can do both of these at once:

- Shift one row right or one column down (`vert`, `shift_sel`). The new word
  enters column 0 (row 0) and is either `din` or the memory's own output
  word (`in_sel = 1`).
- Read the end word (column N-1, or row N-1) of any row or column
  (`out_sel`).

N shifts with `in_sel = 1` therefore stream a row out, column N-1 first, and
leave it unchanged. N shifts with `din` write a row: the first word written
ends in column N-1. All matrix access in the design works this way, with no
random addressing. The request is the struct `dmsm_req_t`
`{shift_en, vert, in_sel, out_sel, shift_sel, din}`.

## Number formats and scaling

| Quantity | Format |
|---|---|
| Samples, matrix entries, V, gains, outputs | 16-bit Q1.15, saturating |
| Autocorrelation | `r(m) = sum_k x(k) x(k-m) / 2^(15 + log2 N)`, i.e. the biased estimate divided by N, in Q1.15 |
| lambda, SNR, mu, mu0 | unsigned Q8.8. mu0 defaults to 4.0 (1024); `mu0_load`/`mu0_in` change it |
| Formulas | `lambda = max(a_ii - b_ii, 0) / b_ii` (saturated to 255.996); `SNR = mean(lambda)` (sum, then shift by log2 N); `mu = max(mu0 - SNR, 0)` |
| Gain | `g = lambda/(lambda+mu)`, Q1.15, saturated to 32767. g = 0 when lambda + mu = 0 |
| MAC products | Shifted right by 15 and saturated before they are stored |

## Control and timing

- **Frame input.** Pulse `frame_start`, then present N samples on
  `x_valid`/`x_in`. They are taken while `x_ready` is high. Samples offered
  at other times wait (stall).
- **Autocorrelation.** `N + N(N+3) + 1` clocks.
- **Speech/pause decision.** The first frame after reset is a pause. Later, a
  frame is a pause when `r(0) < 2^VAD_SHIFT` times r(0) of the last pause
  frame. VAD_SHIFT defaults to 1. Pause frames update the noise coefficients
  `rn`; speech frames update `rs`. `rn` starts at a small white floor
  (`NOISE_FLOOR` = 64 at lag 0).
- **Memory controller.** Runs:
  - a Toeplitz load (N^2 clocks);
  - Mode I: `N^2 + NSWEEP * N(N-1)/2 * (8N + 13R + 12)` clocks;
  - Mode II: about N(N+36) + 36N clocks;
  - Mode III: `2N(N+2) + 2` clocks;
  - Mode IV: `N(N+3) + 2` clocks.
- **Output.** `y_valid`/`y_out` delivers `N - OV` samples per frame, with
  `OV = N * OVERLAP_PCT / 100`. The first OV of them include the tail kept
  from the previous frame. Consecutive input frames must overlap by OV
  samples; the source supplies each whole frame.
- **Status.** `mode`, `rot_count`, `sweep_count`, `frame_is_noise` and the
  register port `reg_addr`/`reg_rdata` (00 P, 01 Q, 10 n, 11 Mode).

## Where this design departs from the reference

- **One rotation at a time.** The reference uses 16 parallel PE rows and 16
  parallel CORDIC elements. Here there is one chain of R PEs. At the defaults
  a frame needs about 3.0e9 clocks: 32640 pairs x 2320 clocks x 40 sweeps,
  i.e. about 15 s at 200 MHz. This is far from real time. The quoted
  throughput (11623 samples/s at 200 MHz) cannot be reached with 40 full
  sweeps even at 16-fold parallelism.
- **The CORDIC gain** is compensated in every rotation (see above), not
  deferred.
- **mu.** The block diagram of the gain unit prints `mu0 + SNR`. The
  description subtracts the SNR from mu0. The subtraction is built, and mu is
  clamped at zero.
- **Overlap.** The specification table gives 25 % overlap; the evaluation
  describes 50 % overlap with a Hamming window. 25 % with a rectangular
  overlap-add is built; there is no window. `OVERLAP_PCT` is a parameter.
- **The DMSM input select** is a single bit: external word or recirculated end
  word. One description calls it an address bus.
- **Memories.** A fourth DMSM (Tmp) holds `V.G`. Memories are registers, not
  a memory macro.
- **Status registers** are read-only.
- **Mode V,** which appears only in a controller diagram, is not built.
- **Not built at all:**
  - the wavelet filter bank and the four-subband variant;
  - the audio codec (AC97) interface;
  - input framing/windowing.

## Verification

Each module has a self-checking testbench `tb/tb_<module>.sv`. Every
testbench ends with a `TB_RESULT checks=<n> failures=<m>` line and has a
watchdog. They run at reduced sizes: N = 4 or 8, and the real R = 20. What
they check:

- **Arithmetic blocks** are compared with integer or real-valued models in
  the testbench. This covers the MAC, divider, gain unit, autocorrelation,
  PE, PE chain, rotator and mode controllers.
- **Cycle counts** are checked where the design defines them: divider,
  autocorrelation, PE, PE chain, engine, Mode III, Mode IV.
- **`tb_jacobi_engine`** diagonalizes two 8x8 matrices that share their
  eigenvectors, once with each pair order. It checks:
  - the off-diagonal mass is below 2 % of the diagonal;
  - `V^T V = I` within 0.005;
  - `V^T A0 V` reproduces the returned matrices within 0.003.
- **`tb_speech_processor`** runs the whole processor end to end at N = 8,
  R = 20, 4 sweeps, for 8 overlapping frames of pause and voiced signal. A
  real-arithmetic model of the complete algorithm runs alongside, using the
  same pair orders and the same sign rule. Every output sample must match
  within 0.02 of full scale; the observed error is about 0.005. The
  testbench also counts each mechanism and fails if one never occurs:
  - pause and speech frames;
  - both pair orders;
  - every memory-controller mode;
  - overlap-add with a non-zero tail;
  - a mu0 reload;
  - mu clamped at 0 and mu above 0;
  - a saturated gain;
  - input stalls;
  - status register reads.

The largest size simulated is N = 32 (R = 20, 4 sweeps, 8 frames, about 14 s
of simulation time). That run used the same testbench with N changed. It
passed 270 of its 271 checks. One output sample was off by 0.021, just over
the 0.02 tolerance, which is expected with only 4 sweeps at that size. The
N = 8 configuration in `tb/` passes all its checks. A frame at the full default
size (about 3e9 clocks) cannot be simulated, so no testbench runs the
defaults.

To run one testbench with Verilator:

    verilator --binary --timing --assert -Wno-fatal -Irtl -y rtl \
        --top-module tb_jacobi_engine rtl/sd_pkg.sv tb/tb_jacobi_engine.sv
    ./obj_dir/Vtb_jacobi_engine

Replace the name to run any other testbench. `sd_pkg.sv` must come first.
Other modules are found through `-y rtl`. `-Wno-fatal` is needed only for the
testbenches: their model arithmetic mixes widths, which gives width warnings.
The RTL is free of width warnings at every size tested. Each run prints one
`TB_RESULT` line; `failures=0` means it passed. The end-to-end testbench takes
about half a second at N = 8, and the Jacobi testbench about a second.

## Lint notes

The RTL has no latch, loop, multiple-driver or width warnings. Verilator's
`-Wall` reports only unused items:

- the divider remainder in `gain_unit`;
- a spare top bit of two index counters in `jacobi_engine` and one in
  `top_mem_ctrl`;
- the per-stage `done` outputs inside `pe_chain`;
- three package constants, when `sd_pkg` is linted on its own.

Each of these is noted in the opening comment of its file.
