# MCLT and inverse MCLT post-processing stages for FPGA audio watermarking

The Modulated Complex Lapped Transform (MCLT) is a 2x oversampled DFT filter
bank. Each block of 2M input samples (hop M) becomes M complex coefficients.
Audio watermarking systems embed their mark in these coefficients and then
take the inverse transform. Malvar's fast algorithm splits each direction
into a standard 2M-point FFT and one cheap "butterfly-like" stage:

* Direct: with U(k) the orthonormal 2M-point FFT of the block,

      V(k) = c(k) U(k),   c(k) = W_8(2k+1) W_4M(k),   W_N(r) = exp(-j 2 pi r / N)
      X(k) = j V(k) + V(k+1),   k = 0..M-1

* Inverse: from the (watermarked) coefficients X(k),

      Y(k) = c*(k)/4 [X(k-1) - j X(k)]          k = 1..M-1
      Y(0) =  (Re X(0)   + Im X(0))   / sqrt(8)
      Y(M) = -(Re X(M-1) + Im X(M-1)) / sqrt(8)
      Y(2M-k) = conj Y(k)

  An orthonormal 2M-point IFFT of Y gives y(n) = x(n) h(n)^2, with
  h(n) = -sin((n + 1/2) pi / 2M) the MCLT window. Overlap-adding successive
  y blocks restores the signal.

This repository holds the RTL of the two butterfly-like stages. It also
holds their shared parts: the c(k) table, the complex multiplier, the two
control units and the Y buffer. The FFT and IFFT are vendor IP cores. They
are not included: `mclt_top` brings their connections out as ports, and the
testbenches use behavioural models in their place. The default size is
M = 128. Input samples are Q15, coefficients are 9Q15, and the inverse stage
takes and produces 24-bit values.

## Number formats

`aQb` means a sign bit, a integer bits and b fraction bits. Every format here
has 15 fraction bits, so values pass between stages without rescaling.

| signal | width | format | note |
|---|---|---|---|
| FFT input x(n) | 16 | Q15 | fetched by the FFT core, not seen by this RTL |
| FFT output U(k) `xk_re/xk_im` | 25 | 9Q15 | |
| c(k), c*(k) | 16 | Q15 | +1.0 occurs and saturates to 32767 |
| V(k), X(k) `sal_re/sal_im` | 25 | 9Q15 | 9Q30 product, low 15 bits dropped |
| watermarked X(k) `in_re/in_im` | 24 | 8Q15 | binary point chosen here |
| Y(k) `Y_re/Y_im` | 24 | 8Q15 | binary point chosen here |

Products are truncated: the low bits are dropped, which rounds toward minus
infinity. Nothing saturates. No adder or product can overflow for legal
inputs. With Q15 samples and an orthonormal FFT, |U| <= 16 and |X| <= 32.
In the inverse stage |Y| <= 2^8 for any 24-bit input. The testbenches
measured these worst-case errors against floating point:

* X from random U with |re|, |im| < 16: 16.5 LSB.
* X from real Q15 signals through the FFT model: 2.7 LSB.
* Y from random X with |re|, |im| < 32: 12.3 LSB.
* Reconstructed y(n): 8.7 LSB.

Almost all of the error comes from rounding c(k) to Q15.

## Direct stage (`mclt_fwd_stage`)

The FFT core streams U(0..2M-1) in natural order, one value per clock, with
`xk_index` and `xk_dv`. Only U(0..M) are needed. Each value passes through
three registers:

1. `mclt_c_rom` reads c(xk_index) synchronously while U is registered.
2. `mclt_cmul` forms V = c*U, which is registered.
3. A one-value delay register holds the previous V. When V(k+1) is in the
   product register and V(k) is in the delay register, the output register
   loads:

       sal_re = Re V(k+1) - Im V(k)
       sal_im = Im V(k+1) + Re V(k)

   `dir_out` = k and `dv` load with it.

`mclt_fwd_ctrl` carries the index and valid through the pipeline. It emits
X(k) only when the index in the product register lies in 1..M and the delay
register holds the index just below it. A gap in the stream therefore drops
the affected coefficients instead of pairing the wrong values.

Timing: X(k) appears 3 clocks after `xk_index` = k+1. A gap-free block gives
`dv` on M consecutive clocks. FFT outputs with index above M are ignored. The
stage accepts one block per 2M clocks, the FFT's own rate. The FFT core
(modelled with 611 clocks from start to U(0)) dominates the start-to-first-
coefficient latency, which is 615 clocks in the end-to-end test.

## Inverse stage (`mclt_inv_stage`)

Coefficients arrive in order k = 0..M-1 with `in_valid`. Gaps between them
are allowed. Each block of coefficients produces Y(0..M), which waits in a
buffer for the IFFT core.

**Datapath.** As each coefficient arrives, it is combined with the previous
one, held in a delay register:

    A_re = Re X(k-1) + Im X(k)
    A_im = Im X(k-1) - Re X(k)

The ROM reads c*(k) at the same time. In the next clock `mclt_cmul` forms
c*·A and drops 17 bits: 15 for the Q15 factor and 2 for the division by 4.
That gives Y(k) for k = 1..M-1.

Y(0) and Y(M) use a separate edge path: (Re X + Im X) times
round(2^15/sqrt(8)) = 11585, negated for Y(M). The edge path exists because
Y(M) and Y(M-1) both depend on X(M-1) and must be written in the same clock.
Feeding Y(M) through the complex multiplier one clock later would collide
with k = 0 of a following block.

**Y buffer (`mclt_y_buffer`).** The buffer stores only Y(0..M). Y(1..M-1)
live in a RAM of M words per bank. Y(0) and Y(M), which are real, live in a
register each per bank. The IFFT core addresses all 2M values by `Y_index`:

| `Y_index` | returned |
|---|---|
| 0 | (Y(0), 0) |
| 1..M-1 | Y(k) |
| M | (Y(M), 0) |
| M+1..2M-1 | conj Y(2M - `Y_index`) |

The data follow the index by `RD_LAT` = 3 clocks, the input timing of the
FFT core. The read takes 1 clock and a delay line adds the rest.

**Banks and start (`mclt_inv_ctrl`).** There are two banks. One block is
written while the IFFT reads the previous one. The control unit checks the
order on arrival. Index 0 opens a block, and every other index must follow
the one before it. The last write of a complete block (Y(M-1) and Y(M)
together) swaps the banks. One clock later, `start` pulses for one clock,
3 clocks after the `in_valid` of k = M-1. A block with a missing index is
dropped: it raises no start, and the next block overwrites its bank.
Two assertions in `mclt_inv_ctrl` state the invariants of this scheme: the
read and write banks always differ, and `start` lasts one clock.

**Block spacing.** The IFFT reads 2M values per block. Blocks must therefore
start at least about 2M+4 clocks apart, so that the reads of one block finish
before the next swap. The testbenches use 2M+4 (stage test) and 2M+8
(end-to-end test, which the FFT model requires). Nothing in the RTL enforces
this spacing: it is the caller's duty.

## Top level (`mclt_top`)

The two stages sit side by side and share only `clk` and `rst_n`. In a full
system, the watermark embedder connects `sal_re/sal_im/dir_out/dv` to
`in_re/in_im/in_dir/in_valid`.

| port | dir | width | meaning |
|---|---|---|---|
| `clk`, `rst_n` | in | 1 | clock; synchronous active-low reset |
| `xk_re`, `xk_im` | in | 25 | FFT output U(k), 9Q15 |
| `xk_index` | in | log2(2M) | k of U(k) |
| `xk_dv` | in | 1 | U(k) valid |
| `sal_re`, `sal_im` | out | 25 | MCLT coefficient X(k), 9Q15 |
| `dir_out` | out | log2(M) | k of X(k) |
| `dv` | out | 1 | X(k) valid |
| `in_valid` | in | 1 | watermarked coefficient valid |
| `in_dir` | in | log2(M) | its index k |
| `in_re`, `in_im` | in | 24 | watermarked X(k), 8Q15 |
| `ifft_start` | out | 1 | one-clock pulse: Y of a block ready |
| `Y_index` | in | log2(2M) | IFFT read index |
| `Y_re`, `Y_im` | out | 24 | Y(`Y_index`), `RD_LAT` clocks later |

Parameters: `M` (default 128) and `RD_LAT` (default 3). The index widths
follow from `M`. The c(k) table is computed at elaboration from its closed
form in `mclt_pkg::c_factor`, so any power-of-two `M` works without new data
files.

## Sources

| file | content |
|---|---|
| `rtl/mclt_pkg.sv` | formats, complex struct types, Q15 rounding, c(k) |
| `rtl/mclt_c_rom.sv` | c(k) / c*(k) table, synchronous read |
| `rtl/mclt_cmul.sv` | complex multiplier with truncation |
| `rtl/mclt_fwd_ctrl.sv`, `rtl/mclt_fwd_stage.sv` | direct stage |
| `rtl/mclt_inv_ctrl.sv`, `rtl/mclt_y_buffer.sv`, `rtl/mclt_inv_stage.sv` | inverse stage |
| `rtl/mclt_top.sv` | both stages |
| `tb/fft_core_model.sv`, `tb/ifft_core_model.sv` | floating-point models of the cores (simulation only) |
| `tb/tb_*.sv` | one self-checking testbench per module |

## Departures from the original design and choices made here

* The FFT/IFFT cores are not included. Their models assume natural-order
  output, orthonormal scaling and a three-clock input latency. The IFFT
  model pulses `edone` on the clock after `done`.
* The inverse stage's 24-bit values are taken to have 15 fraction bits.
* Added ports: `rst_n`, `xk_dv` (valid of the FFT output) and `in_valid`
  (valid of the watermarked coefficient).
* All pipeline registers and latencies (3 clocks in each stage, synchronous
  ROM and RAM reads) are choices of this implementation.
* The original inverse stage is described with one RAM. This one uses two
  banks, so writing the next block can overlap the IFFT's reads.
* Y(0) and Y(M) come from a separate constant-multiplier path, as explained
  under the inverse stage.
* The gap checks in both control units, and the dropping of incomplete
  blocks, are additions.
* The c(k) table saturates +1.0 to 32767.

## Simulating

Every testbench is self-checking. Each prints
`TB_RESULT checks=<n> failures=<n>` and has a watchdog. With Verilator 5:

    verilator --binary --timing -Irtl -Itb -y rtl -y tb +libext+.sv \
        rtl/mclt_pkg.sv tb/tb_mclt_top.sv --top-module tb_mclt_top -o sim
    ./obj_dir/sim

`tb_mclt_top` runs the whole chain at the default size, M = 128, in well
under a second. A random signal is cut into three overlapping blocks, which
pass through the FFT model, the direct stage, a pass-through embedder, the
inverse stage and the IFFT model. The test checks:

* every X(k) against the MCLT definition,
* every y(n) against x(n) h(n)^2,
* the 615-clock initial latency,
* that each of these occurs the expected number of times: coefficient runs
  of M clocks, dropped FFT outputs above M, bank swaps, writes of Y(0) and
  Y(M), conjugate-symmetric reads, and writes that overlap IFFT reads.

The module tests are `tb_mclt_c_rom`, `tb_mclt_cmul`, `tb_mclt_fwd_ctrl`,
`tb_mclt_fwd_stage`, `tb_mclt_inv_ctrl`, `tb_mclt_y_buffer` and
`tb_mclt_inv_stage`. Substitute any of them for `tb_mclt_top` in the command
above. The control-unit and buffer tests use M = 16; the others use the
default.
