# Horizontally reused radix-4 Pease FFT core

This core computes an N-point discrete Fourier transform, N = 4^K, on a
stream of complex 16-bit fixed-point words that arrive four per clock cycle
(by default; the width is a parameter).
It uses one radix-4 kernel and runs it K times per transform. The Pease FFT
makes this possible because every one of its iterations has the same
structure:

    DFT_N = prod_{s=0..K-1}  L_4^N · (I_{N/4} ⊗ DFT_4) · T_s^N      (input in digit-reversed order)

Only the twiddle factors T_s change from one iteration to the next. So one
kernel is built: twiddle multiply, 4-point DFT, stride permutation. Its
output is fed back to its input, and a mux picks between a new input vector
(iteration 0) and the recirculated data (iterations 1..K-1). This is
*horizontal reuse*: the K iterations share one kernel in time. Within an
iteration, the N/4 groups of four words pass one after another through a
single DFT_4. This is *streaming reuse*: the N/4 copies of DFT_4 become one
copy used over N/4 cycles.

The default size is N = 16 (K = 2), a 16-point transform with a streaming
width of 4. Three parameters change it:

- `N` sets the transform size. Any N = R^K with N ≥ R·W works, and N = 256
  is tested.
- `R` selects the radix: 4, or 2, where the kernel becomes a single
  butterfly and N = 2^K.
- `W` is the streaming width, the number of words per cycle. It must be R
  times a power of two. The kernel then holds W/R copies of DFT_R side by
  side, and one iteration takes N/W cycles instead of N/R:

      one iteration = L_R^N · (I_{N/W} ⊗streamed (I_{W/R} ⊗ DFT_R)) · T_s^N

  The whole core is tested at R = W = 4, R = W = 2, R = 4 with W = 16 and
  R = 2 with W = 8.

The diagram shows the default, R = W = 4:

```
             +-----+   lane0 ------------------+    +-------+   +-----------+   +-----+
 in_data --->| mux |   lane1 --(x)<- lookup1 --+--->|       |   |  stride   |   |     |---> out_data
 (4 words)   |     |-> lane2 --(x)<- lookup2 --+--->| DFT_4 |-->|  permute  |-->| reg |
        +--->|     |   lane3 --(x)<- lookup3 --+--->| (/4)  |   |  L_4^N    |   |     |--+
        |    +-----+                                +-------+   +-----------+   +-----+  |
        +--------------------------------- feedback (iterations 1..K-1) -----------------+
```

## The algorithm as the hardware runs it

The description below is for radix R (R = 4 by default, or 2). Words are
numbered 0..N-1 inside a vector. Block c (c = 0..N/R-1) is the R words
Rc..Rc+R-1, and word Rc+j is input j of block c. On the wires, cycle group
g (g = 0..N/W-1) carries words Wg..Wg+W-1, word Wg+l in lane l, so a group
holds W/R whole blocks. One iteration s does three things:

1. **Twiddle.** Input j of block c is multiplied by
   `w_{R^(s+1)}^( j · floor(c / R^(K-1-s)) )`, where `w_m = exp(-2πi/m)`.
   Input 0 is always multiplied by 1, so lanes l with l mod R = 0 have no
   multiplier (at the default: lane 0). Iteration 0 multiplies by 1
   everywhere.
2. **DFT_R.** Each block goes through an R-point DFT. The result is scaled
   by 1/R.
3. **Stride permutation L_R^N.** Input j of block i moves to position
   j·N/R + i. In other words, input j of all blocks together forms the
   j-th R-th of the new vector.

The input must come in radix-R digit-reversed order: word p of the input
stream is x[rev_R(p)], where rev_R reverses the K base-R digits of p
(`fft_pkg::digit_rev`). After K iterations the result leaves in natural
order: output group g, lane l holds X[Wg+l] / N. The twiddle exponent above
was derived for this digit-reversed-input, constant-geometry form. It was
checked numerically against the DFT definition for K = 2, 3 and 4, at both
radices, and the simulations confirm it for every tested width.

The DFT_4 is the factorization
`DFT_4 = (DFT_2 ⊗ I_2) · T_2^4 · (I_2 ⊗ DFT_2) · L_2^4`:

- a fixed reordering (x0, x2, x1, x3);
- two butterflies;
- multiplication of one word by −i, which is a swap of the real and imaginary parts plus a negation;
- two more butterflies.

It has no multipliers. The radix-2 kernel is a single butterfly (`dft2`).

## The streaming permutation (`stride_perm`)

This is the one block that stores data, and it is the least obvious one.
The first N/R output words are input 0 of every block, so the first R-th
of the output already needs a word from the last input group. The output
groups should leave on consecutive cycles, so a whole vector is stored
before the first output group leaves. To let the next vector
arrive at the same time, storage is double buffered: two halves, one being
written while the other is read.

The storage is W RAM banks. Each bank has one write port and one read
port, so it maps onto an FPGA block RAM. Each bank is 2·N/W words deep. With
a plain layout (bank = lane), every output group would need many of its
words from the same bank. The layout is therefore skewed: word p = Wg + l
(input group g, lane l) goes to bank (l + g) mod W, at row g of the current
half.

- **Writes.** The W words of a group have W different lanes, so they land
  in W different banks.
- **Reads.** Output group h, lane l, is y[Wh+l] = z[p] with
  p = R·(i0 + l) + j, where j = ⌊Wh / (N/R)⌋ and i0 = Wh mod N/R. As l runs
  over 0..W-1, p runs over R consecutive input groups and takes every lane
  position in them once, so the W words fall in W different banks. This
  needs N/R to be a multiple of W, which is N ≥ R·W.

A rotation in front of the banks places the words. Behind them each output
lane picks the bank its word was read from (for W = R this is again a
rotation: output lane l comes from bank (j + l) mod R).

Timing inside the block works like this:

1. A half is marked full when its last group is written.
2. The half is read on the next N/W cycles.
3. The RAM read takes one cycle, and the output register (the `reg` of the
   datapath) takes one more.

So out_valid rises 3 cycles after the last input group. That is N/W + 2
cycles after the first input group when the groups come back to back.
Vectors can follow each other with no gap. A half is always read out
completely before it is refilled, and an assertion checks this.

## Loop control (`hr_ctrl`) and throughput

Two counter pairs track the loop:

- **Kernel input: (iteration, group).** In iteration 0 the kernel input is
  the input port, and `in_ready` is high. In iterations 1..K-1 it is the
  feedback, and `in_ready` is low. These counters also address the twiddle
  tables.
- **Permutation output: (iteration, group).** Groups of iteration K-1 are
  results (`out_valid`, `out_last`). All other groups are recirculated.

Once a vector's last iteration has entered the kernel, `in_ready` rises
again. The next vector can enter while the previous result is still
leaving. Its first iteration can finish before that result has fully left,
so a returning group is recirculated only if it is not a result.

With input offered continuously:

| quantity | cycles | R = W = 4, N = 16 | R = W = 4, N = 256 | R = W = 2, N = 256 | R = 4, W = 16, N = 256 | R = 2, W = 8, N = 64 |
|---|---|---|---|---|---|---|
| first input group → first result group | K·(N/W + 2) | 12 | 264 | 1040 | 72 | 60 |
| start of one transform → start of the next | K·(N/W + 2) − 2 | 10 | 262 | 1038 | 70 | 58 |
| result groups per transform (consecutive cycles) | N/W | 4 | 64 | 128 | 16 | 8 |

Widening the stream divides the N/W part of the cycle count. The fixed 2
cycles per iteration (RAM read and output register) stay, so at 256 points
W = 16 is 3.7 times faster than W = 4 for about 4 times the datapath.

Only one transform is in the loop at a time.

## Interface

| port | dir | width | meaning |
|---|---|---|---|
| `clk` | in | 1 | clock, all registers on the rising edge |
| `rst_n` | in | 1 | synchronous active-low reset of the control state |
| `in_valid` | in | 1 | an input group is offered |
| `in_ready` | out | 1 | the group is taken in a cycle where both are high |
| `in_data` | in | W × `cplx_t` | group g: x[rev_R(Wg+l)] in lane l |
| `out_valid` | out | 1 | a result group is present (no backpressure) |
| `out_last` | out | 1 | last group of a transform |
| `out_data` | out | W × `cplx_t` | group g: X[Wg+l]/N in lane l |

- `cplx_t` (in `fft_pkg`) is a packed struct `{re, im}` of two signed 16-bit
  fields.
- `in_valid` may drop between the groups of a vector.
- Data registers and RAMs are not reset. Only the counters and flags are
  reset.

## Number format and accuracy

- **Data.** 16-bit signed real and imaginary parts.
- **Twiddles.** 16-bit signed with 14 fraction bits (Q2.14), so that ±1 and
  ±i are exact. The tables (`twiddle_rom`, one per lane that has a
  multiplier, K·N/W entries each) are computed from the formula above by a constant function when the
  design is elaborated. No data file is needed.
- **Multiplier.** `twiddle_mult` rounds to nearest and saturates.
- **DFT_R.** `dft4` grows by two bits (and `dft2` by one) and is exact.
  The top-level module then divides by R, rounds to nearest and saturates.

Scaling by 1/R in each iteration gives a result of DFT(x)/N. Complex
magnitude never grows through an iteration. Inputs of complex magnitude
below 2^15 − 4K therefore cannot overflow, though a single real or
imaginary part may itself be at full scale. In simulation the error
against a double-precision DFT/N was at most 1 LSB for radix 4 (N = 16 and
256, W = 4 and 16). For radix 2 it was at most 3 LSB at N = 256 and 2 LSB at
N = 64, because those cores run more iterations.

## Files

All in `rtl/`, one unit per file:

| file | contents |
|---|---|
| `fft_pkg.sv` | widths, `cplx_t`, `tw_cplx_t`, saturation, `digit_rev` |
| `dft2.sv` | 2-point butterfly |
| `dft4.sv` | combinational 4-point DFT from four `dft2` |
| `twiddle_mult.sv` | complex multiply by a twiddle constant |
| `twiddle_rom.sv` | per-lane twiddle table, addressed by {iteration, group} |
| `ram_1r1w.sv` | one RAM bank, synchronous read and write |
| `stride_perm.sv` | streaming L_R^N, W skewed banks, double buffered, output register |
| `hr_ctrl.sv` | loop controller |
| `pease_fft.sv` | top: mux, twiddle stage, W/R DFT_R blocks, scaling, permutation, feedback |

The parameters `N` (default 16), `R` (default 4) and `W` (default 4) appear
on `pease_fft`, `stride_perm`, `hr_ctrl` and `twiddle_rom`:

- `N` is the transform size, a power of R with N ≥ R·W.
- `R` is the radix, 2 or 4.
- `W` is the streaming width, R times a power of two. Set it together with
  `R`: with `R = 2` the default `W = 4` gives two butterflies per cycle.

The word widths are constants in `fft_pkg`.

## Simulation

Every block has a self-checking testbench in `tb/`. Each prints
`TB_RESULT checks=<n> failures=<m>` and stops itself after a fixed number of
cycles. To run one with Verilator:

```
verilator --binary --timing --assert -Irtl -Itb rtl/fft_pkg.sv rtl/*.sv tb/*.sv \
          --top-module tb_pease_fft -Mdir obj_tb -o sim
./obj_tb/sim
```

| testbench | what it checks |
|---|---|
| `tb_dft2`, `tb_dft4` | exact results against a direct matrix-vector product, including full-scale inputs |
| `tb_twiddle_mult` | against a floating-point product, within 1 LSB |
| `tb_twiddle_rom` | every entry against `w_{R^(s+1)}^(j·⌊c/R^(K-1-s)⌋)`: R = W = 4 at N = 16 (3 lanes) and N = 256 (lane 3), R = W = 2 at N = 16, R = 4, W = 16 at N = 256 (12 lanes) |
| `tb_stride_perm` | R = W = 4 at N = 16, 64 and 256; R = W = 2 at N = 16 and 256; R = 4, W = 16, N = 256; R = 2, W = 8, N = 64; R = 2, W = 4, N = 16; back-to-back and gapped input; exact data, `out_last`, latency N/W + 2 |
| `tb_hr_ctrl` | N = 64 against a cycle model of the permutation; mux select, ready, twiddle address, result flags |
| `tb_pease_fft` | default N = 16 end to end (details below) |
| `tb_pease_fft_dft256` | the same test on a 256-point transform |
| `tb_pease_fft_dft256_r2` | the same test on a 256-point radix-2 core |
| `tb_pease_fft_dft256_w16` | the same test on a 256-point radix-4 core, 16 words per cycle |
| `tb_pease_fft_dft64_r2w8` | the same test on a 64-point radix-2 core, 8 words per cycle |

The five end-to-end testbenches use these inputs:

- an impulse;
- a constant;
- a tone;
- random vectors.

They compare against a floating-point DFT/N and check the latency, the
transform-to-transform gap and `out_last`. They also count four events and
require each one to happen: recirculation, input held off during
recirculation, idle input cycles inside a vector, and a new vector entering
while a result leaves.

## Design choices and limits

The kernel structure is taken from the formula-driven description of this
architecture:

- the input mux;
- lane 0 without a multiplier and the other lanes each with a lookup table
  and a multiplier;
- DFT_R, then L_R^N, then a register, then feedback;
- W/R parallel DFT_R blocks for a stream W words wide;
- radix 4 with width 4 as the main configuration, radix and width as
  parameters, 16-bit data and digit-reversed input.

The description leaves the following open, and this implementation chooses
them:

- the exact twiddle values, derived here;
- scaling by 1/R per iteration;
- the Q2.14 twiddle format;
- rounding and saturation;
- the ready/valid handshake;
- the limit N ≥ R·W, which comes from the permutation's memory layout;
- synchronous reset of the control state only;
- the banked, skewed RAM organization of the permutation, with its 3-cycle
  latency.

The twiddle lookup and the DFT_4 sit in one combinational path between the
permutation's output register and the RAM write. For a high clock rate you
would add pipeline registers there. The control counts only valid groups,
so adding registers needs a matching delay on the strobes.

This is one point of a larger design space, which is not built here:

- fully parallel datapaths (W = N), which the permutation's memory layout
  does not allow;
- radices other than 2 and 4;
- fully streamed designs that unroll all iterations instead of reusing one
  kernel;
- floating-point data.
