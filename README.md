# Pipelined radix-4 single-path delay-commutator FFT (R4SDC)

This is a streaming FFT processor. Complex samples enter on one path, one per
clock, and the transform comes out on one path at the same rate, with no gap
between frames. The default is a 16-point transform of 16-bit samples. It is a
radix-4 decimation-in-frequency (DIF) FFT built as a pipeline of log4(N)
identical stages, two for N = 16. Each stage is a *single-path delay
commutator*. A delay line holds the incoming stream until the four operands of
a radix-4 butterfly are present, and multiplexers on its taps feed them to the
butterfly. A *modified* butterfly then forms one of its four outputs per
clock. Because the stream carries one word per clock, the butterfly is busy
on every cycle and never idle for three cycles out of four. The price is
memory: a stage of span L stores 6L words, 3N/2 words in the first stage.

The published design this RTL follows was an FPGA implementation of the
16-point case, compared with a radix-4 single-path delay-feedback (R4SDF)
pipeline. That comparison baseline is not included here.

## The radix-4 DIF step

A stage with span L takes blocks of 4L words. For each n in 0..L-1 it forms
four outputs from the operands a = x[n], b = x[n+L], c = x[n+2L] and d = x[n+3L]:

    y0[n] =  a +  b + c +  d
    y1[n] = (a - jb - c + jd) * W^(n)
    y2[n] = (a -  b + c -  d) * W^(2n)        W = exp(-j 2 pi / 4L)
    y3[n] = (a + jb - c - jd) * W^(3n)

and emits them in the order y0[0..L-1], y1[0..L-1], y2[...], y3[...]. Each
quarter of that output block is a block of span L/4 for the next stage. After
log4(N) stages the result at output position p is the bin whose base-4 digits
are those of p reversed. For N = 16, position p = 4a + b carries bin 4b + a:

    position: 0 1 2  3  4 5 6  7  8 9 10 11 12 13 14 15
    bin:      0 4 8 12  1 5 9 13  2 6 10 14  3  7 11 15

The sum output y0 needs no multiplication. Only the three difference outputs
pass through a true complex multiplier, and only for n > 0. In the first
stage of a 16-point transform that makes nine non-trivial twiddle products per
frame. The last stage has span 1, so all its twiddles are 1 and it has no
multiplier.

## How a stage works

### Timing of one block

Count the words a stage accepts as t = 0, 1, 2, ... and let block b start at
t = 4Lb. Output position q of the block (q = kL + n) leaves the stage with the
input word at block position q + 3L, i.e. 3L words after its own position.
The first outputs, y0[n], need x[n+3L], which arrives exactly then. For L = 4:

    accepted word t mod 16:  12 .. 15        | 0 .. 3           | 4 .. 7   | 8 .. 11
    arriving input:          x12..x15 of b    | x0..x3 of b+1    | x4..x7   | x8..x11
    emitted:                 y0[0..3] of b    | y1[0..3] of b    | y2[0..3] | y3[0..3]

So a stage emits y_k of block b while block b+1 is arriving. The controller
derives everything from a counter modulo 4L. The output position is
p = (t + L) mod 4L, the butterfly select is k = p / L, and the twiddle
exponent is (p mod L) * k * N/(4L).

### The delay commutator (`sdc_delay_commutator`)

When y_k[n] leaves, operand m = x[n + mL] arrived (3 - m + k)L words earlier.
The oldest operand needed is x[n] for y3, 6L words back. The commutator is one
6L-word shift register, advanced on each accepted word, with taps every L
words (tap 0 is the live input). Operand m is taken from tap 3 - m + k:

| k (output formed) | x[n] | x[n+L] | x[n+2L] | x[n+3L] |
|---|---|---|---|---|
| 0 | tap 3 | tap 2 | tap 1 | tap 0 (input) |
| 1 | tap 4 | tap 3 | tap 2 | tap 1 |
| 2 | tap 5 | tap 4 | tap 3 | tap 2 |
| 3 | tap 6 | tap 5 | tap 4 | tap 3 |

Memory per stage is therefore 6L words: 24 + 6 = 30 complex words for N = 16,
or 3N/2 + 3N/8 + ... in general (about 2N in total).

### The modified butterfly (`r4_butterfly`)

It computes y_k = sum over m of (-j)^(mk) x_m for the k it is given. Each of the four
operands passes through a swap/negate multiplexer (multiplying by 1, -j, -1 or
+j) and three adders sum them. It is combinational, and its output is 2 bits
wider than its input, so it cannot overflow.

### Twiddle multiplication (`twiddle_rom`, `complex_multiplier`)

The butterfly output is registered with its twiddle exponent. The exponent
addresses an N-entry table of W_N^m = cos - j sin in Q2.14 (16-bit, +1.0
exact), computed at elaboration from `$cos`/`$sin`. The multiplier uses four
real products and rounds to nearest: add half an LSB, then shift. Its output
is one bit wider than its input, because a rotation can raise one component by
up to sqrt(2).

## The 16-point pipeline (`r4sdc_fft`)

    in --> stage 1 (L = 4, 24-word delay line, twiddles W16) --> stage 2 (L = 1, 6 words, no twiddle) --> out
           16 bit                                             19 bit                                    21 bit

Word widths grow without scaling: +2 bits per butterfly and +1 per multiplier,
so the output is DW + 3·log4(N) - 1 bits (21 for the default) and cannot
overflow. The generate loop builds any power-of-4 N: stage s has
L = N / 4^(s+1) and works on the low DW + 3s bits of a shared bus. Only N = 16
has been simulated.

### Interface

| port | dir | width | meaning |
|---|---|---|---|
| clk, rst_n | in | 1 | clock; asynchronous active-low reset of counters and valid flags |
| in_valid | in | 1 | in_re/in_im carry a sample |
| in_re, in_im | in | DW (16) | sample, two's complement, natural order |
| out_valid | out | 1 | out_* carry a result |
| out_re, out_im | out | DW+3·log4(N)-1 (21) | result |
| out_bin | out | log2(N) | frequency bin of this result (digit-reversed position) |
| out_first | out | 1 | this result is bin 0, the first of a frame |

There is no ready signal; the design accepts a sample on every cycle that
in_valid is high. The first sample after reset starts frame 0. Frames are
contiguous runs of N accepted samples.

### Timing

- Throughput: one sample in and one result out per clock. Frames can follow
  back to back.
- Latency: the pipeline holds N-1 words (3N/4 + 3N/16 + ... + 3 = 15 for
  N = 16). With an unbroken input stream, result position j appears 3 cycles
  after input word j + N - 1 is accepted: 2 cycles for the stage-1 register
  and multiplier, 1 for the stage-2 register. For the first frame, bin 0
  appears 18 cycles after the first sample.
- Stalls: every register of the data path advances only with an accepted
  word. A cycle with in_valid low freezes the pipeline, and out_valid drops a
  few cycles later. No data is lost.
- Flushing: since the pipeline moves only on input, the last frame comes out
  only when N-1 more words are pushed in (the next frame, or padding).

## Numerical behaviour

With 16-bit input the result differs from an exact DFT only by the first
stage's twiddle rounding. That is half an LSB per product, plus the
coefficient quantisation (about 3·10^-5 relative), multiplied up by the
second stage's sum of four. The worst case this allows is about 50 LSB of the
21-bit output, so the test accepts 80. The largest error observed over
full-scale random and structured frames is under 4 LSB.
Impulse, constant and single-tone inputs come out as expected.

## What follows the source design and what is this implementation's

Taken from the source design:
- The 16-point radix-4 DIF pipeline with two stages, single-path serial input
  and 16-bit samples.
- Stages built from delay lines, a commutator, a processing element of adders
  and subtractors, multiplexer control and twiddle multiplication.
- Only the difference outputs are multiplied by twiddles; the sum passes
  straight through.
- A butterfly modified for full utilisation, paid for with 3N/2, 3N/8, ...
  words of storage per stage.
- Digit-reversed output order.

Chosen here, where the source gives no detail:
- The tap arrangement of the delay line and the select rule 3 - m + k.
- The in_valid handshake with stall, and the reset scheme.
- Full-precision word growth, the 16-bit Q2.14 coefficients, round to nearest,
  the four-multiplier complex multiplier and the two pipeline registers.
- The out_bin / out_first outputs. There is no reorder buffer to natural
  order, because the source design has none.

The source reported FPGA results for its version (Spartan-3 XC3S200: 862
slices, 1496 LUTs, 13.782 ns, 783 mW). This RTL has not been put through that
flow, and those numbers are not claimed for it.

## Files

| file | contents |
|---|---|
| `rtl/r4sdc_pkg.sv` | default sizes, `log4`, `digit_rev4` |
| `rtl/r4sdc_fft.sv` | top: the cascade of stages and the output bin counter |
| `rtl/r4sdc_stage.sv` | one stage |
| `rtl/sdc_stage_ctrl.sv` | stage counter: select k, twiddle exponent, primed |
| `rtl/sdc_delay_commutator.sv` | 6L-word tapped delay line with operand multiplexers |
| `rtl/r4_butterfly.sv` | modified radix-4 butterfly |
| `rtl/twiddle_rom.sv` | W_N^m table |
| `rtl/complex_multiplier.sv` | registered complex multiplier |
| `tb/tb_*.sv` | one self-checking testbench per module |

## Simulating

Each testbench prints `TB_RESULT checks=<n> failures=<m>` and stops itself,
with a watchdog in case it hangs. With Verilator 5:

    verilator --binary --timing --assert -Wno-fatal -Irtl rtl/r4sdc_pkg.sv -y rtl \
        tb/tb_r4sdc_fft.sv --top-module tb_r4sdc_fft -o sim
    ./obj_dir/sim

Replace the testbench name to run another. What they check:

- `tb_r4sdc_fft`: the top at default parameters, against a floating-point
  DFT. It sends 12 frames: impulse, constant, three tones, a full-scale
  pattern, the ramp x[n] = n + jn, random data, and one frame with random
  stalls. It checks every value and bin index, the 18-cycle latency, nine
  non-trivial twiddle products per frame, and that every butterfly output
  (y0..y3) was formed in both stages.
- `tb_r4sdc_stage`: a twiddled L = 4 stage and an L = 1 last stage against
  a model of one DIF step, with random stalls. Output timing is checked to
  the cycle.
- `tb_sdc_delay_commutator`, `tb_r4_butterfly`, `tb_sdc_stage_ctrl`,
  `tb_twiddle_rom`, `tb_complex_multiplier`: each unit against an
  independent model.

To change the size, set `N` (a power of 4), `DW` or `CW` on `r4sdc_fft`.
The top-level testbench's frame data and twiddle count assume N = 16.
