# 31-tap multiplierless FIR Hilbert transformer

A Hilbert transformer shifts every frequency component of a real signal by
-90 degrees while leaving its amplitude alone. Paired with a matching delay,
it produces the quadrature (I/Q) signal used in single-sideband modulation and
envelope detection. This core does it with a linear-phase 31-tap FIR filter on
8-bit samples, one sample per clock, and has no multipliers. All the
coefficient multiplications are done by one shared shift-and-add network, and
a transposed adder/delay line sums the products.

The architecture is based on a published 0.35 um CMOS chip (31 taps, 8-bit
I/O, about 70 MHz). The coefficient values, the adder network and the
internal word lengths here are this design's own; the section "Design
choices" lists them.

## Filter and coefficients

The ideal Hilbert impulse response is

    h(n) = 2 / (pi n)   for odd n,       h(n) = 0   for even n (and n = 0).

It is cut to n = -15..15, shaped by a Hamming window
`w(n) = 0.54 + 0.46 cos(pi n / 15)`, and delayed by 15 samples so that it is
causal. Two properties make the hardware cheap:

* **Half the taps are zero.** Only the 16 taps with odd n need a product.
* **The response is antisymmetric** (h(-n) = -h(n)). Taps n and -n use the
  same product with opposite signs, so only **8 distinct constants** have to
  be multiplied.

The constants are quantised to 10 fractional bits:

| n | 1 | 3 | 5 | 7 | 9 | 11 | 13 | 15 |
|---|---|---|---|---|---|----|----|----|
| COEF (x 2^-10) | 645 | 198 | 100 | 55 | 29 | 14 | 6 | 3 |

`COEF = round(1024 * 2/(pi n) * (0.54 + 0.46 cos(pi n/15)))`. The resulting
gain is within 2.5% of 1 from 0.05 fs to 0.45 fs, and the phase is exactly
-90 degrees after the 15-sample delay. The sum of the constant magnitudes is
2100/1024, about 2.05. A worst-case input can therefore exceed the output
range, so the output saturates.

## The shared shift-add multiplier block (`hilbert_mcm`)

Each constant is a sum of signed powers of two. In canonic signed digit (CSD)
form it takes 15 adders/subtracters to build all eight products one by one.
The block instead computes two recurring digit patterns once and reuses them:

* `101` = 5x, used twice inside 645 = 101 followed by 101 shifted by 7 (sharing
  *within* a constant), and again in 100x.
* `10-1` = 3x, used twice inside 198, and again in 29x, 14x, 6x and 3x (sharing
  *across* constants).
* 55x is formed from the already computed 14x as 4 * 14x - x.

```
a   = x + 4x          =   5x        p[0] = a + 128a        = 645x
b   = 4x - x          =   3x        p[1] = 2b + 64b        = 198x
p14 = 4b + 2x         =  14x        p[2] = 4a + 16a        = 100x
                                    p[3] = 4*p14 - x       =  55x
                                    p[4] = 32x - b         =  29x
                                    p[5] = p14             =  14x
                                    p[6] = 2b              =   6x
                                    p[7] = b               =   3x
```

This takes 8 adders in total, against 15 for plain CSD. The longest chain is
three adders deep (b, then 14x, then 55x). Every product is kept at full
precision (18 bits, scaled by 2^10), so the network is exact. The network is
specific to this coefficient set: if the window or precision in `hilbert_pkg`
changes, the network must be derived again. `tb_hilbert_mcm` catches a
mismatch because it recomputes the constants from the formula.

## Transposed adder/delay line (`hilbert_tdl`)

In transposed form all taps see the same sample at the same time, which is
what lets one multiplier block feed the whole filter. The partial sums move
down a register chain:

    r[30] <= h30 x,    r[k] <= r[k+1] + h_k x   (k = 29..1),    y = r[1] + h0 x

Tap k has n = k - 15. Where n is even, the stage is only a register; where n
is odd, it adds or subtracts product `p[(|n|-1)/2]` according to the sign of n.
For 31 taps that is 30 registers and 16 structural adders, all 20 bits wide.
Twenty bits hold the worst case 2100 x 128 exactly, so nothing is truncated
before the output stage. The critical path is one structural adder plus the
multiplier block in front of it. `N_TAPS` is a parameter (it must be 3 mod 4,
so that the end taps are non-zero), but the multiplier block only supplies the
8 products of the 31-tap set.

## Output word (`hilbert_outq`)

The 20-bit sum carries 17 fractional bits, and the output is Q1.7. The stage
adds half an output LSB, drops 10 bits (round half up) and clips to
[-128, 127]. The flags `sat_hi`/`sat_lo` report clipping, and the top
registers them as `y_clip`.

## Top level (`hilbert_fir`)

```
x_in -> [x_q] -> hilbert_mcm -> hilbert_tdl -> hilbert_outq -> [y_out, y_clip]
```

| port | dir | width | meaning |
|------|-----|-------|---------|
| `clk` | in | 1 | sample clock, one sample per cycle |
| `rst_n` | in | 1 | asynchronous active-low reset, clears every register |
| `x_in` | in | 8 | signed Q1.7 input sample |
| `y_out` | out | 8 | signed Q1.7 Hilbert-transformed sample |
| `y_clip` | out | 1 | `y_out` was saturated |

Timing: a sample on `x_in` before clock edge *e* is captured at *e*. Its
tap-0 contribution appears on `y_out` after edge *e+1*, so the pipeline
latency is 2 clocks. The filter adds its own group delay of 15 samples. To
pair `y_out` with the original signal as an I/Q pair, delay `x_in` by 17
clocks. There is no valid/enable handshake: every clock is a sample.

The shared constants and word widths are in `hilbert_pkg`.

## Design choices

These follow the published chip: 31 taps, 8-bit input and output, a
multiplierless constant-multiplier block that shares common subexpressions
within and across coefficients, and a filter structure that uses the zero taps
and the antisymmetry.

These are this design's own:

* **Window and coefficients.** Hamming window and 10 fractional bits. The
  adder network above was derived for these coefficients and is not the
  chip's own network.
* **Filter structure.** Transposed direct form.
* **Shifts.** The products use left shifts on integer-scaled constants, which
  is exact. The chip's right-shift formulation may truncate.
* **Word widths and registers.** Full-precision internal words. There is an
  input and an output register, and the multiplier block is not pipelined.
* **Reset.** Asynchronous active-low.
* **Output quantisation.** Round half up with saturation, plus the `y_clip`
  flag.
* **Timing.** The RTL has not been checked at 70 MHz against any cell
  library.

## Verification

Every testbench is self-checking. Each ends by printing
`TB_RESULT checks=N failures=M`, and each has a cycle watchdog.

* `tb_hilbert_mcm`: tries all 256 inputs. It compares each product against
  x * c, with c recomputed from the window formula in real arithmetic, and checks
  the package's `COEF` table against the same values.
* `tb_hilbert_tdl`: drives independent random values on all 8 product inputs.
  It compares every cycle against a direct-form sum over a history buffer, and
  also checks single pulses and a mid-stream reset.
* `tb_hilbert_outq`: sweeps the accumulator range and all rounding ties and
  both clip points.
* `tb_hilbert_fir`: runs the top at its default parameters, end to end,
  against a real-arithmetic direct-form model. The run includes:
  * every output sample, checked at the exact 2-clock latency;
  * the impulse main lobes (-80 / +80), checked on their exact cycles;
  * 3000 random samples;
  * a sine at fs/8 and a cosine at fs/16, whose outputs must match -cos and
    +sin to within 3 LSB;
  * worst-case sign patterns that force positive and negative saturation;
  * a mid-stream reset.

  It counts each of these and fails if any never happened.

Simulate with Verilator 5, for example:

```
verilator --binary --timing --assert -Irtl rtl/hilbert_pkg.sv tb/tb_hilbert_fir.sv \
          --top-module tb_hilbert_fir -o sim && ./obj_dir/sim
```

Replace `tb_hilbert_fir` with `tb_hilbert_mcm`, `tb_hilbert_tdl` or
`tb_hilbert_outq` to run the block tests. The tests take well under a second.
