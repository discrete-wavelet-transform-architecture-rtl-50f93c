# Folded three-level Daubechies-4 wavelet coder/decoder for 8-bit images

This design computes a three-level discrete wavelet transform (DWT) of
8-bit samples with the four-tap Daubechies filter pair, and the inverse
transform. Every filter stage of both trees runs on just two multiply-accumulate
units. A three-level dyadic tree does 7/4 of the work of its first stage, so
the three stages fit into the idle slots of one pair of four-tap filters. The
schedule repeats every eight samples. At one multiply per clock, one sample
takes four clocks, and the output is one coefficient (or one reconstructed
sample) per input sample.

On top of the 1-D cores sits an image unit. It stores a 640 x 480
monochrome image and transforms it in place: first every row, then every
column. The coefficients of each line are written back in sub-band order.

Everything is written in synthesizable SystemVerilog. One clock runs at the
multiply rate. There is one asynchronous active-low reset.

## Signal flow at a glance

```
pixel_in --MSB invert--> dwt_analysis --coef_out--> dwt_synthesis --MSB invert--> pixel_out
                              ^  |                        ^  |
                              |  +--------+   +-----------+  |
                     dwt2d_image: image memory 640x480, line buffer 640,
                     row pass then column pass, host port img_*
```

* **Stream mode** (image unit idle). Pixels (0..255) become two's
  complement samples by inverting the MSB, i.e. by subtracting 128. The
  analysis core produces an interleaved coefficient stream, which is both
  output and decoded immediately by the synthesis core. Inverting the MSB of
  the synthesis output gives back a pixel.
* **Image mode.** The image unit drives the same two cores, one line at a
  time. While `img_busy` is high the stream ports carry no user data.

## The analysis schedule

Write i(n) for the input, o/p for the first-stage high/low-pass outputs,
r/s for the second stage and u/v for the third. Each output is kept at the
even rate of its stage: o(n) and p(n) for even n, r(n) and s(n) for n a
multiple of 4, u(n) and v(n) for n a multiple of 8.

| equation | operands |
|---|---|
| o(n) = sum g(k) i(n-k) | inputs |
| p(n) = sum h(k) i(n-k) | inputs |
| r(n) = sum g(k) p(n-2k) | p |
| s(n) = sum h(k) p(n-2k) | p |
| u(n) = sum g(k) s(n-4k) | s |
| v(n) = sum h(k) s(n-4k) | s |

One processing element (PE) holds the g taps and the other the h taps.
Both see the same operand each clock. The eight-phase schedule is:

| phase (n mod 8) | 0 | 1 | 2 | 3 | 4 | 5 | 6 | 7 |
|---|---|---|---|---|---|---|---|---|
| g PE | o(n) | r(n-1) | o(n) | u(n-3) | o(n) | r(n-1) | o(n) | - |
| h PE | p(n) | s(n-1) | p(n) | v(n-3) | p(n) | s(n-1) | p(n) | - |
| operands | i(n)..i(n-3) | p values | i(n)..i(n-3) | s values | i(n)..i(n-3) | p values | i(n)..i(n-3) | s values (unused) |

Even phases filter the input. Odd phases filter earlier low-pass results.

**Register allocation.** The input is followed by a three-register delay
line D1-D3. The low-pass results go through a chain of seven registers:
H_out → R1 → R2 → R3 → R4 → R5 → R6 → R7. All of these shift once per
sample period. The register positions were found by a lifetime analysis
(forward-backward register allocation). Some s values must survive longer
than the chain is long, so in phases 0, 1 and 5, R5 reloads from R7 instead
of R4.

The operand seen in each tap cycle is:

| tap | even phases | phases 1, 5 | phases 3, 7 |
|---|---|---|---|
| 0 | input | H_out | R1 |
| 1 | D1 | R2 | R5 |
| 2 | D2 | R4 | R6 |
| 3 | D3 | R6 | R7 |

**Output stream.** Coefficients leave the core in time order, one per sample
period. In phase n the output is:

| phase | output |
|---|---|
| n odd | o(n-1) |
| n mod 8 = 2 or 6 | r(n-2) |
| n mod 8 = 4 | u(n-4) |
| n mod 8 = 0 | v(n-8), taken from R4 |

So N input samples give exactly N coefficients. Half of them are
first-level high-pass, a quarter second-level, an eighth each third-level
high- and low-pass. The `band` output names the sub-band of each
coefficient.

## The synthesis schedule

The inverse tree up-samples by two, inserting zeros. So each reconstructed
value needs only two taps from its high-pass band and two from the low-pass
band below it:

    x'(m)          = c3*hp(m) + c1*hp(m-step) + c3'*lp(m) + c1'*lp(m-step)
    x'(m + step/2) = c2*hp(m) + c0*hp(m-step) + c2'*lp(m) + c0'*lp(m-step)

Here hp/lp are (u, v) for the last stage, (r, s') for the middle one and
(o, p') for the first one. s' and p' are the rebuilt low-pass signals. The
two PEs compute the two halves of each pair at the same time:

* `O_even` applies (g3, g1, h3, h1).
* `O_odd` applies (g2, g0, h2, h0).

The schedule is:

| phase | 0 | 1 | 2 | 3 | 4 | 5 | 6 | 7 |
|---|---|---|---|---|---|---|---|---|
| work | s' pair from u, v | i' pair | p' pair from r, s' | i' pair | idle | i' pair | p' pair | i' pair |

The input is the analysis stream in the same phase numbering. It passes
through a delay line D1-D12, from which the high-pass operands and the v
operands are tapped. Intermediate s' and p' values, and the second sample of
each output pair, stay in R1-R5. R4 → R1 and R5 → R4 are fed back in
phase 5. The output is `O_even` in even phases and R1 in odd phases, so
reconstructed samples also leave in time order, one per period.

**Accuracy.** Each stage's high-pass input is combined with the low-pass
values that the stage below has just produced. As a result the inverse is
not a perfect reconstruction. It follows slowly varying signals well, with a
latency of 33 sample periods from pixel_in to pixel_out. A full-scale
sinusoid with a period of 64 samples comes back at about 27.5 dB SNR.
Evaluated in floating point, the same equations give about 34 dB on that
signal. So the schedule itself sets the limit, and 8-bit rounding costs
about 6 dB more.
Sharp edges leave an echo, a shadow next to high-contrast edges that the
source design also reports for its reconstructed test image. A smooth 640 x 480 test image returns at about
29 dB PSNR after 2-D analysis and synthesis. The source design reports
45 dB on its sinusoid test. That figure is not reached here with the
equations as specified; the testbenches check the RTL bit-exactly against
those equations instead.

## The fast processing element (`fpe`)

The `fpe` is a four-tap multiply-accumulate unit with a 4-cycle output
rhythm.

**Number formats.**

* Samples are 8-bit two's complement.
* Coefficients are 25-bit two's complement with 23 fraction bits, so the
  range is ±(2 − 2⁻²³).

**Multiplier (`radix2_mult`, `mult_element`).** Both operands are
converted to sign and magnitude. The magnitudes are multiplied in an
array of multiplier elements, each an AND gate and a full adder. The
rows are carry-save, and the top bits are finished by a final adder row.
The multiplier returns the sign bit and the magnitude, bit-inverted when the
product is negative (ones' complement).

**Adder (`cs_adder`).** A 32-bit carry-select adder built from 4-bit
groups. Each group computes its sum for both carry-in values, and the
halves are merged recursively. The sign bit of the product drives the
adder's carry in, which turns the ones' complement into the exact two's
complement while adding.

**Accumulation.** In tap cycle 0 the adder adds the product to zero. In
the other cycles it adds the product to the accumulator.

**Output.** After tap 3 the sum is reduced to 8 bits: bits 30..23, which
is the result in sample units with the 23 fraction bits cut off. If bits
31..30 show the value does not fit, the output is clamped to +127 or −128
and `ovf` is raised. `ovf` is also raised when the 32-bit accumulation itself overflowed.

## Coefficients and normalization

The taps are the closed-form Daubechies-4 values:

    h = ((1+√3), (3+√3), (3−√3), (1−√3)) / (4√2)
    g(k) = (−1)^k · h(3−k)

A DC input of full amplitude would grow by √2 per analysis stage. The
analysis taps are therefore divided by Σh = √2, so the third-stage low-pass
output just reaches full scale. The synthesis taps are multiplied by √2 to
undo this. Both sets are `round(2²³ · value)` constants in `dwt_pkg`. The
reference package recomputes them from the formula with real arithmetic,
and the analysis testbench compares the two.

The cores take the coefficient sets as parameters (`HC`/`GC`, `EVEN_C`/`ODD_C`).
This makes the other two scalings of the source design possible:
dividing the input by 4, or the coefficients by 2. It also allows
shortened coefficients (zeros in the low bits).

### Measured quality of the scalings

The table shows a full-scale sinusoid with a period of 64 samples
(512 samples), sent through analysis and synthesis. SNR is measured at the
best alignment, 33 samples, with every result bit-exact against the
reference equations:

| configuration | SNR |
|---|---|
| plain taps, input divided by 4, output multiplied by 4 | 19.4 dB |
| analysis taps / 2, synthesis taps * 2 | 22.9 dB |
| analysis taps / sqrt2, synthesis taps * sqrt2 (default) | 28.4 dB |
| default scaling, 17-bit coefficient words | 28.4 dB |
| default scaling, 9-bit coefficient words | 28.0 dB |

The ranking matches the source design, and the shorter words cost almost
nothing here too. The absolute values are lower than the source's 38, 42
and 45 dB, for the reason given under "Accuracy".

## 2-D image processing (`dwt2d_image`)

**Storage.**

* The image memory holds COLS x ROWS bytes, row-major, address
  `row*COLS + column`.
* The line buffer holds max(COLS, ROWS) bytes.
* Both dimensions must be multiples of 8.

Bytes are kept in offset binary (value + 128) for pixels and coefficients
alike. The MSB is inverted on the way into and out of the cores.

**Per line.** A job is started with `img_start`, with `img_inverse`
selecting synthesis instead of analysis. Every row is processed, then every
column, in three steps:

1. **LOAD.** Copy the line into the buffer, one byte per clock.
2. **CLR.** Hold the cores in reset for one clock, so each line starts with
   zero history.
3. **RUN.** Stream the line through the core, writing results straight
   back into the same line of the memory.

**Sub-band layout.** For a line of n values the analysis layout is
`v[0..n/8) | u[n/8..n/4) | r[n/4..n/2) | o[n/2..n)`. After both passes the
image holds the 4 x 4 grid of sub-band areas, with the smallest low-pass
block in the upper-left corner. The synthesis reads the same positions back
to rebuild the interleaved stream. It feeds zeros at the end of the line
and keeps outputs 33 periods later.

**Cost.** One 640 x 480 job takes about 3.1 M clocks (analysis) or 3.2 M
clocks (synthesis).

**Host port.** While idle, `img_we`/`img_addr`/`img_wdata` write the
memory, and `img_rdata` returns the byte at the previous clock's
`img_addr`.

## Top-level interface and timing (`dwt_codec_top`)

| port | dir | meaning |
|---|---|---|
| `clk`, `rst_n` | in | multiply-rate clock; asynchronous active-low reset |
| `pixel_in[7:0]` | in | unsigned pixel, held for one sample period (4 clocks) |
| `coef_out[7:0]`, `coef_band` | out | coefficient of the current period and its sub-band |
| `phase[2:0]`, `smp_end` | out | period number mod 8 (0 after reset); last clock of each period |
| `pixel_out[7:0]` | out | reconstructed pixel; in period n it is synthesis result n−12 |
| `ovf_a`, `ovf_s` | out | a clamped or overflowed result in the analysis or synthesis core |
| `img_start`, `img_inverse` | in | start a 2-D analysis (0) or synthesis (1) of the stored image |
| `img_busy`, `img_done` | out | job running; one-clock pulse at the end |
| `img_we`, `img_addr`, `img_wdata`, `img_rdata` | in/out | image memory host port |

Parameters are `COLS` = 640 and `ROWS` = 480.

An assertion checks that the two cores' controllers stay in step.

## Departures from the source design

* **Clocking.** The source uses two clocks: a filter clock, and a sample
  clock four times slower. Here a single clock and a `smp_end` enable
  replace them. The counter in `dwt_ctrl_a` and `dwt_ctrl_s` produces the
  tap select (low 2 bits) and the phase (high 3 bits).
* **Synthesis coefficient pairing.** The source's descriptions disagree on
  which PE applies (g3, g1, h3, h1) and which (g2, g0, h2, h0). This design
  uses the pairing that returns the samples in time order. The other
  pairing swaps neighbouring output samples.
* **Own choices.** The output clamping and the `ovf` rule, the handling
  of the most negative operands, the `band` output, and the zero-history
  reset per image line.
* **Image unit.** In the source the image processing exists as a test
  setup around the 1-D modules. Here it is a hardware sequencer with a
  host port.
* **Not built.** Colour images (three memories), and narrower coefficient
  word widths as a build option.

## Files

| file | contents |
|---|---|
| `rtl/dwt_pkg.sv` | widths, types, coefficient sets, select structs, band decode |
| `rtl/mult_element.sv`, `rtl/radix2_mult.sv` | array multiplier |
| `rtl/cs_adder.sv` | carry-select adder |
| `rtl/fpe.sv` | processing element |
| `rtl/dwt_ctrl_a.sv`, `rtl/dwt_ctrl_s.sv` | phase counters and select decoders |
| `rtl/dwt_analysis.sv`, `rtl/dwt_synthesis.sv` | folded 1-D cores |
| `rtl/dwt2d_image.sv` | image memory and row/column sequencer |
| `rtl/dwt_codec_top.sv` | top level |
| `tb/dwt_ref_pkg.sv` | reference model written from the filter equations (not from the RTL structure) |
| `tb/tb_*.sv` | one self-checking testbench per module |

## Simulating

Each testbench prints `TB_RESULT checks=<n> failures=<n>` and stops itself.
Example, for the top level:

```
verilator --binary --timing --assert -y rtl -Itb --top-module tb_dwt_codec_top \
    rtl/dwt_pkg.sv tb/dwt_ref_pkg.sv tb/tb_dwt_codec_top.sv -o sim
./obj_dir/sim
```

Replace the top module and testbench file for the others. What the
testbenches cover:

* **Arithmetic units.** Exhaustive or random comparison against integer
  arithmetic.
* **Controllers.** Every select against the phase.
* **1-D cores.** Every output against the equations, for ramps, sinusoids,
  random data and full-scale steps, which force clamping.
* **`tb_dwt2d_image`.** A 40 x 24 image through both passes, bit-exact.
* **`tb_dwt_workloads`.** The five coefficient configurations above, each
  on its own pair of cores, with the constants re-checked against the
  formula.
* **`tb_dwt_codec_top`** (default parameters).
  * A 2048-sample stream through both cores.
  * A full 640 x 480 image through 2-D analysis and synthesis, compared
    byte by byte.
  * Counts of each mechanism: sub-bands, register feedback paths, clamping,
    −128 operands, negative products, per-line restarts, sub-band
    write-backs.
  * It takes about half a minute.
