# Radix-3/6 split-radix FFT processor (12-point and 6-point)

A DFT whose length N is a multiple of 6 can be split unevenly. The samples
x(3n) form one sub-DFT of length N/3. The rest fall into four sub-DFTs of
length N/6: x(6n+c) for four offsets c. The four short sub-DFTs carry twiddle
factors that come in complex-conjugate pairs. Because of that, the outputs
X(k), X(k+N/3) and X(k+2N/3) share all their products and differ only by cube
roots of unity. Each such group of three outputs is therefore one small 3-point
FFT. This is the radix-3/6 split-radix FFT (SRFFT).

This RTL implements the decomposition as fixed, fully parallel, pipelined
datapaths:

* a **12-point** transform, the main datapath. Its results go to a 20x4
  character LCD, one page of four bins at a time, chosen by two switches;
* a **6-point** transform beside it, independent of it, with its own ports.

Both take one complete input vector per clock and deliver the result two
clocks later.

## The 12-point dataflow

With N = 12 the sub-DFTs are:

| sub-DFT | length | samples | twiddle on output k |
|---|---|---|---|
| A | 4 (split-radix) | x0, x3, x6, x9 | 1 |
| B | 2 | x7, x1 (x(6n+7)) | W^(7k) |
| C | 2 | x4, x10 (x(6n+4)) | W^(4k) = W3^k |
| E | 2 | x8, x2 (x(6n-4)) | W^(-4k) = W3^-k |
| F | 2 | x5, x11 (x(6n-7)) | W^(-7k) |

Here W = exp(-j2π/12). Then

    X(k) = A(k) + W^7k B(k) + W^4k C(k) + W^-4k E(k) + W^-7k F(k)

A repeats every 4 bins and B..F repeat every 2. Adding 4 to k multiplies the
B and C terms by W3 = exp(-j2π/3), and the E and F terms by W3^-1. For
k = 0..3, define

    P(k) = W^7k B(k mod 2) + W^4k C(k mod 2)
    Q(k) = W^-4k E(k mod 2) + W^-7k F(k mod 2)

Then X(k), X(k+4), X(k+8) form the 3-point DFT of (A(k), P(k), Q(k)).

The hardware follows this directly (`rtl/fft12.sv`):

1. **Stage 1:** one 4-point SRFFT (`srfft4`) and four 2-point butterflies (`fft2`).
   There are no multipliers in this stage.
2. **Stage 2:** sixteen twiddle rotations (`twiddle_rot`), two complex adds per
   k, and four 3-point FFTs (`fft3`), one per k. Then the results are rounded
   to the output format.

The twiddle exponents of the sixteen rotations are:

| k | B | C | E | F |
|---|---|---|---|---|
| 0 | 0 | 0 | 0 | 0 |
| 1 | 7 | 4 | 8 | 5 |
| 2 | 2 | 8 | 4 | 10 |
| 3 | 9 (= j) | 0 | 0 | 3 (= -j) |

At k = 0 and k = 3 every factor is 1, j or -j, so those rotations are only
swaps and negations. Only k = 1 and k = 2 need real multiplications: eight
general rotations in all. The FFT outputs come out in natural order:
X(k) = `X[k]`.

### Where the multiplications are

Every non-trivial twiddle of a 12-point (or 6-point) transform has
|cos|, |sin| ∈ {1/2, sin 60°}. `twiddle_rot` computes (a+jb)(c−js) with these
constants:

* multiplication by 1/2 is an arithmetic right shift;
* multiplication by sin 60° is a constant multiplier with coefficient
  14189/2^14, rounded to nearest.

A general rotation therefore costs two constant multipliers and two adders.

The 3-point FFT (`fft3`) works the same way:

* Y0 = a0 + s, with s = a1 + a2;
* the −1/2 of Re(W3) is a shift applied to s;
* sin 60° is applied to d = a1 − a2;
* Y1,2 = (a0 − s/2) ∓ j·sin60·d.

The 4-point SRFFT and the 2-point butterflies use no multipliers.

## The 6-point dataflow

For N = 6 the same split leaves a 2-point sub-DFT of x0, x3 and four single
samples. Grouped by output parity this gives:

    X0, X2, X4 = FFT3( x0+x3,  x1+x4,          x2+x5          )
    X1, X3, X5 = FFT3( x0−x3,  W6·(x1−x4),     W6²·(x2−x5)    )

The hardware (`rtl/fft6.sv`) has three butterflies in stage 1. Stage 2 has two
rotations (W6 = W^2 and W6² = W^4 in the twelfth-root notation) and two 3-point
FFTs.

## Number format and accuracy

The widths are set in `rtl/fft36_pkg.sv`.

| quantity | format |
|---|---|
| input sample, each part | `IN_W` = 3-bit signed integer (−4..3) |
| datapath value, each part | 20-bit signed, 10 fraction bits |
| constant coefficients | 14 fraction bits |
| output bin, each part | `OUT_W` = 8-bit signed integer, rounded to nearest (halves up) |

The output width is set by the display: each row shows the real and imaginary
parts as 8 binary digits each. The input width is this design's choice. With
3-bit inputs, no 12-point result exceeds 12·4·√2 ≈ 68 in either part, so the
8-bit outputs never overflow and no saturation logic exists.

If you widen `IN_W`, keep the inequality 12·2^(IN_W−1)·√2 < 2^(OUT_W−1)
true, or add saturation. The 20-bit datapath has headroom up to about ±512.

Each output is within 0.5 of the exact DFT value, plus a few 2^−10 of
fixed-point error. When the exact value lies on a half, rounding can go
either way.

## Pipeline timing

Both transforms have the same timing:

* **Input:** present the vector with `in_valid` high for one rising edge.
  Stage 1 registers are written on that edge.
* **Output:** on the next edge stage 2 is registered, and `out_valid` is high
  for the following cycle. Latency is 2 clocks. Vectors may arrive on every
  clock.
* **Holding:** both register stages load only when they have new data. `X`
  keeps the last result until the next one arrives, and the display relies on
  that.
* **Flow control:** there is no backpressure.
* **Reset:** `rst_n` is asynchronous and active low. It clears all pipeline
  registers.

## Display path

`lcd_page` selects four bins with the switches:

| s0 | s1 | rows shown |
|---|---|---|
| 0 | 0 | A–D = X0–X3 |
| 0 | 1 | E–H = X4–X7 |
| 1 | 1 | I–L = X8–X11 |
| 1 | 0 | A–D (this combination is undefined in the original design; the first page is this design's choice) |

Each row is exactly 20 characters, for example `Jr00001100Ji11111111`:

* letter, `r`, the real part as 8 binary digits (two's complement, MSB first);
* letter, `i`, the imaginary part as 8 binary digits.

`lcd_ctrl` drives an HD44780-compatible controller through its 8-bit bus. It
only writes; R/W is held at 0, and it uses fixed waits instead of polling the
busy flag.

* **Initialisation:** after a 15 ms power-up wait it sends 0x38, 0x0C, 0x06
  and 0x01.
* **Refresh loop:** for each row it sends a set-address command (row
  addresses 0x00, 0x40, 0x14, 0x54) and then the 20 characters. After row 3
  it pulses `frame_done` and starts again at row 0. The display therefore
  follows new results and switch changes within one refresh.

Timing at the default 50 MHz clock (`CLK_HZ`):

| item | value |
|---|---|
| RS/DB set before E rises | 2 clocks |
| E high | 12 clocks |
| wait after each write | 40 µs |
| wait after clear | 1.64 ms |
| one write | 2015 clocks |
| one refresh | 84 writes, about 169,000 clocks (3.4 ms) |

The controller, its command sequence and its timings are not taken from the
original design, which only says that the results appear on a 20x4 LCD. They
are standard HD44780 data-sheet values. Change `CLK_HZ` and the `T_*_US`
parameters to match your board and panel.

## How far this follows the original design, and where it departs

These parts follow the original design:

* the radix-3/6 decomposition and its index sets;
* the twelve-point flow graph: a 4-point SRFFT on x(3n), 2-point FFTs on
  (x7,x1), (x4,x10), (x8,x2) and (x5,x11), then four 3-point FFTs;
* the six-point flow graph;
* the shift for the factor 1/2;
* the page selection by S0/S1 and the row format of the display.

These are this design's own choices:

* **Twiddles:** the general twiddles of k = 1 and k = 2 (12-point) and W6,
  W6² (6-point) are built. The original flow graphs draw only the trivial
  factors (−1, ±j), but a correct DFT needs all of them. Both testbenches
  check every bin against a direct DFT.
* **Pipeline depth:** two register stages, one transform per clock. The
  original design is described as pipelined, without a stage count.
* **Widths:** 3-bit inputs, the 20-bit internal format and rounding.
* **Interface:** the valid signals and the asynchronous reset.
* **Inputs as ports:** the original FPGA build had its input vector fixed in
  the design.
* **Switch setting s0=1, s1=0:** shows the first page.
* **LCD controller:** all of it (see above). Only one display is driven. The
  original setup mentions two 20x4 displays but describes the contents of
  only one four-row page.

Not built:

* the FPGA board and the LCD panel themselves;
* transforms of other lengths. The decomposition extends recursively to any
  multiple of 6, for example 36 = one 12-point plus four 6-point sub-DFTs,
  but only the fixed 6- and 12-point datapaths exist here.

## Files

| file | contents |
|---|---|
| `rtl/fft36_pkg.sv` | widths, complex types, shift/constant-multiply/rounding helpers |
| `rtl/fft2.sv` | 2-point butterfly |
| `rtl/fft3.sv` | 3-point FFT |
| `rtl/srfft4.sv` | 4-point split-radix FFT |
| `rtl/twiddle_rot.sv` | constant rotation by W12^K |
| `rtl/fft6.sv` | 6-point radix-3/6 FFT, 2-stage pipeline |
| `rtl/fft12.sv` | 12-point radix-3/6 FFT, 2-stage pipeline |
| `rtl/lcd_page.sv` | switch page selection and row text |
| `rtl/lcd_ctrl.sv` | HD44780 20x4 LCD writer |
| `rtl/srfft_top.sv` | top: fft12 + display path, fft6 alongside |
| `tb/fft_ref_pkg.sv` | reference DFT in double-precision reals |
| `tb/lcd_model.sv` | behavioural 20x4 LCD with bus timing checks |
| `tb/tb_*.sv` | one self-checking testbench per module |

## Simulating

Every testbench prints `TB_RESULT checks=N failures=M` and stops itself. Each
has a watchdog. With Verilator 5:

    verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb \
        rtl/fft36_pkg.sv tb/fft_ref_pkg.sv tb/tb_fft12.sv --top-module tb_fft12
    ./obj_dir/Vtb_fft12

Replace `tb_fft12` with any other testbench. `tb_srfft_top` runs the whole
design at its default parameters, including the 50 MHz LCD timing:

* about 2.5 million clocks, a couple of seconds;
* 12- and 6-point transforms, single and back to back, checked against the
  reference DFT;
* all four switch settings, each checked against the characters on the LCD
  model;
* a counter for each of these events, and a failure for any that never
  occurred.

## Verification status

Every module has a self-checking testbench:

* **Arithmetic blocks:** checked against independent arithmetic, either exact
  integers or double-precision reals with a stated tolerance.
* **Pipelined transforms:** latency, back-to-back throughput and output
  holding are also checked.
* **LCD writer:** checked through the display model, including bus timing and
  the refresh cycle count.

Each testbench was also run against a copy of its module with one deliberate
error, such as a wrong twiddle sign, swapped switches or a wrong row address,
and it reported the failures.

No part of the design has been run on an FPGA or timed for one.
