# Adaptive cubic convolution scan converter (VGA to 720p)

This RTL scales a 640x480 RGB video frame up to 1280x720, which takes a
factor of 2 horizontally and 1.5 vertically. Plain cubic convolution blurs
edges and makes them ring. Here each output sample is computed with a cubic
kernel whose two outer weights are retuned for every sample from the local
slopes. Where one side of the sample is much steeper than the other, the
kernel is skewed towards the steep side. This is *adaptive cubic
convolution* (ACC). The same 4-tap ACC filter runs once along each line and
then once down each column of the scaled lines. A four-line store sits
between the two passes.

The design follows a published FPGA scan converter: an ACC filter built
from three subtractors, three multipliers and a summation, a horizontal
scaler, a 16 kB line memory, a vertical scaler, a control block and a
clock synthesizer. Its arithmetic, handshakes, memory schedule and edge
handling are this implementation's own. The sections below say where.

## The ACC filter (`acc_kernel`)

Take four neighbouring samples of one colour channel, `f[k-1], f[k],
f[k+1], f[k+2]`, and a point at fraction `s` (0 <= s < 1) between `f[k]`
and `f[k+1]`. The filter computes

    y = a1*(f[k-1] - f[k+1])*A(s) + a2*(f[k] - f[k+2])*B(s)
      +    (f[k]   - f[k+1])*C(s) + f[k]

    A(s) = s^3 - 2s^2 + s      B(s) = s^3 - s^2      C(s) = 2s^3 - 3s^2

With `a1 = a2 = -1/2` this is the usual cubic convolution (Catmull-Rom).
The adaptation compares the slope on the left with the slope on the right:

    D = |f[k+1] - f[k-1]| - |f[k+2] - f[k]|

| condition          | a1            | a2            | `mode` |
|--------------------|---------------|---------------|--------|
| D >  A_LEVEL       | -1/2 - D/256  |  1/2 + D/256  | 1      |
| D < -A_LEVEL       |  1/2 + D/256  | -1/2 - D/256  | 2      |
| otherwise          | -1/2          | -1/2          | 0      |

The hardware is two pipeline stages, one sample per clock:

1. The three differences, the two absolute slopes, `D`, the alphas, and
   the basis values `A(s), B(s), C(s)` for the phase.
2. Three products, their sum, rounding, the addition of `f[k]`, and a
   clamp to 0..255.

Choices made here:

- **Scale of D.** D is a pixel difference (up to +-255), and the rule adds
  it straight to alphas of about 1/2. It is used as D/256, so the alphas
  stay within +-1.5. `ADAPT_SHIFT` shifts D further right.
- **Threshold.** `A_LEVEL` = 32 grey levels. The published rule has a
  threshold but gives no value for it.
- **Third coefficient.** The weight of the `C(s)` term is 1. That is the
  only value for which `y = f[k+1]` at `s = 1`, so the kernel still passes
  through the samples.
- **Number formats.** `s` is Q0.8. The basis is evaluated exactly and
  floored to Q.10. The alphas are Q.8. The sum is Q.18, rounded half up.
  The output is clamped, because the cubic overshoots at sharp edges.
  The formats are in `scan_pkg`.

Latency is 2 clocks. `out_mode` reports which row of the table produced
each pixel.

## Horizontal pass (`h_scaler`)

The four taps are a shift register of RGB pixels. Each input pixel is
shifted in at the `f[k+2]` end, and three `acc_kernel`s (R, G, B) read the
register. Output pixel `i` sits at input position `i*W_IN/W_OUT`. A DDA
with an exact remainder gives `k` and the remainder. The remainder becomes
`s` through a multiply by the constant `ceil(2^32/W_OUT)` followed by a
shift of 24, which equals `floor(rem*256/W_OUT)` exactly for line lengths
up to 2048.

The published description mentions shifting the data LSB first, i.e. a
bit-serial FIR. Here whole 8-bit pixels move one tap per input pixel,
which keeps one output per enabled clock.

At 2x, each window gives two outputs (s = 0 and s = 1/2) before the next
pixel is shifted in. At the line edges, taps outside the line repeat the
edge pixel. At the left edge the register is preloaded with pixel 0; at
the right edge the last pixel is shifted in again.

The scaler advances only on its enable, the 50 MHz rate (2 clocks of 3). It
takes input pixels on the 25 MHz enable. The last output of a window waits
for the next input pixel, so the steady rate is exactly 2 outputs per 3
clocks: a line takes 1928 clocks, against 1920 ideal. A new line begins
only while `start_ok` from the control block is high.

## Line store and its schedule (`line_memory`, `scan_ctrl`)

This is the least obvious part of the design.

The store is four banks of 1280 RGB pixels (4 x 1280 x 3 bytes = 15 kB).
It has one write port, and one read address that reads the same column of
all four banks in one clock. Input line `n` of a frame is written to bank
`n mod 4`.

Output line `j` sits at input line position `j*480/720`, with integer part
`k` and phase `s` in {0, 2/3, 1/3}. Its vertical filter needs lines
`k-1 .. k+2`, clamped to the frame. The read of line `j` starts once line
`min(k+2, 479)` is completely written. It then runs at one column per
clock, with `tap_bank` naming the bank that holds each tap.

Four banks are exactly the four lines one output line needs, so there is
no spare bank. The control block reuses a bank while it is still being
read. Writing the next input line into the bank of line `k-1` may start as
soon as the read of the *last* output line that needs `k-1` has begun:

- The read started first.
- The read moves one column per clock.
- The writes come at most one per enabled clock of the horizontal scaler.

So the writes trail the read and never overtake it. This requires the read
enable to be on at least as often as the writes, which holds in the top,
where it is always on. Without this interleaving the store would need a
fifth bank.

Even so, four banks cannot hold the input at full rate. For every two
input lines (three output lines), the input waits about 1280 clocks for a
bank. A frame takes **1,239,336 clocks** instead of the 921,600 of
1280x720 pixels at one per clock. That is 16.5 ms at 75 MHz, about 60
frames/s of active video with no blanking. While no bank is free,
`vga_ready` is held low, so the source must tolerate back-pressure; a
real-time VGA source would need a small input buffer in front.

The next frame's input starts after the last output line of the current
frame has been read. Two assertions in `scan_ctrl` check the rules:

- No line is begun without a free bank.
- No read starts while its oldest line is gone or being overwritten.

This interleaving is how the "interlaced read/write" of the original
memory block is read here.

The published memory figure shows six states, in which one line bank is
written and one line is read per output line. That is the same 2:3 line
rate, but with one read line per state. This design reads four lines per
output line, as a 4-tap vertical filter needs.

## Vertical pass (`v_scaler`)

The vertical scaler takes the four banks, routes them onto the taps with
`tap_bank`, and runs the same three `acc_kernel`s. The control word is
delayed by one clock to meet the memory data. A pixel comes out 3 clocks
after its read request, one per clock, with `out_sof` on the first pixel
of a frame and `out_eol` on the last of each line.

## Rates (`clk_synth`)

There are three pixel rates: 25 MHz (VGA input), 50 MHz (horizontal
output, twice the input) and 75 MHz (720p output). Over two input lines
they balance exactly against three output lines. Instead of three clocks
made by a delay-cell synthesizer, everything runs on one 75 MHz clock with
three enables:

- `en75` on every clock.
- `en50` on two clocks of three.
- `en25` on one clock of three, always together with `en50`.

This avoids clock-domain crossings. The phase tuning of a real frequency
synthesizer is process-specific and is not modelled.

## Top level (`scan_converter`)

| port                | dir | width | meaning                                          |
|---------------------|-----|-------|--------------------------------------------------|
| `clk`, `rst_n`      | in  | 1     | 75 MHz clock, asynchronous active-low reset      |
| `vga_valid`         | in  | 1     | input pixel offered (raster order, no syncs)     |
| `vga_ready`         | out | 1     | pixel taken; at most once per 3 clocks           |
| `vga_pix`           | in  | 24    | `{r,g,b}`, 8 bits each                           |
| `out_valid`         | out | 1     | output pixel (no back-pressure)                  |
| `out_pix`           | out | 24    | 24-bit RGB output                                |
| `out_sof`/`out_eol` | out | 1     | first pixel of frame / last pixel of line        |
| `out_adapt`         | out | 6     | ACC case per channel of `out_pix` (vertical)     |
| `h_adapt_valid`, `h_adapt` | out | 1, 6 | ACC case of each horizontally scaled pixel |
| `lines_written`, `lines_read` | out | 9, 10 | progress through the frame          |

Parameters: `W_IN`, `H_IN`, `W_OUT`, `H_OUT` (640, 480, 1280, 720),
`A_LEVEL` (32) and `ADAPT_SHIFT` (0). The scalers support up-scaling only
(`W_IN <= W_OUT`, `H_IN <= H_OUT`). Lines must be at most 2048 pixels long
for the phase arithmetic to stay exact.

After generic synthesis the top is about 620 word-level cells, 630
flip-flop bits and 123 kbit of memory (the four line banks). Each of the
six kernels holds the five multiplications of its sum and those of its
basis polynomials. No FPGA mapping or timing has been done, so the original's figures (an
XC2V1000 device, about 825,000 equivalent gates, 75 MHz) have not been
checked against this RTL.

## Verification

Each block has a self-checking testbench in `tb/`. Each compares against
a reference model in `tb_ref_pkg`, which evaluates the basis in floating
point and the alphas from the rule, independently of the RTL's structure.

- `tb_acc_kernel`: hand-worked values (a flat line gives 100, a ramp
  midpoint gives 25), all three adaptation cases, clamping, `s = 0`, 20,000
  random samples, and the 2-clock latency.
- `tb_h_scaler`: nine 640-pixel lines under random enables and stalls,
  then at the nominal rates with a line-time check (at most 1932 clocks).
- `tb_line_memory`: all banks, read latency, rewrite behind a running read.
- `tb_scan_ctrl`: two full frames. A shadow of the banks checks that every
  tap of every read holds the right line.
- `tb_v_scaler`: random routing, phases and data, and the 3-clock latency.
- `tb_clk_synth`: enable counts and patterns.
- `tb_scan_converter`: two full 640x480 frames at default parameters,
  every output pixel exact. The frames contain sigmoid edges
  `255/(1+exp(-c*x))` with c = 3 and 4, sharp blocks and noise. The test
  also checks that each of these happened at least once:
  - input back-pressure
  - source gaps
  - all adaptation cases in both directions
  - clamping
  - reads over a bank being rewritten
  - the frame restart
  It also bounds the frame period.
- `tb_scan_psnr`: the quality experiment. A 512x512 synthetic picture is
  down-sampled to 256x256 and scaled back by 2 in both directions. It runs
  through two converters, one adaptive and one with `A_LEVEL = 255`, so
  that the adaptation never fires. Both outputs are checked exactly, and
  their PSNR is printed: 24.34 dB adaptive against 24.39 dB plain.

  With the D/256 scaling chosen here, the adaptation does not improve PSNR
  on this picture. The published gains (several dB on text images) were
  measured on images not available here and are not reproduced. If
  quality matters, `A_LEVEL` and `ADAPT_SHIFT` are the knobs to study.

Every testbench ends with a line `TB_RESULT checks=N failures=M`.

## Simulating

With Verilator 5, from the directory that holds `rtl/` and `tb/`:

    verilator --binary --timing --assert -Irtl -Itb \
        rtl/scan_pkg.sv tb/tb_ref_pkg.sv rtl/acc_kernel.sv rtl/h_scaler.sv \
        rtl/v_scaler.sv rtl/line_memory.sv rtl/scan_ctrl.sv rtl/clk_synth.sv \
        rtl/scan_converter.sv tb/tb_scan_converter.sv \
        --top-module tb_scan_converter -Mdir obj
    ./obj/Vtb_scan_converter

The full-size end-to-end run takes a few seconds. For another testbench,
swap the last file and the top module; a block's testbench needs only
`scan_pkg`, `tb_ref_pkg` and the block's own files.

## Files

- `rtl/scan_pkg.sv`: types (`rgb_t`, `taps_t`), number formats, the basis
  function and the phase reciprocal.
- `rtl/acc_kernel.sv`: one channel of the ACC filter.
- `rtl/h_scaler.sv`: horizontal pass.
- `rtl/v_scaler.sv`: vertical pass.
- `rtl/line_memory.sv`: four line banks.
- `rtl/scan_ctrl.sv`: bank and address control.
- `rtl/clk_synth.sv`: rate enables.
- `rtl/scan_converter.sv`: top level.
- `tb/`: one testbench per block, the end-to-end test, the quality test
  and the reference model.
