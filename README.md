# Multiplier-free Sobel edge detector

This is a small FPGA-oriented Sobel edge detector. It takes one 3x3 window of
8-bit grey pixels at a time and decides whether the window's centre pixel lies
on an edge, writing 255 for an edge and 0 otherwise. The Sobel kernel weights
are only 0, ±1 and ±2, so no multiplier is needed. Each gradient is three
pixel differences, one of them shifted left by one bit, summed. The gradient
magnitude is approximated by |gx| + |gy| instead of sqrt(gx² + gy²), and the
result is compared with a fixed threshold. The design has one register stage
and no memory. It accepts a new window every clock.

## Data path

```
 im11..im33 ──► window register ──► p0..p8 ─┬─► gx unit ──► |gx| ─┐
 (8 bit x 9)    (transpose,                 │                     ├─► sum ──► sum > THRESHOLD ? 255 : 0 ──► dxy
                 load on start)             └─► gy unit ──► |gy| ─┘   (11 bit)                               (8 bit)
```

| Stage | Module | What it computes |
|---|---|---|
| window register | `sobel_window_align` | `p[3c+r] = im[3r+c]`, loaded while `start` is high |
| gradient x | `sobel_gx` | `gx = (p2-p0) + ((p5-p3)<<1) + (p8-p6)` |
| gradient y | `sobel_gy` | `gy = (p0-p6) + ((p1-p7)<<1) + (p2-p8)` |
| absolute value (x2) | `sobel_abs` | two's complement of the input if its MSB is 1, else the input unchanged |
| compressor | `sobel_sum` | `sum = |gx| + |gy|` |
| comparator | `sobel_threshold` | `dxy = (sum > threshold) ? 255 : 0` |
| top | `sobel_edge_detector` | wires the stages; `THRESHOLD` parameter |

Shared types are in `sobel_pkg`: `pixel_t` (8 bits), `grad_t` (11 bits
signed), `mag_t` (11 bits unsigned) and `window_t`, which is nine pixels packed
as p0..p8.

### Pixel order and the two kernels

The ports are named `im<row><column>`. The window register stores them
transposed, so p0 = im11, p1 = im21, p2 = im31, p3 = im12, and so on. In terms
of the input window, then:

* `gx` is the mask `-1 -2 -1 / 0 0 0 / 1 2 1`, which responds to intensity
  changes between the top and bottom rows;
* `gy` is the mask `1 0 -1 / 2 0 -2 / 1 0 -1`, which responds to changes
  between the left and right columns.

The two Sobel masks are transposes of each other, so transposing the window
only swaps the roles of gx and gy, and it may flip a sign. |gx| + |gy|, and
therefore `dxy`, is the usual Sobel result for the window in its natural
orientation. Neither gradient reads the centre pixel p4, so synthesis removes
its 8 register bits.

### Widths

The largest gradient is 4 × 255 = 1020, which fits in 11 signed bits. The
largest sum is 2040, which fits in 11 unsigned bits. Nothing can overflow:
negating a gradient never meets −1024, and the sum never carries out.
`sobel_gx` and `sobel_gy` include immediate assertions that the gradient stays
within ±1020.

## Interface and timing

| Port | Dir | Width | Meaning |
|---|---|---|---|
| `clk` | in | 1 | clock |
| `rst_n` | in | 1 | asynchronous reset, active low |
| `start` | in | 1 | load enable for the window register |
| `im11` … `im33` | in | 8 each | the 3x3 window, row by row |
| `dxy` | out | 8 | 255 = edge, 0 = no edge |

* On a rising clock edge with `start` high, the window is loaded. `dxy`
  settles to that window's result during the next clock cycle. The latency is
  one clock and the rate is one window per clock.
* While `start` is low, the register and `dxy` hold their values.
* While `rst_n` is low, the window is all zero and `dxy` is 0.
* After the register, the path to `dxy` is purely combinational: two adder
  levels for each gradient, a negation, the sum and a compare. To cut the
  critical path, add a register after `sum` (this adds one clock of latency).

To process a whole image, the environment must supply the windows. The design
has no line buffers. For a W×H image, W·H windows take W·H clocks plus one.

## Parameter

| Parameter | Default | Meaning |
|---|---|---|
| `THRESHOLD` | 300 | `dxy` is 255 when `|gx|+|gy|` is strictly greater than this |

The published description of the detector gives no numeric threshold. It
does give example windows, and these bound the threshold:

* The sums 524 and 596 must give 255.
* The window c1 24 a1 af 15 ce 5a 05 53 has a sum of 266 and must give 0.

300 is one value in the resulting range, 266 to 523. Change `THRESHOLD` to
trade missed edges against noise.

## Where this RTL follows the published design and where it chooses

Taken from the published design:

* the gradient expressions;
* the MSB-controlled absolute value;
* the sum of the magnitudes;
* the threshold compare with a 0/255 output;
* the 8-bit pixels and output, and the 11-bit gradients and sum;
* the port names `im11`…`im33`, `start` and `dxy`;
* the transposed pixel order and the one-register timing, both as seen in the
  design's simulation traces.

This implementation's own choices:

* **Threshold value**: 300, see above.
* **Reset**: active low and asynchronous (`rst_n`), and it clears the window.
  The written description speaks of running with the reset "low", while the
  published traces show reset at 1 during normal operation. This RTL follows
  the traces.
* **`start`**: the published design only names it as a global control signal.
  Here it is the register's load enable.
* **Threshold source**: the published flow shows a separate threshold input
  to the comparator. Here it is a parameter of the top, and `sobel_threshold`
  itself takes it as a port.

The surrounding software flow is not hardware and is not included. That flow
resizes the input image to 256×256, converts it to grey, writes the pixels as
hexadecimal text and turns the 0/255 output back into an image. The other edge
detectors the design was compared against (Roberts, Prewitt, Canny and a
multiplier-based Sobel) are not included either.

## Verification

Each module has a self-checking testbench in `tb/`. Each compares the module
against values computed independently, prints
`TB_RESULT checks=N failures=M` and has a watchdog.

| Testbench | What it checks |
|---|---|
| `tb_sobel_gx`, `tb_sobel_gy` | integer mask reference; the trace values gx = 0x14f/0x16b and gy = 0x0bd/0x0e9; ±1020; 5000 random windows |
| `tb_sobel_abs` | every value −1020…1020 |
| `tb_sobel_sum` | the trace sums 0x20c and 0x254, the maximum 2040, random pairs |
| `tb_sobel_threshold` | every sum 0…2040 against four thresholds, including equality |
| `tb_sobel_window_align` | transpose on the trace window, one-clock latency, hold, asynchronous reset |
| `tb_sobel_edge_detector` | end to end at the default threshold: trace windows, sums exactly at and just above the threshold, 20000 random windows mixed with `start`-low holds and mid-stream resets. It counts edges, non-edges, negative gx, negative gy, holds, resets and threshold hits, and fails if any count is zero. |
| `tb_sobel_image` | a generated 256×256 image (ramp, disc, rectangle, diagonal line, noise) with borders replicated. All 65536 output pixels are checked, and so is the clock count of 65536. Runs at the default parameters. |

The end-to-end references use the textbook Sobel masks in row-major order.
They do not use the RTL's transposed expressions.

Running one test with Verilator:

```
verilator --binary --timing --assert -Irtl -Itb --top-module tb_sobel_image \
    rtl/sobel_pkg.sv tb/tb_sobel_image.sv
./obj_dir/Vtb_sobel_image
```

Verilator finds the other modules through `-Irtl`. Each test takes well under
a second.

Lint with `verilator --lint-only -Wall` reports only expected notices:

* unused package constants;
* the unread pixels of the zero-weight kernel row or column in `sobel_gx` and
  `sobel_gy`.
