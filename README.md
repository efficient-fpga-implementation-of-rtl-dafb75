# Human detection by background subtraction: streaming FPGA pipeline

This design finds moving people (or any object) in a video. It compares each
frame with a fixed background image of the scene and keeps what differs.
Frame and background go through the same clean-up path: grey conversion, a
cheap 3x3 median filter and a Haar wavelet step that keeps only the
low-frequency quarter (LL band). The two LL images are subtracted. A
threshold that adapts to each frame removes the remaining small
differences. The result is inverted so the object shows dark on a white
background, and a last median filter removes isolated specks.

The arithmetic is spelled out as hardware rather than left to operators:
- every adder is a carry look-ahead adder;
- the squarer in the threshold unit is an 8x8 Vedic (Urdhva-Tiryagbhyam)
  multiplier built from 4x4 and 2x2 Vedic cells;
- the subtractor is an inverter plus two look-ahead adders.

Pixels are 8-bit grey levels. The frame is 256 x 256 after pre-processing,
and the detection image is 128 x 128.

## Data flow

```
frame_in (RGB) -> preprocess -> median_filter -> haar_dwt_2d_ll --LL--+
                        |                                           |
                        +--> adaptive_threshold (WMSE)              v
                        |            |                         bg_subtract |fg-bg|
bg_in (RGB)    -> preprocess -> median_filter -> haar_dwt_2d_ll --LL--^     |
                                                                            v
                       thr = WMSE + thr_offset  ------------------>  thresholding
                                                                            |
                                                                   negative_transform (255-x)
                                                                            |
                                                      median_filter (128x128) -> det_*
hd_controller: input/output pixel counts, coordinates, end of frame, busy
```

The two input paths get identical control and run in lock step. Assertions
in `hd_top` check this.

## The parts that need explaining

### Haar LL band with one 1D unit (`haar_dwt_2d_ll`)

The separable 2D Haar low band of a 2x2 block is
`LL = ((a+b)/2 + (c+d)/2) / 2`. Each halving rounds down.

The unit computes this with one 1D stage, `haar_dwt_1d`, which holds a
sample in a flip-flop, adds the next one with a look-ahead adder and shifts
the sum right by one bit. That stage is used twice:

1. **Row pass.** The input multiplexer feeds incoming pixels to the 1D
   stage. Each L result is written to `dwt_memory`: a 32768 x 8 simple
   dual-port RAM that holds the 128 x 256 row-transformed image.
2. **Column pass.** The controller reads the stored image back in the order
   `L(2i,j), L(2i+1,j)` for each LL position in raster order. The
   multiplexer now feeds memory data to the same 1D stage, and the
   demultiplexer sends its results to the LL output.

The column pass takes `(IMG_W/2)*IMG_H + 2` clocks. That is 32770 clocks at
the default size. During it `in_ready` is low, so the median filters and the
pre-processing upstream fill up and stall the frame source. `frame_done`
pulses with the last LL sample.

### Modified median filter (`median_filter`, `window_3x3`)

`window_3x3` is a tapped delay line. Three registers per image row give taps
a0..a8. Two shift registers of `IMG_W-3` stages make each row of taps exactly
one image row older than the one before.

The filter does not sort nine values. It takes the median of each row of
three, then the median of those three row medians. This is an approximation
of the true 3x3 median, and it is much cheaper.

The window centre lags the newest pixel by `IMG_W+1` samples. After the last
pixel of a frame, the filter therefore shifts `IMG_W+2` more times on its own
(the flush) and takes no input meanwhile. Pixels on the outermost row and
column pass through unchanged. Output is in raster order, one pixel per input
pixel, behind a valid/ready output register.

### Adaptive threshold (`adaptive_threshold`)

The threshold for a frame is its weighted mean squared error against the
background:

```
WMSE = sum over all N*M pixels of (Pa - Pb)^2 / (8*N*M)
```

At 256 x 256, `8*N*M = 2^19`, so the division is a 19-bit right shift.

The datapath has four stages:
- a look-ahead subtractor forms |Pa - Pb|;
- the Vedic multiplier squares it;
- a 32-bit look-ahead accumulator sums the squares;
- a pixel counter loads the shifted sum into the output register at the
  frame's last pixel.

The WMSE is computed from the full-size pre-processed frames, not from the
LL images. Because it is registered at the end of the frame's input, it is
always ready before that frame's first LL sample reaches the comparator.

A final look-ahead adder adds a second input to WMSE. At the top level this
input is the port `thr_offset`: a constant bias on the threshold, where 0
gives the plain WMSE.

### Thresholding and negative (`thresholding`, `negative_transform`)

`out = (|fg-bg| > thr) ? |fg-bg| : 0`, followed by `255 - x`. Unchanged
background therefore becomes white (255). Detected pixels become
`255 - difference`, so stronger differences show darker.

### Arithmetic cells

- **`cla4` / `cla_adder`.** Each bit has propagate `p = a^b` and generate
  `g = a&b`. The carries inside a 4-bit group are expanded in parallel, and
  `s = p ^ c`. Groups are chained through the group signals:
  `c_next = GG | PG & c`. A width that is not a multiple of 4 is padded.
- **`vedic_mult2/4/8`.** An NxN multiplier uses four (N/2)x(N/2)
  multipliers, giving the products `q3=aH*bH`, `q2=aH*bL`, `q1=aL*bH` and
  `q0=aL*bL`, and three adders:
  - `(q3<<N/2) + q2`;
  - `q1 + (q0>>N/2)`;
  - the sum of those two, which gives product bits `[2N-1:N/2]`.

  The low N/2 product bits come straight from q0.
- **`bg_subtract`.** The background pixel is inverted, and a look-ahead adder
  adds 1 to it. A second adder adds the foreground pixel, on 9 bits so the
  sign is kept. A negative result is negated by invert-and-add-one.

### Pre-processing (`preprocess`) and controller (`hd_controller`)

Grey conversion is `Y = (77R + 150G + 29B) >> 8`, the BT.601 weights.

The resize to 256 x 256 is nearest-neighbour decimation from a
`SRC_W x SRC_H` source. Source column x is kept when
`floor((x+1)*256/SRC_W) > floor(x*256/SRC_W)`, and rows likewise. This is
tracked with running remainders, so no divider is needed. By default the
source is already 256 x 256 and every pixel is kept. Upscaling is not
supported.

`hd_controller` counts pixels in and out. From those counts it produces the
detection coordinates `det_x/det_y`, `det_last`, `frame_count` and `busy`.

## Interface and timing of `hd_top`

| port | dir | meaning |
|---|---|---|
| `clk`, `rst_n` | in | single clock; asynchronous active-low reset |
| `in_valid`, `in_ready` | in/out | a transfer takes one `frame_in` and one `bg_in` pixel |
| `frame_in`, `bg_in` | in | `hd_pkg::rgb_t` {r,g,b}, 8 bits each, raster order |
| `thr_offset` | in | bias added to WMSE to form the threshold |
| `det_valid`, `det_pix` | out | detection image pixel, raster order, no back pressure |
| `det_x`, `det_y`, `det_last` | out | its coordinates; last pixel of a frame |
| `wmse` | out | WMSE of the most recent frame |
| `frame_count`, `busy` | out | frames completed; a frame is in flight |

Parameters: `SRC_W`, `SRC_H` (source size, default 256) and `IMG_W`,
`IMG_H` (processing size, default 256; must be even). The detection image is
`IMG_W/2 x IMG_H/2`.

A frame costs about `IMG_W*IMG_H + IMG_W + (IMG_W/2)*IMG_H + IMG_W/2`
clocks: input, median flush, column pass and output flush. At the defaults
that is about 98,700 clocks. A 100 MHz clock would therefore give about
1000 frames/s. That figure is an estimate: the design has not been through
FPGA timing. The next frame's input overlaps the current frame's output
flush. The frame source must be able to wait while `in_ready` is low.

## Where this design departs from the method it implements, or fills gaps

- **Median.** Each row uses a true median of three, and the result is the
  median of the row medians. Border pixels pass through unchanged, and each
  frame ends with a flush. Both of these are choices made here.
- **Threshold condition.** A pixel is kept when it is strictly greater than
  the threshold, and the kept value is the subtraction result.
- **Threshold bias.** The second operand of the threshold adder is
  exposed as `thr_offset`; what it should carry is not defined by the
  method.
- **Clocking.** The Haar unit's clock divider is replaced by valid strobes in
  one clock domain. Its "reset out" signal is the `frame_done` pulse.
- **Handshakes and reset.** Valid/ready handshakes, reset style, memory
  read latency and the column read order are choices made here.
- **Pre-processing.** The grey weights and the resize method are choices
  made here. The video-to-frame conversion is done outside this hardware.
- **Wide adders.** They are chains of 4-bit look-ahead groups. How wider
  adders are formed is a choice made here.
- **Not checked.** FPGA resource use (slices, LUTs) has not been compared
  with any reference numbers.

## Files

- `rtl/hd_pkg.sv`: pixel and RGB types, `med3` function.
- `rtl/hd_top.sv`: the pipeline.
- `rtl/preprocess.sv`, `window_3x3.sv`, `median_filter.sv`,
  `haar_dwt_1d.sv`, `dwt_memory.sv`, `haar_dwt_2d_ll.sv`,
  `bg_subtract.sv`, `adaptive_threshold.sv`, `thresholding.sv`,
  `negative_transform.sv`, `hd_controller.sv`: the blocks.
- `rtl/cla4.sv`, `cla_adder.sv`, `vedic_mult2.sv`, `vedic_mult4.sv`,
  `vedic_mult8.sv`: arithmetic cells.
- `tb/tb_<module>.sv`: one self-checking test bench per block.
- `tb/hd_top_check.sv`: the end-to-end bench body, used by
  `tb_hd_top` (40x36 source resized to 32x32, two frames, random input gaps)
  and `tb_hd_top_full` (default 256x256 size, two frames).

The end-to-end bench generates a background and frames with a moving dark
box plus salt-and-pepper noise. It computes the expected detection image
with an independent behavioural model of every stage, and compares every
output pixel, the coordinates, `det_last` and `wmse`. It also confirms that
each of these mechanisms occurred at least once:
- resize drop;
- input stall during a column pass;
- median flush;
- border pass-through;
- column pass;
- threshold keep and clear;
- WMSE update.

## Simulating

Every test bench prints `TB_RESULT checks=N failures=M` and stops. With
Verilator 5:

```
verilator --binary --timing --assert --top-module tb_hd_top \
  -y rtl -y tb +libext+.sv -Irtl rtl/hd_pkg.sv tb/tb_hd_top.sv -o sim
./obj_dir/sim
```

Replace `tb_hd_top` with any other bench, for example `tb_median_filter` or
`tb_hd_top_full`. The full-size bench runs in a few seconds. Lint a module
with:

```
verilator --lint-only -Wall -y rtl +libext+.sv rtl/hd_pkg.sv rtl/hd_top.sv
```

Verilator reports unused carry-out and unused-bit warnings. These stand on
purpose: no adder in the design can overflow at the widths used, so its
carry-out is left unconnected.
