# Fused 5x5 convolution and 2x2 max-pooling accelerator

Most of the work in a convolutional neural network is spent in its convolution
and pooling layers. Run in software, or as two separate hardware layers, the
convolution writes its whole output feature map to memory, and the pooling
layer reads it back. This accelerator removes that round trip. It targets one
fixed layer shape: a 64x64 input image, a 5x5 filter and 2x2 max pooling. It
uses three techniques:

1. **Unrolling.** All 25 multiplications of a filter window are done in
   parallel.
2. **Pipelining.** The multiply-add tree is split into register stages, so
   one new window can enter every clock.
3. **Layer fusion.** Each convolution result goes straight into the pooling
   logic. No convolution feature map is ever stored.

The image is streamed in once, one pixel per clock. The pooled 30x30 map
streams out, and one frame takes 64*64 + 4 clocks.

```
 pixels ──► window_buffer ──► conv_mac_array ──► max_pool_unit ──► pooled map
 (64x64)    4 line memories    25 multipliers     30-entry half-    (30x30)
            + 5x5 register     + 3-stage adder    row buffer
              window             tree
                                   ▲
 weights ──► kernel_regs ──────────┘
```

## Layer arithmetic

For an image `x`, filter `w` and stride 1 with no padding, the convolution is

    y[r][c] = sum_{i=0..4} sum_{j=0..4} x[r+i][c+j] * w[i][j]      0 <= r, c < 60

The pooled output takes the maximum over non-overlapping 2x2 groups:

    z[R][C] = max(y[2R][2C], y[2R][2C+1], y[2R+1][2C], y[2R+1][2C+1])   0 <= R, C < 30

Pixels and weights are 8-bit signed two's-complement numbers. The sum is
exact: `ACC_W = 8 + 8 + ceil(log2 25) = 21` bits. Nothing is rounded,
saturated or passed through an activation function. There is one input
channel and one filter.

## How the stream becomes windows (`window_buffer`)

This is the part that takes most care to follow. The pixel counters `row`
and `col` track the pixel that arrives next. Four line memories
(`lines[0..3]`, 64 entries each) hold the four image rows above the current
one, at the same column addresses:

- `lines[0]` holds the row just above the current one.
- `lines[3]` holds the row four above it.

When the pixel at column `c` is accepted, three things happen on the same
clock edge:

- A **window column** is formed from `lines[3][c], lines[2][c], lines[1][c],
  lines[0][c]` and the new pixel. These are the five pixels of column `c`,
  top row first. The column is shifted into the right side of a 5x5 register
  window, and the window's leftmost column drops out.
- Each line memory moves its column-`c` entry **down one line**
  (`lines[l][c] <= lines[l-1][c]`), and the new pixel is written to
  `lines[0][c]`. Every line memory therefore reads and writes one address per
  pixel.
- `win_valid` is set if `row >= 4` and `col >= 4`. A window is then complete.
  `win_row = row-4` and `win_col = col-4` give the window's top-left
  corner, which is also the coordinate of the convolution result it
  produces.

Pixels in the first four rows, and in the first four columns of any row,
complete no window. So 4096 pixels give 60x60 = 3600 windows. Windows of
different rows never mix: after the first four pixels of a row, all five
columns of the register window belong to the new row. The counters wrap at
the end of a frame, so the next frame can follow with no idle cycle. When
`in_valid` is low, the whole buffer freezes.

## Unrolled multiply-add pipeline (`conv_mac_array`)

The array has 25 signed 8x8 multipliers and three register stages:

| stage | registers                     | adders                      |
|-------|-------------------------------|-----------------------------|
| 1     | 25 products, 16 bit           | none                        |
| 2     | 5 row sums, 19 bit            | five 5-input sums           |
| 3     | 1 total, 21 bit               | one 5-input sum             |

The valid bit and a tag (the window's coordinates) go through a matching
3-stage shift register. The result therefore leaves with its coordinates
after exactly 3 clocks. A new window may enter every clock.

## Pooling on the fly (`max_pool_unit`)

Convolution results arrive in raster order, each with its `(row, col)`. The
unit uses the coordinate bits directly and has no counters of its own:

- **Even column:** the value is held in `held`.
- **Odd column:** `hmax = max(held, value)` is the maximum of the horizontal
  pair.
  - **Even row:** `hmax` is written to `row_buf[col/2]`. This buffer holds
    30 partial maxima, which is half a convolution row.
  - **Odd row:** `max(hmax, row_buf[col/2])` is the 2x2 maximum. It leaves
    the unit on the next clock as `(row/2, col/2)`.

If the convolution output had an odd width or height, the last column or row
would be dropped. At the default sizes (60x60) this does not happen.

## Top level (`conv_pool_accel`) and timing

| port                             | dir | width | meaning                                          |
|----------------------------------|-----|-------|--------------------------------------------------|
| `clk`, `rst_n`                   | in  | 1     | clock; asynchronous active-low reset             |
| `wgt_we`, `wgt_addr`, `wgt_data` | in  | 1/5/8 | write weight `(r, c)` at address `r*5 + c`       |
| `in_valid`, `in_pixel`           | in  | 1/8   | pixel stream, raster order, gaps allowed         |
| `out_valid`, `out_data`          | out | 1/21  | pooled results, raster order                     |
| `out_row`, `out_col`             | out | 5/5   | coordinates in the 30x30 map                     |
| `frame_done`                     | out | 1     | high with the last pooled result of a frame      |

The input has no back-pressure. The accelerator accepts one pixel in every
cycle where `in_valid` is high.

The path from the completing pixel to its pooled result is 5 clocks:

- The clock edge that accepts the pixel also registers the window.
- Three clocks are spent in multiply-add.
- One clock is spent in pooling.

A frame presented without gaps in cycles 0..4095 raises `frame_done` in
cycle 4100. Load the filter before a frame starts. Change it only after the
previous frame's `frame_done`: the pipeline still holds windows of that frame
until then.

## Where this departs from, or adds to, the original description

The original accelerator defines only the layer shape (64x64 image, 5x5
filter, 2x2 pooling) and names the three techniques above. It was built for
an FPGA with high-level synthesis from C. Everything below is a choice made
in this RTL:

- **Number format.** 8-bit signed pixels and weights with an exact 21-bit
  result. The original format is not given.
- **Geometry.** Stride-1 convolution without padding, stride-2 pooling, and
  a single channel with a single filter.
- **Unrolling and pipelining.** Only the 5x5 filter loops are fully unrolled,
  giving one window per clock. The pipeline has three multiply-add stages.
  Neither the unroll factor nor the pipeline depth of the original is given.
  It may also have computed several output feature maps in parallel; that
  is not built here.
- **Memory structure.** The line memories and the half-row pooling buffer.
- **Interfaces.** The stream interfaces and the weight write port. There is
  no main-memory, DMA or bus interface and no start/done controller, because
  none is described.
- **Performance.** The original reports a fourfold speed-up over an earlier
  accelerator for about 60% more logic. Neither the earlier accelerator nor
  the original's cycle counts are given, so this RTL cannot be compared
  against those figures.

## Files

| file                      | content                                                  |
|---------------------------|----------------------------------------------------------|
| `rtl/cnn_pkg.sv`          | sizes, number widths, accumulator-width function         |
| `rtl/window_buffer.sv`    | line memories and the 5x5 register window                |
| `rtl/kernel_regs.sv`      | filter weight registers                                  |
| `rtl/conv_mac_array.sv`   | 25 multipliers and the pipelined adder tree              |
| `rtl/max_pool_unit.sv`    | streaming 2x2 max pooling                                |
| `rtl/conv_pool_accel.sv`  | top level                                                |
| `tb/tb_*.sv`              | one self-checking testbench per module                   |

Each testbench compares the module against its own reference model. It
prints `TB_RESULT checks=N failures=M` and has a watchdog.

- `tb_conv_pool_accel` runs the top at its default size. It streams three
  random 64x64 frames:
  - The first frame has no gaps, and its frame time is checked to the cycle.
  - The second and third frames have random gaps and run back to back.
  - The filter is reloaded between frames.
  - The 900 pooled results of each frame are checked against a software
    convolution and pooling.
  - It also counts border pixels, input gaps, buffered and emitted pooling
    rows, back-to-back frames, filter reloads and `frame_done` pulses.
- The module testbenches use small images (11x9 windows, a 7x5 pooling
  input). These cover reset values, out-of-range weight addresses, the
  extreme value -128 and dropping an odd trailing row or column.

## Simulating

With Verilator 5, from the repository root:

```
verilator --binary --timing -y rtl rtl/cnn_pkg.sv tb/tb_conv_pool_accel.sv \
          --top-module tb_conv_pool_accel --Mdir obj
./obj/Vtb_conv_pool_accel
```

To run another testbench, replace `tb_conv_pool_accel` with its name. The
package has to come first on the command line. The full-size test runs in
well under a second.

## Changing the sizes

- Set `IMG_W`, `IMG_H` and `K` on `conv_pool_accel` to change the image and
  filter size.
- Set `DATA_W` and `WGT_W` to change the number widths.
- The accumulator width, the convolution and pooled map sizes, and all
  counter widths follow from these parameters.
- The pooling window is fixed at 2x2.
- The defaults live in `cnn_pkg`.
