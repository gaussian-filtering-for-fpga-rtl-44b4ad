# Streaming Gaussian filter with line and window buffers

A Gaussian blur replaces every pixel by a weighted average of its
neighbourhood. Done naively on a frame in external memory, each output pixel
would reread K×K input pixels. This design instead reads the image once, as a
stream of one pixel per clock in raster order, and keeps on chip only what
the next outputs still need: the previous K−1 image rows (the *line buffers*)
and the current K×K neighbourhood (the *window*). Each new pixel completes one
image column, which moves the window one step to the right. The window is
then multiplied by a small integer Gaussian kernel and summed. For a
1080×1920 frame and a 3×3 kernel the filter stores 2×1920 pixels plus 9
registers, and delivers one output per clock.

The RTL is written in synthesizable SystemVerilog-2017. The kernel size is a
parameter (3, 5 or 7).

## Kernels

Only integer approximations of the Gaussian are supported. The weighted sum
is divided by the kernel's total:

| KSIZE | kernel (upper-left quadrant, mirrored both ways) | divisor |
|---|---|---|
| 3 | `1 2 / 2 4` | 16 |
| 5 | `1 4 7 / 4 16 26 / 7 26 41` | 273 |
| 7 | `0 0 1 2 / 0 3 13 22 / 1 13 59 97 / 2 22 97 159` | 1003 |

Each kernel sums exactly to its divisor. The result therefore always fits in
the pixel width, and no saturation is needed. The division truncates. For
3×3 it is a 4-bit shift. For 5×5 and 7×7 it is a division by a constant,
which synthesis turns into a constant multiplier network. A floating-point
kernel is deliberately not offered: for the same 3×3 filter it costs tens of
times the logic and gives no throughput gain.

The coefficients come from the constant functions `gauss_pkg::kernel_coef`
and `kernel_norm`. The multipliers therefore reduce to constants (shifts and
adds) at elaboration.

## How a pixel moves through the filter

```
pixel_in ──► line buffers ──column──► window KxK ──► K² products ──► adder tree ──► ÷ norm ──► pixel_out
 (r,c)       K-1 rows × COLS          (registers)     (1 stage)     ceil(log2 K²)    (1 stage)
                                                                  stages
```

1. **Line buffers** (`gauss_line_buffer`). There are K−1 memories of COLS
   pixels each. When pixel (r,c) arrives, the module reads column c of every
   memory and appends the new pixel. The result is the K-pixel image column
   from row r−K+1 down to row r. In the same clock the column is written
   back *shifted up by one*: the oldest pixel is dropped and the new pixel
   takes the bottom row. The memories are read asynchronously and written at
   the same address. No read-before-write pipeline is needed.
2. **Window** (`gauss_window_buffer`). This is a K×K register array. On each
   accepted pixel every column moves one place left, and the new image
   column enters on the right. `window[i][j]` with i=0, j=0 is the oldest
   (top-left) pixel.
3. **Convolution** (`gauss_conv`). The K² constant products are registered.
   They are then summed in a balanced, pipelined adder tree
   (`gauss_adder_tree`) with one register per level. A final registered
   stage divides by the divisor. The tree keeps the logic depth per stage to
   one adder. When a level has an odd number of values, the leftover value is
   carried through a register, so every term arrives at the same time.

### Output alignment and borders

The filter emits exactly one output per input pixel, in the same order.
Output n is the result for the window whose *bottom-right* pixel is input
n = (r,c). That window is centred on input pixel (r−K/2, c−K/2). The output
image is therefore the blurred image shifted by K/2 rows and K/2 columns.

Some windows would include pixels from before the frame start or from the
end of the previous row. This happens when r < K−1 or c < K−1. Such outputs
are forced to 0 and flagged with `out_border`. There are 5,996 of them in a
1080×1920 frame for 3×3. Because the border flag masks them, the line
buffers need no reset and may hold data from the previous frame.

`out_last` marks the output of the last pixel of a frame. The row and column
counters then wrap, and the next pixel is (0,0) of a new frame. There is no
gap between frames. Reset (`rst_n`, synchronous, active low) restarts at
pixel (0,0).

Other conventions are possible, such as a centred output with replicated or
zero-padded edges. Each needs K/2 extra rows of flush at the end of a frame.
The lockstep convention used here keeps the frame time at one cycle per
pixel.

### Handshake and stalls

Both streams use valid/ready. A pixel is accepted when
`in_valid && in_ready`, and an output is taken when
`out_valid && out_ready`. Every pipeline register carries a tag (valid,
border, last). The stall rule is global and simple:

```
stall    = out_valid && !out_ready
in_ready = !stall
```

During a stall no pipeline register changes, so the offered output holds
still. An assertion in `gauss_filter` checks this. Input bubbles
(`in_valid` low) travel down the pipeline as invalid tags. The line buffers
and the window move only on accepted pixels.

### Timing

| KSIZE | convolution stages (1 + tree + 1) | input-to-output edges | cycles for a 1080×1920 frame |
|---|---|---|---|
| 3 | 1 + 4 + 1 = 6 | 7 | 2,073,606 |
| 5 | 1 + 5 + 1 = 7 | 8 | 2,073,607 |
| 7 | 1 + 6 + 1 = 8 | 9 | 2,073,608 |

Throughput is one pixel per clock without back-pressure. The frame time is
counted from the first accepted pixel to the last output, and equals
ROWS·COLS + `conv_latency(KSIZE)`. For 3×3 this equals the cycle count of a
high-level-synthesis build of the same filter (2,073,606). That build took
2,073,615 and 2,073,619 cycles for 5×5 and 7×7 because it had deeper
pipelines. Here the pipeline depth is fixed at one register per adder-tree
level and cannot be tuned to a clock target.

## Modules

| file | role |
|---|---|
| `rtl/gauss_pkg.sv` | kernel tables, divisors, pipeline-depth functions |
| `rtl/gauss_line_buffer.sv` | K−1 row memories, column read and shift-up write-back |
| `rtl/gauss_window_buffer.sv` | K×K shifting window |
| `rtl/gauss_adder_tree.sv` | pipelined balanced adder tree, N operands |
| `rtl/gauss_conv.sv` | multiply, tree sum, divide |
| `rtl/gauss_filter.sv` | top level: counters, border and frame tags, handshake |

Parameters of `gauss_filter` (defaults in brackets): `ROWS` [1080],
`COLS` [1920], `KSIZE` [3], `PIX_W` [8]. `KSIZE` must be 3, 5 or 7. For any
other value `kernel_coef` returns zeros. `PIX_W` above 8 works as long as
the sum width `PIX_W + clog2(divisor)` is acceptable.

Storage: (KSIZE−1)·COLS·PIX_W bits of line-buffer memory. That is 30,720
bits at the defaults, and 61,440 and 92,160 bits for 5×5 and 7×7. Each row
fits one block RAM on typical FPGAs.

## Verification

Every module has a self-checking testbench in `tb/`. Each one compares
against values computed independently in the testbench, including its own
copies of the kernel tables, and ends with a
`TB_RESULT checks=N failures=M` line.

| testbench | what it covers |
|---|---|
| `tb_gauss_line_buffer` | 3×3 and 5×5 buffers, random idle cycles, every column checked against a stored image |
| `tb_gauss_window_buffer` | 3×3 and 5×5 windows, reset, random enable, every element checked |
| `tb_gauss_adder_tree` | N = 5, 9, 25, 49 with random stalls, result and exact latency |
| `tb_gauss_conv` | all three kernels, random and extreme (all-0 and all-255) windows, latency 6/7/8 |
| `tb_gauss_filter` | three small filters (3×3, 5×5, 7×7), three frames each: an unstalled frame with its frame time checked, then random input bubbles and output back-pressure. Every output value and flag is checked. The stalls, bubbles, border outputs, interior outputs and frame ends are counted, and each must occur. |
| `tb_gauss_filter_full` | the default filter (no overrides) on one full 1080×1920 frame: all 2,073,600 outputs, frame time 2,073,606, border count |
| `tb_gauss_filter_kernels` | one full 1080×1920 frame for each of 3×3, 5×5 and 7×7, values and frame times |

`gauss_filter_harness` is the shared driver and checker used by the last
three filter tests. Test images come from a hash of (frame, row, column), so
the expected output of any position is recomputed on the fly and nothing is
stored.

To run one with Verilator 5:

```
verilator --binary --timing --assert -Irtl -y rtl -y tb +libext+.sv \
    rtl/gauss_pkg.sv tb/tb_gauss_filter.sv --top-module tb_gauss_filter
./obj_dir/Vtb_gauss_filter
```

The full-frame tests take a few seconds each.

## Limits and departures

- Borders are zero and the output is shifted by K/2 in both directions, as
  described above. A centred image with edge padding would need an extra
  flush phase.
- The division truncates instead of rounding. For 3×3 the result is the
  sum shifted right by 4.
- Only the three listed integer kernels are built in. Other kernels need an
  entry in `gauss_pkg::kernel_coef` and `kernel_norm`.
- The pipeline depth is fixed. It is not retimed for a target clock
  frequency. No timing or resource figures are claimed for any FPGA.
- The frame size is fixed by parameters. There is no start-of-frame input;
  frames are framed by reset and by the wrap of the internal counters.
- The image source and sink (frame memory, DMA) are outside this design.
  Connect them to the two pixel streams.
