# Streaming Sobel edge detector, one pixel per clock

This is RTL for a Sobel edge-detection accelerator that takes an 8-bit grey
image as a raster-order pixel stream and returns the edge-magnitude image as
a stream, at one input pixel and one output pixel per clock cycle. A
640x480 frame takes 307,843 cycles. That is 0.2 % more than the 307,200
cycles it takes just to stream the frame in.

The micro-architecture follows the final, "windowed" version of the Vivado
HLS accelerator in *Optimization Techniques for a High Level Synthesis
Implementation of the Sobel Filter*. That version stores four image lines in
a line buffer that is split into one memory per line, and keeps the 3x3
neighbourhood in registers. Each memory therefore needs only one read and one
write per cycle. The HLS design was C code. This is hand-written
SystemVerilog with the same structure and the same input/output order. Its
cycle count, interfaces and control are this design's own (see
[Departures and own choices](#departures-and-own-choices)).

## The operator

For each interior pixel `(i, j)` with `1 <= i <= ROWS-2` and `1 <= j <= COLS-2`:

```
Gx = (p[i-1][j-1] + 2 p[i][j-1] + p[i+1][j-1]) - (p[i-1][j+1] + 2 p[i][j+1] + p[i+1][j+1])
Gy = (p[i-1][j-1] + 2 p[i-1][j] + p[i-1][j+1]) - (p[i+1][j-1] + 2 p[i+1][j] + p[i+1][j+1])
out[i-1][j-1] = min(|Gx| + |Gy|, 255)
```

These are the kernels `DX = {{1,0,-1},{2,0,-2},{1,0,-1}}` and
`DY = {{1,2,1},{0,0,0},{-1,-2,-1}}` in `sobel_pkg`. The magnitude is the L1
norm, not the Euclidean one. Border pixels produce no output, so the result
is a `(ROWS-2) x (COLS-2)` image: 638x478 by default.

## How a frame flows through the line buffer

The hardest part to follow is the order in which lines enter and leave the
four-line buffer. The controller (`sobel_ctrl`) runs through the frame in
*sweeps* of `COLS` steps. It issues one step per clock cycle, unless the
pipeline is stalled.

| sweep            | input line read | written to bank | banks read (top, mid, bottom) | outputs          |
|------------------|-----------------|-----------------|-------------------------------|------------------|
| prefill 0        | 0               | 0               | none                          | none             |
| prefill 1        | 1               | 1               | none                          | none             |
| prefill 2        | 2               | 2               | none                          | none             |
| row i = 1        | 3               | 3               | 0, 1, 2                       | out row 0        |
| row i = 2        | 4               | 0               | 1, 2, 3                       | out row 1        |
| row i            | i+2             | (i+2) % 4       | (i-1)%4, i%4, (i+1)%4         | out row i-1      |
| row i = ROWS-3   | ROWS-1 (last)   | (ROWS-1) % 4    | ...                           | out row ROWS-4   |
| row i = ROWS-2   | none            | none            | ...                           | out row ROWS-3   |

At step `k` of a row sweep, the controller does three things at once:

- It reads column `k` of the three banks in use. That column is shifted into
  the right-hand side of the 3x3 window.
- It writes pixel `k` of the next input line into the fourth bank.
- From `k = 2` on, the window holds columns `k-2 .. k`, so the kernel emits
  output pixel `(i-1, k-2)`.

The first two steps of each sweep only refill the window. Because the window
reuses six of its nine pixels from one step to the next, each line memory
sees one read and at most one write per cycle. That is what lets the design
keep up with one pixel per cycle.

A frame therefore takes `(ROWS + 1) * COLS` steps: three prefill sweeps and
`ROWS - 2` row sweeps. The last row sweep reads no input, because there is no
line `ROWS` to fetch.

## Pipeline, stalls and timing

`sobel_core` has three stages, all moved by one enable, `adv`:

1. **issue**: the controller's step. The input pixel is written into the line
   buffer, and the column read is started. Bank memories have a registered
   read port, like block RAM.
2. **load**: the column read from the three banks is rotated so that `[0]`
   is the upper line, then shifted into `sobel_window`.
3. **kernel**: `sobel_kernel` (combinational) computes the magnitude from the
   window. The result is captured in the output register that drives the
   output FIFO.

The whole pipeline stalls (`adv = 0`) in two cases:

- The current step needs an input pixel and the input FIFO is empty.
- The output register holds a pixel and the output FIFO is full.

There is no skid buffer. A stall freezes every stage, including the read
registers of the bank memories, which have a read enable for this reason.

With the input FIFO never empty and the output FIFO never full, a frame takes
exactly `(ROWS+1)*COLS + 3` cycles from the `start` edge to `done`:

| frame   | cycles  | lower bound (one pixel per cycle) |
|---------|---------|-----------------------------------|
| 640x480 | 307,843 | 307,200                           |

Back-to-back frames repeat every 307,844 cycles, because the next `start`
is taken one cycle after `done`, when the pipeline is empty.

The HLS-generated version of this architecture needed 310,711 cycles. At the
150 MHz interface rate the stream could carry, 307,843 cycles is 487 frames/s.
RTL simulation says nothing about the achievable clock frequency. The HLS
tool reported about 120 MHz for its version of this architecture on a
Zynq-7000.

The input FIFO is read at a steady one pixel per cycle, except during the
last row sweep, which reads nothing. The output comes in bursts of `COLS-2`
pixels, one per cycle, with a 2-cycle gap per line (the window refill).

## Interface of `sobel_top`

| port                         | dir | meaning |
|------------------------------|-----|---------|
| `clk`, `rst_n`               | in  | clock; asynchronous active-low reset |
| `start`                      | in  | starts a frame; ignored unless `idle` is high |
| `idle`                       | out | no frame in the controller or pipeline |
| `done`                       | out | one-cycle pulse when the last output pixel enters the output FIFO |
| `in_data[7:0]`, `in_write`   | in  | push a pixel into the input FIFO (only while `in_full_n`) |
| `in_full_n`                  | out | input FIFO can take a pixel (also high when full but being read this cycle) |
| `out_data[7:0]`, `out_last`  | out | head of the output FIFO; `out_last` marks the frame's last pixel |
| `out_empty_n`                | out | output FIFO holds a pixel |
| `out_read`                   | in  | pop the output FIFO (only while `out_empty_n`) |
| `in_level`, `out_level`      | out | FIFO fill levels, for monitoring |

Input pixels can be written into the input FIFO before `start`. The
accelerator takes exactly `ROWS*COLS` of them per frame. `sobel_core` can be
used without the FIFOs. Its `src_*` and `dst_*` ports use the same
empty_n/read and full_n/write handshake as an HLS `ap_fifo` port, and the
input side expects first-word-fall-through data. Assertions flag a read of
an empty FIFO and a write to a full one.

## Parameters

| parameter    | default | where                     | meaning |
|--------------|---------|---------------------------|---------|
| `ROWS`       | 480     | `sobel_top`, `sobel_core`, `sobel_ctrl` | image height; at least 3 |
| `COLS`       | 640     | `sobel_top`, `sobel_core`, `sobel_ctrl`, `line_buffer` | image width; at least 3 |
| `FIFO_DEPTH` | 16      | `sobel_top`               | depth of both FIFOs; a power of two |

The frame size is fixed at elaboration time, as in the HLS source, which
used compile-time constants. The line buffer holds 4 x `COLS` x 8 bits
(20,480 bits at the default size) in four separate memories.

## Files

| file | contents |
|------|----------|
| `rtl/sobel_pkg.sv`    | pixel, window and bank types; the two kernels; default sizes |
| `rtl/sobel_top.sv`    | top level: input FIFO, `sobel_core`, output FIFO |
| `rtl/sobel_core.sv`   | the three-stage pipeline, stall logic, frame control |
| `rtl/sobel_ctrl.sv`   | loop controller: sweeps, bank rotation, step flags |
| `rtl/line_buffer.sv`  | four line memories with rotated column read-out |
| `rtl/lb_bank.sv`      | one line memory: one write port, one registered read port |
| `rtl/sobel_window.sv` | 3x3 shift window |
| `rtl/sobel_kernel.sv` | Gx, Gy, L1 magnitude, clamp to 255 |
| `rtl/stream_fifo.sv`  | first-word-fall-through FIFO |

## Verification

Each module has a self-checking testbench in `tb/`. Each one prints
`TB_RESULT checks=N failures=M` and stops itself through a watchdog if it
hangs.

| testbench | what it checks |
|-----------|----------------|
| `tb_sobel_kernel`   | directed and 3,000 random windows against the formula above, clamped and unclamped |
| `tb_sobel_window`   | window contents against a model, with random shift enables |
| `tb_line_buffer`    | random writes and reads in all four rotations against a model array; hold on `rd_en = 0` |
| `tb_stream_fifo`    | order, flags and level against a queue; full, empty, and read+write while full |
| `tb_sobel_ctrl`     | the step sequence of the table above, step by step, with a random `adv`; `(ROWS+1)*COLS` cycles at full rate; `start` ignored mid-frame |
| `tb_sobel_core`     | four 9x11 frames against a reference; exact cycle count without stalls; random starvation and back-pressure |
| `tb_sobel_top`      | four 10x12 frames through the FIFOs. Counts and requires prefill steps, fill-and-compute steps, input-free tail steps, all four bank rotations, window shifts, clamped outputs, input starvation, output back-pressure and a full input FIFO |
| `tb_sobel_top_full` | two back-to-back 640x480 frames at the default parameters. Every output pixel is checked. The first frame's start-to-done must be exactly 307,843 cycles, and the done-to-done period at most 3 cycles more (it is 307,844) |

To run one with Verilator 5:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl \
    rtl/sobel_pkg.sv tb/tb_sobel_top.sv --top-module tb_sobel_top -o sim
./obj_dir/sim
```

The full-size test simulates in under a second. The testbenches use
`$urandom` for their stimulus.

## Departures and own choices

These follow the HLS design:

- the operator and its clamp
- interior-only output
- the four-line buffer partitioned into one memory per line
- the bank schedule `(i-1)%4 .. (i+2)%4`
- the three prefill lines
- the input-free last row
- the 3x3 register window that takes one new column per output
- one pixel per cycle

These are this design's own:

- **Loop timing.** The HLS loop nest loaded columns 0 and 1 of the window
  and wrote the first and last pixel of each input line outside the
  pipelined inner loop. That cost a few cycles per line: 310,711 cycles per
  frame. Here every line is one uninterrupted sweep of `COLS` steps, with the
  window refill folded into its first two steps. The stream order and the
  results are the same.
- **Window update order.** The C code computes and then shifts the window.
  Here the new column shifts in as it is loaded, and the kernel reads the
  window a stage later. The two are equivalent.
- **Handshakes and frame control.** The signal names and timing of the
  FIFO ports, the `start`/`idle`/`done` protocol, and `out_last` are chosen
  here. The HLS design only stated that its image arguments were FIFO ports.
- **Stalls.** The stall policy (global stall, no skid buffer) is this
  design's own.
- **Reset and storage.** The asynchronous active-low reset, the FIFO depth
  of 16, and the synchronous read ports of the bank memories are this
  design's own.
- **Arithmetic width.** The gradient sums are 12-bit signed (exact for 8-bit
  pixels), where the C code used `int`.

Not included: the surrounding system that feeds the stream, meaning the
Zynq processor, its DDR memory and its high-performance AXI port. Its role
is taken by the FIFO ports of `sobel_top`. Also not included are the two
earlier, slower HLS versions: 42 cycles/pixel, and 2 cycles/pixel with
the line buffer read directly instead of through a window. They are steps
towards this design, not part of it. Timing closure and FPGA resource use
have not been measured. A generic word-level synthesis maps the line buffer
to four 640x8 memories and the rest to about 200 cells and 134 flip-flops.
