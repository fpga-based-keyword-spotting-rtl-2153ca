# Keyword-spotting accelerator with line-buffer data reuse

A small always-on keyword-spotting (KWS) classifier in synthesizable
SystemVerilog. An MFCC feature map goes through one 3x3 convolution, a ReLU
and one fully connected (FC) layer, which produces one score per keyword.

The main idea is in the convolution. A plain implementation fetches all nine
pixels of every 3x3 window from memory, so each pixel is read up to nine
times. Here the feature map is streamed from memory once, in raster order,
one pixel per clock. A line buffer made of shift registers keeps the two
previous rows and the current 3x3 window on chip. Each new pixel completes
one window, and the other eight values of that window are reused from
registers. In steady state that is 1 memory read per window instead of 9
(88.9 % fewer). Over a whole 49 x 10 map it is 490 reads instead of 3384
(85.5 % fewer).

The architecture follows a published FPGA KWS accelerator design: three
engines (convolution with data reuse, ReLU, FC) under one control FSM with a
`start` / `output_valid` handshake, fed from an on-chip data memory. That
design gives the structure and the reuse scheme. The map size, the class
count, the number formats, the host load port, the activation buffer and
the exact timing are choices made here. They are listed in
[Departures and choices](#departures-and-choices).

## Block diagram

```
 host load port ──┬──────────────┬──────────────────────────┐
 (ld_en/ld_sel/   │              │ conv weights             │ FC weights
  ld_addr/ld_data)▼              ▼                          ▼
           ┌─────────────┐  ┌──────────────────────┐  ┌────────────┐
           │ feature mem │─▶│ conv2d_reuse         │  │ FC weight  │
           │ 490 x 8 b   │◀─│  addr gen ─ line_buf │  │ mem        │
           └─────────────┘  │  ─ 9 x MAC + adder   │  │ 4512 x 8 b │
              1 read/cycle  └──────────┬───────────┘  └─────┬──────┘
                                       ▼ 20 b, 1/cycle      │
                                  ┌─────────┐               │
                                  │  relu   │               │
                                  └────┬────┘               │
                                       ▼                    ▼
                               ┌──────────────┐      ┌────────────┐
                               │ activation   │─────▶│ fc         │
                               │ buffer 376x20│      │ nested-loop│
                               └──────────────┘      │ 1 MAC/cycle│
                                                     └─────┬──────┘
   start ──▶ ┌──────────┐ conv_start / fc_start / out_load  ▼ 12 x 37 b
             │ kws_ctrl │──────────────────────────▶ ┌────────────┐
 output_valid│  FSM +   │                            │ kws_output │─▶ logits,
        ◀────│ counters │──▶ perf_reads, perf_cycles │  arg-max   │   class_id
             └──────────┘                            └────────────┘
```

## The line buffer (`line_buffer`)

This block holds the design's main idea, so it gets the most detail.

Pixels arrive in raster order: row 0, columns 0..W-1, then row 1, and so on
(W = `IMG_W` = 10). The block has two delay lines, `row1` and `row2`, each W
shift registers long, chained one after the other:

```
 pix ──▶ row1[0] ▶ row1[1] ▶ … ▶ row1[W-1] ──▶ row2[0] ▶ … ▶ row2[W-1]
  │                                   │                          │
  ▼                                   ▼                          ▼
 win[2][2]                         win[1][2]                  win[0][2]
```

When the pixel at (r, c) is pushed, the end of `row1` holds (r-1, c), the
pixel W pushes earlier, and the end of `row2` holds (r-2, c). On the same
clock edge the 3x3 window registers move one column to the left, and the
right-hand column is loaded with (r-2, c), (r-1, c) and (r, c). After the
edge, `win` holds rows r-2..r and columns c-2..c, which is exactly the
window whose bottom-right corner is the pixel just pushed.

The block counts rows and columns itself. `win_valid` is high in the cycle
after a push with r >= 2 and c >= 2. `win_last` marks the window of the last
pixel. At the start of each row the first two pushes only refill the left
columns of the window. They give no window, so the output stream has a
two-cycle gap at each row change. There is no padding, so a map of H x W
pixels gives (H-2) x (W-2) windows. `clear` restarts the count for a new map.
The old contents of the delay lines need not be cleared, because no window is
marked valid until two fresh rows are in.

`push` need not be high every cycle. The buffer only moves on a push, so the
pixel source can stall. Inside the accelerator the source never stalls.

Storage: 2W + 9 registers of `DATA_W` bits (29 bytes at the defaults).

## Convolution engine (`conv2d_reuse`)

- **Address generator.** After `start`, it issues feature-memory reads at
  addresses 0..H*W-1, one per clock, each address exactly once. The memory
  answers one cycle later, and the returning pixel is pushed into the line
  buffer.
- **MAC.** Nine signed 8 x 8 multipliers and an adder tree combine the
  window with the nine kernel weights in one cycle. The full-precision
  20-bit sum is registered out with its raster index (`out_idx`) and a last
  flag.
- **Kernel weights.** Nine registers, written at any time through
  `w_wr_*`, in row-major order.
- **Timing.** With `start` sampled at clock edge 0, reads are issued at
  edges 1..H*W, and the last result (`done`) is valid after edge H*W+2. At
  the defaults that is 492 cycles for 376 results.

## ReLU and the activation buffer

`relu` is one register stage. It outputs `max(x, 0)` and passes the index
and the last flag along, so it keeps pace with the convolution at one value
per cycle. Its outputs are written into the activation buffer (a
`kws_data_mem`, 376 x 20 bits) at address `out_idx`. The FC layer reads it
later.

## Fully connected layer (`fc`)

The FC layer computes a dense matrix-vector product with two nested loops
clocked by the system clock. The outer loop runs over the 12 classes and the
inner loop over the 376 activations. Each cycle one activation and one
weight are read (weight address = class * 376 + input). One
multiply-accumulate adds their product to a 37-bit accumulator. The
accumulator restarts at zero for each class, and at the end of the inner
loop its sum becomes that class's logit. The accumulator is wide enough for
the worst case, so nothing saturates or wraps.

Timing: `done` comes NUM_CLASSES * N_IN + 1 cycles after `start`, which is
4513 cycles at the defaults. This loop takes about 90 % of an inference.

## Control (`kws_ctrl`) and output (`kws_output`)

The FSM states are `IDLE → CONV → FC → DONE → IDLE`:

| state | entered when | what runs |
|-------|--------------|-----------|
| IDLE  | reset, or after DONE | waits for `start`; loading is meant for this state |
| CONV  | `start` in IDLE (pulses `conv_start`) | memory → line buffer → MAC → ReLU → activation buffer |
| FC    | last ReLU output written (pulses `fc_start`) | FC nested loops |
| DONE  | FC `done` (pulses `out_load`) | `output_valid` high for exactly one cycle |

`start` is ignored outside IDLE. Two assertions check the FSM: the
convolution and the FC layer are never busy at the same time, and each layer
reports completion only in its own phase.

The controller also keeps two performance counters for the last run:
`perf_reads` counts feature-memory reads, and `perf_cycles` counts cycles
from the start cycle through the `output_valid` cycle. Both are cleared by
an accepted start. Their final values are in place from the cycle after
`output_valid`.

`kws_output` latches the 12 logits and their arg-max `class_id` (the lowest
index wins a tie) on `out_load`. It holds them until the next inference
finishes.

## Timing of one inference

With `start` sampled at edge 0:

| event | clock edge (defaults) |
|-------|-----------------------|
| feature reads | 1 … 490 |
| last convolution result | 492 |
| last ReLU result written, FC samples its start | 494 |
| last FC logit | 494 + 4513 = 5007 |
| `output_valid` high | 5008 = H*W + NUM_CLASSES*N + 6 |

At an assumed 100 MHz clock, a start sampled at 60,000 ns gives
`output_valid` at 110,080 ns, a latency of 50.08 µs. The published design
reports 50,000 ns for its reuse variant but does not give its clock or
model size. The agreement is therefore only indicative.

## Using the top level (`kws_top`)

Ports:

| port | dir | width | meaning |
|------|-----|-------|---------|
| `clk`, `rst_n` | in | 1 | clock, asynchronous active-low reset |
| `ld_en`, `ld_sel`, `ld_addr`, `ld_data` | in | 1, 2, 13, 8 | load one word per cycle: `LD_FEATURE` (address = row*IMG_W + col), `LD_CONV_W` (0..8, row-major), `LD_FC_W` (class*376 + input) |
| `start` | in | 1 | one-cycle pulse; accepted when `busy` is low |
| `busy` | out | 1 | inference in progress |
| `output_valid` | out | 1 | one-cycle pulse when results are ready |
| `logits` | out | 12 x 37 signed | class scores |
| `class_id` | out | 4 | index of the highest score |
| `perf_reads`, `perf_cycles` | out | 32 | figures of the last inference |

A typical sequence: reset, load 490 pixels, 9 kernel weights and 4512 FC
weights, pulse `start`, wait for `output_valid`, read `class_id` and
`logits`. Weights persist, so later inferences only reload the feature map.
A load during a run is not blocked. It changes data the run may still read.

Number formats: pixels and weights are signed 8-bit integers, and
everything after them is full precision. That is 20-bit convolution sums,
20-bit activations (the sign bit is always 0 after ReLU) and 37-bit logits.
No value is rounded, saturated or rescaled, so the hardware matches an
integer reference model bit for bit.

## Parameters

Shared defaults live in `kws_pkg`. `kws_top` exposes `DATA_W`, `IMG_H`,
`IMG_W` and `NUM_CLASSES`, and all derived widths and depths follow from
them. The kernel is fixed at 3x3 (`KSIZE`).

| parameter | default | origin |
|-----------|---------|--------|
| `KSIZE` | 3 | published design |
| `IMG_H` x `IMG_W` | 49 x 10 | this design (common MFCC frame count x coefficients) |
| `NUM_CLASSES` | 12 | this design (common speech-commands class set) |
| `DATA_W` | 8 | this design |

Memory at the defaults: feature map 3920 bits, activation buffer 7520
bits and FC weights 36096 bits.

## Departures and choices

- **Not built:** the non-reuse baseline convolution. In the published design
  it exists only for comparison. Its cost is computed instead: 9 reads per
  window.
- **The feature memory is on chip.** The published design counts the
  reads that reuse saves as accesses to external memory. Here the map sits
  in an on-chip RAM inside `kws_top`. The convolution reaches it only
  through a plain 1-cycle read port (`fm_rd_*`), so an external memory with
  the same port could take its place. The read count is the same either
  way.
- **Single channel, single kernel, no bias**, stride 1, no padding. No
  requantisation between layers.
- **The nested FC loop uses one MAC.** The published design gives the nested
  loops but not their parallelism. A wider FC would shorten the dominant
  phase.
- **The layers run one after another** through an activation buffer. The
  published design calls the flow pipelined between convolution and
  activation, which holds here, but it does not say how the FC consumes its
  input.
- **Host load port and arg-max output** are additions, so that the design can
  be used stand-alone.
- **The read and cycle counters are in hardware.** The published design
  measures these figures in its testbench.

## Files

`rtl/`:

| file | content |
|------|---------|
| `kws_pkg.sv` | sizes, `ld_sel_e`, `kws_state_e`, `conv_width()` |
| `kws_data_mem.sv` | 1W/1R synchronous RAM, read-first, 1-cycle latency |
| `line_buffer.sv` | 3x3 rotating window |
| `conv2d_reuse.sv` | read generator, line buffer, 9-way MAC |
| `relu.sv` | ReLU stage |
| `fc.sv` | nested-loop FC layer |
| `kws_ctrl.sv` | FSM and performance counters |
| `kws_output.sv` | result latch and arg-max |
| `kws_top.sv` | top level |

`tb/`: each testbench is self-checking and prints
`TB_RESULT checks=N failures=M`.

| testbench | what it checks |
|-----------|----------------|
| `tb_kws_data_mem` | read latency, hold, read-first |
| `tb_line_buffer` | every window against the map, with random push stalls and mid-map clear |
| `tb_conv2d_reuse` | every output against a reference; each pixel read exactly once; `done` at H*W+2 |
| `tb_relu` | clamp, pass-through, side fields, extremes |
| `tb_fc` | logits against a reference; address pattern; `done` at N*C+1 |
| `tb_kws_ctrl` | state sequence, pulses, ignored start, counters |
| `tb_kws_output` | latch, arg-max, ties |
| `tb_kws_top` | four end-to-end inferences at the default sizes (random, mostly negative, extreme data); logits, class, reads, latency; counts line-buffer windows, ReLU clamps, FC class changes and ignored starts |
| `tb_kws_reuse_metrics` | the figures of merit: start at 60 µs with a 10 ns clock, one read per steady-state window, 490 reads per map, `output_valid` after 5008 cycles |

To run one with Verilator 5:

```
verilator --binary --timing --assert --timescale 1ns/1ps -Irtl -y rtl \
    rtl/kws_pkg.sv tb/tb_kws_top.sv --top-module tb_kws_top -Mdir obj
./obj/Vtb_kws_top
```

Each testbench runs in well under a second. The end-to-end tests use the
default sizes, so what is simulated is the design as delivered.
