# exaFPGA streaming pipeline: stencil time-steps across a chain of FPGA boards

Iterative stencil loops (Jacobi, Gauss-Seidel, heat diffusion, Game of Life)
sweep a grid again and again, each sweep ("time-step") updating every element
from a fixed pattern of neighbours. This design turns every time-step into a
piece of streaming hardware, a **Streaming Stencil Time-step (SST)**, and
chains SSTs into one long pipeline that runs across several FPGA boards. The
host writes a grid into the first board over PCIe. Each board passes the
stream through its own queue of SSTs. A board-to-board serial link (Xilinx
Aurora 64B/66B over coaxial cable) carries the stream to the next board, and
the last board returns the grid to the host over PCIe. A frame that leaves the
chain has advanced one time-step per SST. Once the pipeline is full it
delivers one element per clock. There is no CPU, no DRAM and no firmware on
the boards: only the two interface cores and the computing logic.

This repository holds the synthesizable RTL of everything on the boards
except the vendor interface cores (PCIe endpoint with DMA, Aurora core). It
also holds self-checking testbenches, a reference model and a behavioural
model of the serial link.

## The chain and the board roles

```
 host ──PCIe──▶ [board 0: SST×n] ──Aurora──▶ [board 1: SST×n] ── … ──▶ [board B-1: SST×n] ──PCIe──▶ host
```

`exafpga_pipeline` (the top) instantiates `NUM_BOARDS` copies of
`basic_block`. Each board plays one of three roles, set by its position:

| board         | input                    | output                 | Aurora controllers |
|---------------|--------------------------|------------------------|--------------------|
| first         | host stream (PCIe core)  | Aurora TX to next      | 1 (output link)    |
| intermediate  | Aurora RX from previous  | Aurora TX to next      | 2                  |
| last          | Aurora RX from previous  | host stream (PCIe core)| 1 (input link)     |

With `NUM_BOARDS = 1` the single board talks to the host at both ends and has
no link. The default is two boards with 36 Jacobi-2D SSTs each on a
1000 × 1000 grid. That gives 72 time-steps, the longest Jacobi-2D queue of
the original two-board system.

The PCIe core and the Aurora cores are not RTL here. Their streams and status
signals are ports of the top:

* `host_in_*` and `host_out_*`: the two AXI4-Stream style streams of the PCIe
  core, with 32-bit data and valid/ready.
* `link_*[l]`: link *l* joins board *l* to board *l+1*. The arrays hold the TX
  stream that board *l* sends, the RX stream that board *l+1* receives, and
  the `pma_init`/`reset_pb` reset outputs of both ends. They also hold the
  `channel_up` inputs and a recovery counter for each end.
* `board_stream_rst[b]`: the reset each board applies to its SST queue.

## Streaming Stencil Time-step: how one sweep becomes a stream

This is the central mechanism. Each SST (`sst_jacobi2d`, `sst_seidel2d`,
`sst_life2d`, `sst_jacobi3d`, `sst_heat3d`) is built from the same three
parts.

**1. A sliding window (`stencil_window`).** The grid arrives in raster order:
x fastest, then y, then z. Every word goes into a delay line with taps. Tap *i*
holds the word that arrived `OFS[i]` words ago. With the right offsets, the
taps form the stencil around one element, the *centre*. Example: Jacobi-2D
with row width W uses the offsets 0, W-1, W, W+1 and 2W. These taps are the
south neighbour, the east neighbour, the centre, the west neighbour and the
north neighbour. The gaps between taps are `delay_line`s. A short gap is a
register chain. A long gap (one row in 2D, one plane in 3D) is a circular
buffer that is read before it is written, followed by an output register.
Tools map that buffer to block RAM.

**2. The update.** Combinational logic computes the new centre value from the
taps. A border element (any element on the edge of the grid) is passed
through unchanged. Position counters that follow the centre decide which
elements are border elements.

**3. A two-entry output buffer (`stream_buf2`).** Its `s_ready` is a register.
A queue of dozens of SSTs therefore has no combinational ready path running
through it.

**Frame timing.** Let N = W·H·D be the number of elements in a frame, and let C
be the centre's offset: W for Jacobi-2D, W+1 for the 3×3 kernels, W·H for the
3D kernels. A frame then needs N + C shifts:

* The first C shifts only fill the window, so no output is produced.
* Each of the next N - C shifts makes one centre available.
* The last C shifts are *flush* shifts. The SST takes no input during them
  (`s_ready` low), pushes zeros into the window and so releases the final
  centres.

One more cycle hands over the last centre. An unstalled frame therefore
occupies **N + C + 1 input cycles**. The first result leaves a few cycles more
than C after the first input. A queue of k SSTs adds roughly k·C cycles of
latency, and its throughput stays one element per cycle apart from the
C + 1 cycles lost per frame. Neighbours that come from the previous or the
next frame only ever surround border elements, which are passed through. So
frames can follow each other directly.

**Handshake rules inside the window.** `pend` means that the taps hold a
centre that has not been used yet. The SST raises `take` in the cycle it
writes the result into its output buffer. A shift can happen only when no
centre is pending or the pending centre is taken in the same cycle. This is
why back-pressure from downstream simply freezes the window.

### Seidel: feeding results back

Gauss-Seidel updates in place. When element (r, c) is updated, the elements
above it and the element to its left already hold their new values. In a
raster stream those values are results that the SST has just emitted.
`sst_seidel2d` therefore keeps an *output history* next to the input window:

* a register for the left neighbour (the last result);
* a `delay_line` W-2 words long, and two single registers, for the three
  neighbours in the row above.

Only the current element, its east neighbour and the three neighbours below
come from the input window (taps 0, 1, 2, W, W+1). All feedback goes through
registers, so Seidel also runs at one element per cycle.

### The kernels

| module         | update of an interior element (binary32 unless noted)          | FLOPs | C     |
|----------------|----------------------------------------------------------------|-------|-------|
| `sst_jacobi2d` | 0.2f·((((c+w)+e)+s)+n)                                         | 5     | W     |
| `sst_seidel2d` | (1/9f)·(nw+n+ne+w+c+e+sw+s+se), new nw, n, ne, w, summed left to right | 9 | W+1 |
| `sst_life2d`   | integer cells, non-zero = alive: 1 if 3 live neighbours, or 2 and alive, else 0 | – | W+1 |
| `sst_jacobi3d` | (1/7f)·(c+xm+xp+ym+yp+zm+zp), summed left to right             | 7     | W·H   |
| `sst_heat3d`   | c + 0.125f·((xm+xp+ym+yp+zm+zp) − 6f·c)                       | 9     | W·H   |

The operation counts agree with the roughly 5·10⁶ FLOPs per 1000 × 1000
Jacobi-2D sweep (998·998·5 = 4,980,020) that the original system was
evaluated with. The coefficients, the order of the additions, the exact
heat-3D formula and Seidel's multiplication by 1/9 (instead of a division)
are this implementation's choices.

### Arithmetic

`exafpga_pkg` has a binary32 adder (`fp_add`) and multiplier (`fp_mul`) as
combinational functions:

* rounding is to nearest, ties to even;
* subnormal inputs and results are flushed to zero;
* overflow gives infinity;
* NaNs get no special handling.

Each SST evaluates its whole update within one clock cycle: up to nine adders
in series plus a multiplier. This is the simplest correct form. The
high-level-synthesis SSTs of the original system are pipelined and run at a
higher clock. Anyone retargeting this RTL for speed should pipeline the update
between the window and the output buffer. The window's `pend`/`take`
handshake only needs a valid/ready pipeline in that place.

## Bringing the serial links up

The Aurora core has a transceiver reset (`pma_init`) and a core reset
(`reset_pb`), and it reports `channel_up` once the lanes are aligned. Its
stream interface runs on a user clock that the core generates, and that clock
has no reset. Two small blocks handle this.

* **`aurora_link_ctrl`** is a four-state FSM:
  1. `PMA_INIT` holds both resets for `PMA_INIT_CYCLES`.
  2. `RESET_PB` releases the transceiver, then holds the core reset for
     `RESET_PB_CYCLES`.
  3. `WAIT_UP` waits for `channel_up`. If the channel is not up after
     `UP_TIMEOUT` cycles, the FSM starts the sequence again.
  4. `UP` watches the link. If `channel_up` is low for `DOWN_FILTER`
     consecutive cycles (a pulled cable, loss of lock), the FSM starts the
     sequence again.

  Every restart increments `recoveries`. A shorter glitch is ignored.
* **`stream_reset_gen`** resets the stream logic. It passes the `link_up` of
  every link on the board through a two-flop synchroniser. It holds
  `stream_rst` high while any link is down and for `HOLD_CYCLES` after all
  links are up. The SST queue therefore starts clean each time the board's
  links come (back) up. While it is reset, the queue does not accept input.

When a link fails, both boards on that link reset their queues, and the
frames that were in flight on those boards are lost. Boards further along the
chain are not reset. A host that sees a link recovery (the `recoveries`
counters) should drain the chain and send the frames again. The end-to-end
testbench breaks a link only while the chain is idle.

## Parameters

| parameter (top)        | default      | meaning |
|------------------------|--------------|---------|
| `NUM_BOARDS`           | 2            | boards in the chain |
| `SSTS_PER_BOARD`       | 36           | SSTs in each board's queue (72 time-steps in total) |
| `KERNEL`               | `K_JACOBI2D` | kernel of all SSTs (`exafpga_pkg::kernel_e`) |
| `GRID_W/H/D`           | 1000/1000/1  | grid size; use e.g. 100/100/100 for the 3D kernels |
| `PMA_INIT_CYCLES`      | 128          | transceiver reset time |
| `RESET_PB_CYCLES`      | 32           | extra core reset time |
| `UP_TIMEOUT`           | 4096         | cycles to wait for `channel_up` before retrying |
| `DOWN_FILTER`          | 8            | low cycles of `channel_up` that count as a failure |
| `HOLD_CYCLES`          | 16           | stream reset kept after all links are up |

Every SST of one size needs about 2·C words of delay-line storage:

* 64 kbit per SST for a 1000-wide 2D grid, so the default 72-SST chain holds
  4.6 Mbit.
* 640 kbit per SST for a 100³ grid. A 48-SST Jacobi-3D chain then needs
  30.7 Mbit, which is most of a Virtex-7 485T's block RAM and in line with the
  block RAM use reported for the original system.

Each benchmark needs its own build with `KERNEL` and the grid size set, as a
separate bitstream per benchmark would on the boards.

## How this RTL differs from the original system

* **SST internals.** The SSTs were generated from C by high-level synthesis,
  and their internals are not published. The window, flush and output-buffer
  scheme above is this implementation's own.
* **Frame boundaries** come from counting elements (the grid size is a
  parameter). The streams carry no TLAST.
* **Stream width.** The streams are 32 bits wide throughout. In the original
  system the datapath width changes between 32 and 128 bits along the chain,
  inside the vendor cores.
* **One clock.** The model uses one clock for everything. On the boards the
  PCIe core's clock-domain crossing separates the host clock from the Aurora
  user clock. Also, `channel_up` is sampled on the stream clock.
* **Back-pressure on the link.** The link model honours back-pressure on its
  receive side. A real Aurora streaming receive interface has no ready
  signal, so on real hardware the receive side must be kept able to accept
  data, for example with native flow control or with enough buffering.
* **Reset timing.** The reset sequence order and all cycle counts of the link
  controller and the reset generator are chosen here.
* **SST placement.** The default splits the SSTs evenly over the boards.
* **Not included:** the PCIe endpoint with its DMA engines and the Aurora
  cores (vendor IP), and the host software. The earlier prototypes of the
  system used a MicroBlaze, a DDR3 controller, an AXI DMA, a crossbar, an AXI
  chip-to-chip bridge and clock-crossing FIFOs. The final chain needs none of
  them, and none is included.

## Files

* `rtl/exafpga_pkg.sv`: word type, kernel enum, binary32 constants and
  arithmetic.
* `rtl/delay_line.sv`, `rtl/stream_buf2.sv`, `rtl/stencil_window.sv`: the SST
  building blocks.
* `rtl/sst_*.sv`: the five kernels. `rtl/sst_queue.sv` chains them.
* `rtl/aurora_link_ctrl.sv`, `rtl/stream_reset_gen.sv`,
  `rtl/basic_block.sv`: one board.
* `rtl/exafpga_pipeline.sv`: the chain (top).
* `tb/tb_ref_pkg.sv`: the reference model. It does binary32 arithmetic in
  double precision with a single rounding to binary32, and implements all
  five kernels on whole grids.
* `tb/aurora_link_model.sv`: a behavioural serial link. It has a channel-up
  delay after reset, failure injection, latency, and a rate limit of one word
  every `RATE_DIV` cycles.
* `tb/tb_*.sv`: one self-checking testbench per block. Each prints
  `TB_RESULT checks=… failures=…`.

## Simulating

Each testbench is a top module without ports. With Verilator 5:

```
verilator --binary --timing --assert -Irtl -Itb \
    rtl/exafpga_pkg.sv tb/tb_ref_pkg.sv tb/tb_exafpga_pipeline.sv \
    --top-module tb_exafpga_pipeline
./obj_dir/Vtb_exafpga_pipeline
```

Replace the testbench name to run another one. Verilator finds the remaining
modules through `-Irtl -Itb`.

What each testbench covers:

* `tb_sst_*` stream five random frames through one SST. The first frames go
  with random gaps and back-pressure, the later ones at full rate. Every word
  is checked against the reference, and so is the N + C + 1 frame period.
* `tb_sst_queue` runs a queue of every kernel type.
* `tb_aurora_link_ctrl` and `tb_stream_reset_gen` check the reset sequences,
  the glitch filter, timeouts and recovery, with exact cycle counts.
* `tb_basic_block` runs an intermediate board between two link models and
  breaks its output link.
* `tb_exafpga_pipeline` runs three boards end to end with six SSTs. The links
  are rate-limited and the host streams are irregular. A link is broken and
  recovered, and the test counts that every mechanism occurred: reset hold,
  input gaps, output stalls, link back-pressure, frame flush and link
  recovery.
* `tb_exafpga_pipeline_full` runs the top at its defaults. One 1000 × 1000
  frame passes 72 Jacobi-2D SSTs, and all 10⁶ results are compared. With the
  link taking one word every two cycles, the frame takes 2,072,150 cycles,
  because the serial link is the bottleneck of the chain. The original
  two-board system also measured its serial link as the slowest stage. The
  run takes under two minutes.
