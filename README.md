# Dual-kernel stream processor with adaptive scheduling and five clock domains

This is synthesizable SystemVerilog for a small multimedia processor in which
graphics and video work is run as *streams*. A stream is a sequence of
elements such as vertices, pixels or macroblock data. Fetching the data is
separated from computing on it:

- a **stream fetch unit** moves elements between external memory and an
  on-chip buffer;
- two programmable **unified stream kernels** run short programs on every
  element;
- fixed-function **graphics engines** (triangle setup, rasteriser, depth and
  colour) sit between and after the kernels in graphics mode.

Two system-level mechanisms are the heart of the design:

- **Adaptive task scheduling (ATS).** A job is split into two stages, for
  example vertex work and pixel work. The two kernels normally split the
  stages one each. When one stage becomes the bottleneck, both kernels are
  moved onto it.
- **Power-aware frequency scaling (PAFS).** The chip is split into five clock
  domains. A domain whose units are idle has its clock gated. When the
  estimated power exceeds a budget, low-priority domains are slowed down.

The arithmetic target is 200 MHz, with 6.4 GFLOPS single precision and
16 GOPS for 8-bit additions and 32-bit multiplications.

## Block map

| file | block | clock |
|---|---|---|
| `sp_top.sv` | top: register port, wiring, idle detection | all |
| `pafs.sv`, `pafs_div.sv`, `pafs_icg.sv` | clock controller, divider, gating cell | PLL / SCLK |
| `sfu.sv` | stream fetch unit | HCLK |
| `mc.sv` | memory controller (SFU + CPU onto one bus) | HCLK |
| `cma.sv` | configurable memory array: 10 KB, 4 partitions | CCLK |
| `ats.sv` | adaptive task scheduler | CCLK |
| `usk.sv`, `usk_exe.sv`, `fp_add.sv`, `fp_mul.sv` | stream kernel, its 4-lane execution unit, FP32 units | UCLK |
| `gse_setup.sv`, `gse_raster.sv`, `gse_rop.sv` | triangle setup, rasteriser, depth/colour engine | GCLK |
| `cdc_fifo.sv` | dual-clock FIFO used at every domain crossing | two |
| `sp_pkg.sv` | shared types, instruction encoding, ATS modes | — |

The general-purpose RISC CPU, the system bus and external memory are not
part of the RTL. The top instead provides three ports:

- a simple valid/ready **register port**, in place of the system bus;
- a **second master port** on the memory controller, for the CPU's cache
  refills;
- an **external memory bus**.

## The stream model and the memory array

The stream unit of work is an **element pair**: two elements of four 32-bit
lanes, 256 bits in all. One element goes to each of a kernel's two threads.
The memory array holds 320 pairs (10 KB). Software splits it into four ring
buffers through the `CMA_CFG` register:

| partition | stream mode | graphics mode |
|---|---|---|
| P0 | SFU load → stage 0 | vertices → vertex kernel |
| P1 | stage 0 → stage 1 | transformed vertices → triangle setup |
| P2 | stage 1 → SFU store | shaded fragments → depth/colour engine |
| P3 | unused | rasteriser fragments → pixel kernel |

Every pair carries a one-bit **stage tag** on its way to and from a kernel:

- The array tags a pair by the partition it came from: 0 from P0, 1 from
  the stage-1 input (P1 or P3).
- A kernel at a task boundary waits for a pair and starts the program at
  `stage_pc[tag]`.
- Its outputs keep the tag, and the tag picks where they are written: P1
  for tag 0, P2 for tag 1.

So a kernel never needs to be told which stage it serves. It serves whatever
the scheduler routes to it.

**Scheduling rule.** The scheduler watches how full P0 and the middle
partition are. The middle partition is P1 in stream mode and P3 in graphics
mode.

- **Pixel-bound:** the middle partition is at least ¾ full, or the input is
  empty while the middle partition still holds data. Both kernels read the
  middle partition.
- **Vertex-bound:** the middle partition is under ¼ full and input is
  waiting. Both kernels read P0.
- **Balanced:** all other cases. Kernel 0 reads P0 and kernel 1 reads the
  middle partition.

A switch takes effect at each kernel's next task boundary.

When both kernels read one partition, pairs can leave the stage in a
different order than they entered it. Stream jobs whose elements are
independent do not care. For triangles, the three vertices must arrive in
order. The limitation and the workaround are under "Differences from the
source design".

## The kernel

Each kernel is a 64-bit, two-slot VLIW processor with two threads in
lockstep. Each thread has four 32-bit lanes and sixteen 128-bit registers.
The encoding is in `sp_pkg.sv`.

- **Slot 0:** FP add/sub, integer add/sub, 8-bit SIMD add, 8-bit absolute
  difference (the SAD step of motion estimation), MOV, FP→int, FP and integer
  immediates, LD, ST, END.
- **Slot 1:** FP multiply, FP multiply-add, integer multiply.

Timing and program rules:

- One instruction issues per cycle.
- LD stalls while no input pair is present. ST stalls while the output FIFO
  is full.
- END returns to the task boundary.
- Results are written in the cycle after issue. If both slots name the same
  register, slot 1 wins.
- A kernel run costs its instruction count plus one boundary cycle.
- A program should LD exactly once per run.
- FP32 follows round-to-nearest-even, and denormals are flushed to zero.

Programs are written through `IM_LO`/`IM_HI`/`IM_WR` into a 4-entry queue,
and from there into the 128-word (1 KB) instruction memory of either kernel
or both. Write them while the kernels are idle.

**Peak rates.** At 200 MHz the peaks match the targets:

- 2 kernels × 2 threads × 4 lanes × FMAD = 32 flops/cycle = 6.4 GFLOPS.
- Adding 8-bit SIMD adds and integer multiplies gives 64 + 16 = 80
  ops/cycle = 16 GOPS.

## Graphics engines

- **Triangle setup** takes a triangle list, one vertex per cycle. Each vertex
  has lanes x, y, depth and colour, as integer pixels. For each triangle it
  computes:
  - three edge functions `E = A·x + B·y + C`, signed so that the inside is
    `E ≥ 0` whichever way the triangle winds;
  - the bounding box, clipped to the frame, with its left edge rounded down
    to an even column;
  - flat depth and colour, taken from the first vertex.

  Degenerate triangles and triangles entirely off the frame are dropped.
- **Rasteriser** walks the box two pixels per cycle and updates the edge
  values incrementally. It emits a fragment pair whenever at least one of the
  two pixels is covered. In a fragment, lane 0 is `{covered, x}`, lane 1 is
  y, lane 2 is depth and lane 3 is colour.
- **Depth/colour engine** holds a 64×64 frame on chip. It runs a "less than"
  depth test, one pair per cycle, and supports a clear (one pair per cycle)
  and read-back through the register port.

## Clocks and power

PAFS takes the PLL clock and produces five clocks:

- **SCLK:** never gated. It runs PAFS itself and would run the CPU's wake-up
  logic.
- **HCLK:** register port, SFU and memory controller.
- **GCLK:** graphics engines.
- **CCLK:** memory array and scheduler.
- **UCLK:** kernels.

Each of the four domain clocks has a divider (÷1, 2, 4 or 8, changed only at
the divider's wrap, so no short pulse is produced) followed by a latch-based
gating cell.

**Level 1 (scaling).** The power estimate is the sum of the 8-bit weights
(`PAFS_COST`) of the busy domains. If the estimate exceeds `PAFS_BUDGET`, PAFS
enters low-power state. While in low-power state, domains marked low-priority
use their low-power divide ratio instead of the nominal one.

**Level 2 (gating).** Each domain's idle flag passes through two SCLK flops.
When enabled, an idle domain's clock is stopped.

**Idle definition.** This is the subtle part. A domain counts as idle only
when all three hold:

- its own units have nothing to do;
- no FIFO into it holds data;
- no FIFO out of it holds data.

The FIFO occupancy is taken from the writer's side of each dual-clock FIFO,
which stays valid while the reader's clock is stopped. So data arriving for a
gated domain wakes it. A writer keeps its own clock until it has seen its
FIFO drained. Without that last rule the writer's view could stay "non-empty"
forever, and keep the reader's clock running for nothing.

**Configuration.** Configuration and mode bits cross domains without
synchronisers. Change them only while the units that use them are idle.

## Register map (word addresses on the register port)

| addr | name | contents |
|---|---|---|
| 0x00 | CTRL | [0] run [1] ats_en [2] scale_en [3] gate_en [4] graphics mode [5] depth test |
| 0x01 | STAGE_PC | [6:0] stage-0 entry, [14:8] stage-1 entry |
| 0x02 | CMA_CFG | [1:0] partition, [10:2] base, [19:11] size (pairs) |
| 0x03 | SFU_BASE | word address |
| 0x04 | SFU_SP | [15:0] element stride in words, [31:16] pairs |
| 0x05 | SFU_GO | write [0]=1 store / 0 load; read [0] busy, [31:16] commands done |
| 0x06 | PAFS_DIV | [7:0] nominal log2 ratios H,G,C,U; [15:8] low-power ratios; [19:16] low-priority mask |
| 0x07 | PAFS_COST | four 8-bit weights H..U |
| 0x08 | PAFS_BUDGET | [9:0] |
| 0x09/0x0A/0x0B | IM_LO / IM_HI / IM_WR | instruction halves; write [6:0] address, [8] kernel 0, [9] kernel 1 |
| 0x0C | ROP_CLEAR | clear frame to this colour |
| 0x0D | ROP_ADDR | pixel-pair address (y·64+x)/2 |
| 0x0E/0x0F/0x10 | colour even, colour odd, {odd, even} depth | read-back |
| 0x11–0x19 | statistics (read while idle) | scheduler switches, ROP pixels written, ROP pixels rejected, divider ratios in effect, USK0/USK1 instructions, kernel runs {USK1, USK0}, triangles, fragment pairs |

Elements sit in external memory at `base + e·stride`, four words each. Pair
*p* is elements 2*p* and 2*p*+1.

## Simulating

Each block has a self-checking testbench in `tb/`. Each one prints
`TB_RESULT checks=N failures=M`. The package must come first:

```
verilator --binary --timing -Wno-fatal --top tb_sp_top \
  rtl/sp_pkg.sv $(ls rtl/*.sv | grep -v sp_pkg) tb/ext_mem_model.sv tb/tb_sp_top.sv
./obj_dir/Vtb_sp_top
```

`tb_sp_top` runs the whole design at its default sizes and takes a few
seconds. It acts as the CPU and runs three jobs:

1. Two stream jobs of 96 pairs each, with kernels computing `x·3` and then
   `x+5`. One job makes stage 1 slow and the other makes stage 0 slow.
   Every stored element is checked.
2. One graphics job with eight random triangles. The full frame is read back
   and compared with a reference rasteriser.

Meanwhile the testbench fires random CPU reads at the memory controller. It
counts, and requires at least once each:

- vertex-bound and pixel-bound scheduling;
- clock gating;
- low-power entry;
- the slowed graphics clock;
- kernel output stalls;
- memory contention;
- depth rejections.

`tb/ext_mem_model.sv` is a behavioural external memory with fixed latency and
random back-pressure.

## Differences from the source design

The source design is a published chip. Many of its details are not public,
so the items below are this design's own choices or omissions:

- **Not built:**
  - the RISC CPU and its caches;
  - the system bus, replaced by a register port;
  - the texture units inside each kernel;
  - the cache configuration of the memory array (only the partitioned buffer
    use is built);
  - adaptive multithreading, which varies the thread count with element size
    (two threads are fixed here);
  - the PLL.
- **Own design, not from the source:**
  - the instruction set and its encoding;
  - the stage-tag mechanism;
  - the scheduling thresholds (¾ and ¼);
  - the power estimate as a sum of weights;
  - the register map;
  - the FIFO-based clock crossings;
  - the edge-function rasteriser;
  - the flat-shaded triangles;
  - the 64×64 on-chip frame;
  - 16-bit depth;
  - all widths.
- **Vertex order under vertex-bound scheduling.** Two kernels working on
  the vertex stage can swap pairs, which would mix the vertices of different
  triangles. Per-pair sequence numbers would fix this but are not built. The
  full-system test meets the ordering need because both kernels run
  identical fixed-length programs. Software that needs strict order should
  clear `ats_en` during vertex work, or use kernel programs of equal length.
- **Throughput.** The rasteriser and the depth engine reach 2 pixels/cycle,
  which is 400 Mpixels/s at 200 MHz. Setup reaches 1 vertex/cycle. The
  end-to-end vertex and pixel rates depend on kernel program length: a run
  costs its instructions plus one cycle, for two elements.
- **Power.** Power figures cannot be checked in RTL.
