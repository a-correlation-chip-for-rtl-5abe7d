# A convolution processor for image warping and correlation stereo

This is a convolution engine aimed at vision work rather than video. It applies
8x8 masks to an image held in external memory. The point at which each mask is
applied is not tied to a raster scan. A short program moves an 8x8 window over
the source image in small steps and names one of 64 stored masks for each
position. Because of this, one engine can do all of the following:

- inverse-mapped image warps, such as rectifying a stereo pair with sub-pixel
  interpolation (64 masks = 8x8 sub-pixel phases);
- ordinary 2D convolution;
- the 1D partial sums that a correlation stereo matcher needs.

Nothing is truncated along the way. Pixels are 16 bits, coefficients 8 bits,
each row dot product is kept at 27 bits and each 2D sum at 30 bits.

Sizes, as set by the `cc_pkg` constants and the parameter defaults:

| quantity | value |
|---|---|
| window / kernel | 8 x 8 |
| masks stored | 64 (4 Kbyte) |
| pixel / coefficient | 16-bit / 8-bit two's complement |
| MAC result / 2D result | 27 / 30 bits |
| external address | 20 bits (source and result memories) |
| throughput, unit steps | 1 result per 8 cycles (2D) or 1 per cycle (1D) |

The architecture was designed for a 20 MHz clock. At that clock a 512x512
rectified image takes about 0.105 s, which is roughly 10 images per second.

## One mask application

Eight multiply-accumulators (MACs) share one column of the window per cycle:

```
cycle c (c = 0..7):  cache column c of the window  ->  8 pixels, 128 bits
                     column c of mask m            ->  8 coefficients, 64 bits
                     MAC k += pixel[k] * coef[k]
```

After eight cycles MAC k holds the dot product of window row k with mask row k.
That is a 1D result.

The eight results leave over one shared 27-bit result bus, one per cycle, in
window-row order. The next application is already accumulating while they do.
After the bus comes the final accumulator, which has two modes:

- **2D mode:** it adds the eight row products into one 30-bit value. This gives
  one output every 8 cycles.
- **1D mode:** it is bypassed. Each row product is written out sign-extended,
  one output per cycle.

Pipeline (`corr_chip`):

1. Cycle 0: the controller addresses the coefficient store (`coef_store`) and
   the image cache (`image_cache`). Both are synchronous RAMs.
2. Cycle 1: the switching stage rotates the coefficients (`switching_stage`)
   and the MACs accumulate (`mac`, `mac_array`).
3. The result bus and `final_acc` follow. `dout_we`, `dout_addr` and
   `dout_data` then write the result to the output memory.

The first 1D result of an application leaves 2 cycles after its last column is
addressed. The 2D result leaves 9 cycles after it.

## The window cache and why coefficients are rotated

The aim is that a window step of one pixel costs only the 8 new pixels. Those 8
pixels arrive from external memory at one per cycle, during the 8 cycles in
which the current window is being used.

Addressing is modulo 8. Source pixel (x, y) is kept in cache cell
(y mod 8, x mod 8). When the window moves one pixel east, the pixels of the
column that leaves are replaced by those of the column that enters. All other
pixels stay where they are. As a result, the window's top-left corner wanders
around the cache:

- **x-offset:** handled by addressing. Window column c is read from physical
  column (x0 + c) mod 8.
- **y-offset:** cannot be handled by addressing. All eight rows are read in
  parallel, one per MAC, so MAC k sees window row (k - y0) mod 8. The
  *coefficients* are rotated instead: mask row r goes to MAC (r + y0) mod 8.
  That barrel rotation is the switching stage. The result bus undoes the
  rotation, so results always come out in window-row order.

**The ping/pong banks.** The cells that receive the next window's pixels are
the ones the current window is still reading. For that reason each cell exists
twice, in virtual RAM A and in virtual RAM B:

- A per-cell bit `sel` says which copy is *readable*. The other copy is
  *writable*.
- Incoming pixels go to the writable copy, and the cell is marked *pending*.
- When the window is handed over to the MACs, `flip` toggles `sel` for every
  pending cell.

At any moment, then, some regions of A and some of B are readable. After a
step south, the new top row is readable in one bank and the old one is
writable. After a further step east, a column changes sides as well.

In hardware the cache is eight row RAMs. Each holds both banks of its row,
16 pixels, with one read port and one write port.

Two timing details make steps without stalls possible:

- A read in the flip cycle still sees the old banks. That cycle is the last
  column of the previous window.
- A pixel that arrives in the flip cycle is handed over together with the rest.

So the last of the 8 new pixels may arrive in the very cycle the window is
handed over.

**Which pixels to fetch** (`addr_gen_in`). For the new window origin (nx, ny)
and the cached origin (ox, oy), every pixel of the new window that lies outside
the old one is fetched. The loader keeps these as a 64-bit mask. Each cycle it
takes the lowest set bit and issues the address:

```
din_addr = in_base + (ny + j) * in_pitch + (nx + i)    (mod 2^20)
```

The pixel comes back `IN_LAT` cycles later. Its cache cell travels alongside it
in a short delay line. The cost of a step follows directly:

| step | pixels fetched | stall cycles (IN_LAT = 1) |
|---|---|---|
| 0 | 0 | 0 |
| one pixel along x or y | 8 | 0 |
| one pixel diagonally | 15 | 7 |
| k pixels along one axis, k < 8 | 8k | 8k - 8 |
| 8 or more | 64 | 56 |
| first window of a program | 64 | 64 |

A larger `IN_LAT` adds `IN_LAT - 1` stall cycles to every window. The host can
read the number of stall cycles in the `STALLS` register.

## Programs

A program is a stream of 16-bit instructions. Each instruction moves the window
and then applies one mask:

```
 15    14    13..8     7..4        3..0
[xneg][yneg][mask id ][y step 0-15][x step 0-15]
HALT = 0xC000 pattern: xneg = yneg = 1 with both steps 0 (mask bits ignored)
```

- Programs start at the origin (`X0`, `Y0`) set by the host, with an empty cache.
- The first instruction's step is applied to that origin.
- Coordinates are 16 bits and wrap around.

The controller (`controller`) has two stages, which overlap:

- **Load stage:** takes the next instruction from the queue and moves the
  origin. It then has `addr_gen_in` fill the cache.
- **Apply stage:** runs the 8 columns of the current window.

A window is handed over when its load is complete and the apply stage is on its
last column or idle. The next load starts in that same cycle.

When the queue is empty, the chip simply waits. On HALT it lets the datapath
drain for 12 cycles, then clears `running` and sets `halted`.

Results go to the output memory in raster order (`addr_gen_out`):

```
out_base + line * out_pitch + col,    with col < out_width
```

A scan path over the source image that stays smooth, for example a
rectification warp whose output is scaled so that almost all steps are 0 or 1,
runs at the full rate. A polar transform also works, but steps larger than one
pixel stall.

## Host interface

The host sees a small static RAM:

- `host_cs` with `host_we` writes `host_wdata` to `host_addr`.
- `host_cs` alone reads; the data appears on `host_rdata` in the next cycle.

Address map:

| host_addr | access | meaning |
|---|---|---|
| `0x000-0xFFF` | w | coefficient byte `{mask[5:0], row[2:0], col[2:0]}`, data bits 7:0 |
| `0x1000` CTRL | r/w | bit 0: start a program (self-clearing; empties the queue), bit 1: 2D mode |
| `0x1001/0x1002` | r/w | source image base address, bits 15:0 / 19:16 |
| `0x1003` | r/w | source image line pitch |
| `0x1004/0x1005` | r/w | output base address, bits 15:0 / 19:16 |
| `0x1006` | r/w | output line width (results per line) |
| `0x1007` | r/w | output line pitch |
| `0x1008/0x1009` | r/w | start origin X0 / Y0 |
| `0x100A` INSTR | w | push one instruction (ignored when the queue is full) |
| `0x100B` STATUS | r | bit 0 running, bit 1 halted, bit 2 queue full, bits 15:8 queue level |
| `0x100C` STALLS | r | stall cycles of the current or last program (saturating) |

Some rules for the host:

- Masks can be rewritten while a program runs, because the coefficient store
  has separate host and datapath ports.
- The configuration registers should not change during a run.
- To keep a long program fed, the host checks STATUS bit 2 before each push.
  The queue is 16 deep, and one instruction is used every 8 cycles.

## External memories

| signals | behaviour |
|---|---|
| `din_addr`, `din_rd` → `din_data` | The pixel for an address driven with `din_rd` in cycle t must be on `din_data` in cycle t + `IN_LAT`. The default, 1, is a synchronous SRAM. |
| `dout_addr`, `dout_data`, `dout_we` | One result per strobe. |

All logic is synchronous to `clk`. `rst_n` is an active-low asynchronous reset
of the control state; the RAM contents are not cleared.

## What follows the architecture and what was chosen here

**Taken from the architecture:**

- the block structure: two address generators, the control, the window cache,
  the 4 Kbyte coefficient store, the switching stage, 8 MACs and a final
  accumulator with a 1D bypass;
- the bus widths: 16-bit pixel input, 128-bit column, 64-bit coefficients,
  27-bit MAC results, 30-bit output and 20-bit addresses;
- 64 masks of 8x8 8-bit coefficients;
- the ping/pong cache with coefficient rotation for the y-offset;
- programs of mask id, y step and x step with HALT;
- the 8-cycle and 1-cycle output rates.

**Chosen in this design:**

- **Pixels are signed.** This lets differenced images be filtered. It is also
  what makes the 27-bit MAC width exact.
- **Instruction layout.** The two bits left over in the 16-bit instruction
  became direction bits, and HALT uses the otherwise meaningless "minus zero"
  step. Steps are therefore 0..15 in each direction.
- **Step before mask.** The step is applied before the mask, from a host-set
  start origin.
- **Program storage.** Programs are streamed through a 16-word queue rather
  than stored on chip, so their length is unlimited.
- **Stall-free moves.** A unit step along one axis is the move that runs
  without stalls. A diagonal unit step stalls for 7 cycles, because 15 pixels
  cannot arrive in 8 cycles.
- **Fetch order.** Missing pixels are fetched in raster order within the
  window.
- **Host side.** The whole host register map and the status and stall
  registers.
- **Memory and layout.** The external memory timing (`IN_LAT`) and the memory
  layout (base plus line pitch).
- **Results.** The raster output address generator, and the order of 1D
  results (window row 0 first).
- **Latencies.** All pipeline latencies.
- **Cache organisation.** Each physical row RAM holds both banks of its row,
  with one bank-select bit per cell.

**Not part of this RTL:**

- the host processor, which loads masks and programs and does the high-level
  parts of the stereo algorithm (normalisation, edge selection, match
  selection, depth);
- the off-chip image memories;
- all physical aspects: process, pads and clock generation.

## Files

| file | content |
|---|---|
| `rtl/cc_pkg.sv` | widths, types, instruction format, register map |
| `rtl/corr_chip.sv` | top level |
| `rtl/controller.sv` | program sequencing, hand-over, stalls, halt |
| `rtl/addr_gen_in.sv` | cache loader: which pixels, their addresses and cells |
| `rtl/image_cache.sv` | 8x8 window cache with per-cell A/B banks |
| `rtl/coef_store.sv` | 64 x 8 x 8 coefficient RAM |
| `rtl/switching_stage.sv` | coefficient barrel rotation |
| `rtl/mac.sv`, `rtl/mac_array.sv` | multiply-accumulators and result bus |
| `rtl/final_acc.sv` | 2D accumulator / 1D bypass |
| `rtl/addr_gen_out.sv` | raster output addresses |
| `rtl/instr_fifo.sv` | instruction queue |
| `rtl/host_regs.sv` | static-RAM-like host port |
| `tb/tb_<module>.sv` | self-checking testbench of each module |
| `tb/tb_corr_chip.sv` | end-to-end test of the whole chip |
| `tb/tb_rectify.sv` | workload: rectification warp with sub-pixel Gaussian masks (2D mode) |
| `tb/tb_stretch.sv` | workload: block stretching by linear interpolation (1D mode) |

## Simulating

Every testbench prints `TB_RESULT checks=N failures=M` and stops itself. A
watchdog limits each run. For example:

```
verilator --binary --timing --assert -Irtl -y rtl -y tb \
    rtl/cc_pkg.sv tb/tb_corr_chip.sv --top-module tb_corr_chip -Mdir obj -o sim
./obj/sim
```

Replace `tb_corr_chip` with any other testbench name to run it. Lint a module
with `verilator --lint-only -Wall -Irtl -y rtl rtl/cc_pkg.sv rtl/<module>.sv`.
Verilator warns that `rst_n` is used both asynchronously and synchronously; the
synchronous use is the `disable iff` of an assertion in the cache.

**`tb_corr_chip`** runs the top at its default sizes. It loads 64 random masks.
It models the source memory as a hash of the address and records every write
to the result memory. It then runs four programs, 2D and 1D, which include:

- unit steps in all four directions, zero steps, diagonal steps and jumps of up
  to 15 pixels;
- a host that lets the queue run dry;
- a mask reload and restarts.

A reference model computes every result and its address. The test also checks:

- the rates: 8 cycles per 2D result, 1 cycle per 1D result;
- that unit-step programs stall only for the first window (64 cycles);
- that jumps do stall.

It counts every mechanism it exercises and fails if any never happened.

**`tb_rectify`** rectifies a 16 x 12 output image. Each output pixel maps back
through a 4 degree rotation and a 0.9 scale to a source point rounded to 1/8
pixel. The 64 masks are a Gaussian of standard deviation 1 pixel at the 64
sub-pixel phases; the source image is a linear ramp. The test checks:

- every result exactly;
- that each result, divided by its mask sum, gives the ramp at the mapped point
  to within 0.2 pixel;
- the stall count, against the step cost table above.

In this run 170 of the 191 steps are stall-free. The other 21 include the 11
line returns of the raster output order.

**`tb_stretch`** resamples an 8-row block at five stretch factors from 0.75 to
1.25 in 1D mode, using 2-tap linear-interpolation masks. It checks every
result, the rate of one result per cycle when all steps are 0 or 1, and the
extra stalls of the 2-pixel steps.

## Sizing against the intended uses

- **Rectifying a 512 x 512 image (2D mode).** At 8 cycles per result this takes
  2.1 M cycles: 0.105 s at 20 MHz, about 9.5 images per second, before stalls.
  The image needs 262144 of the 2^20 source addresses.
- **Sub-pixel interpolation to 1/8 pixel in x and y.** This needs 64 masks of
  8x8 8-bit coefficients, which is exactly the 4 Kbyte store.
- **Correlation partial sums over 16-pixel blocks (1D mode).** The hardware
  delivers 8-tap sums, one per cycle. A 16-tap row sum is two results added by
  the host, and template values must fit 8-bit coefficients.
- **Compute rate.** 8 MACs give 1.6e8 multiply-accumulates per second at
  20 MHz. The more than 1e7 MACs of a 256 x 256 stereo pair therefore take at
  least 63 ms.

## How far it has been checked

Each module has its own randomised testbench against an independent model.
Each of these testbenches has been shown to fail on a deliberately broken copy
of its module. Examples of the faults: a rotation in the wrong direction,
writes into the readable bank, an overlap test off by one, and the window
x-offset ignored.

What these tests cover is the logic and the cycle timing. The RTL has not been
synthesised to a cell library, so whether it closes timing at 20 MHz is not
known. The design has also not been compared with any real silicon.
