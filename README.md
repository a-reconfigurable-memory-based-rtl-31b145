# Memory-based parallel histogram generator

This RTL computes the gray-level histogram of a 256 x 256 image with 8-bit
pixels. A plain read-modify-write histogram unit spends one RAM update on
every pixel. This design does better. It holds a small window of pixels in
registers, and in each clock it picks one gray level that is still waiting to
be counted. It then counts every copy of that level in the window at once, and
adds the total to the level's bin with a single RAM update. The window slides
over the image one column at a time. A column leaves the window only when
every pixel in it has been counted.

The architecture is a published one: a memory-based parallel histogram
algorithm with processing blocks in a pipeline, a selection unit and a
dual-port storing unit. The block structure, signal names (`q`, `P`, `S0`,
`S1`, `K`, `D`, `C_r`, `c_control`, `t`, `mem_ads`, `mem_enable`, `R3`) and
sizes follow that description. The control details it leaves open were filled
in here, and the original is inconsistent in a few places. Both are listed in
[Departures and choices](#departures-and-choices).

## The window and its status bits

The window is `T` rows by `N` columns of pixel registers `M[i][r]`. Each
column sits above one *processing block*. The defaults are `T = 3` and
`N = 3`. Every pixel carries a status bit `D[i][r]`, which is 1 while the
pixel still has to be counted.

Each clock, one value `P` is broadcast to all `T x N` comparators:

```
K[i][r] = D[i][r] & (M[i][r] != P)          still pending after this clock
C_r     = sum_i ~K[i][r] - sum_i ~D[i][r]   pixels of block r counted now
C       = sum_r C_r                         histogram[P] += C
```

`C_r` is the number of pending pixels of column `r` that equal `P`. The
processing block forms it as the difference of two zero counts, as the
original block diagram draws it.

At the clock edge, the status registers take `K`, so the matched pixels are
now marked as counted. The exception is a clock where the window shifts.

## Choosing P and shifting: the selection unit

The selection unit looks only at the last block, `N`:

* `q = NOR(K[.][N])`. It is 1 when block `N` has nothing left to count. Then
  the whole window shifts one column right. Pixels and status bits move
  together: block `r` takes `K[.][r-1]` from its left neighbour. Block 1 takes
  the next word of the frame store, with status 1 on every row that holds an
  image pixel.
* Two priority encoders give `S0 = min{i | K[i][N]}` and
  `S1 = min{i | K[i][N-1]}`.
* If the window holds (`q = 0`), the next value is the first pending pixel of
  block `N`, at row `S0`. If it shifts (`q = 1`), block `N` is about to
  receive block `N-1`'s contents, so the next value comes from row `S1`.
* The chosen index is registered as `S`. In the next clock,
  `P = M[S][N]`, read through a `T:1` multiplexer.

Why this is always correct:

* A pixel is counted exactly once: when its status bit is 1 and it equals the
  `P` of that clock.
* A pixel can only leave the window from block `N`, and only when `q = 1`,
  which means everything in block `N` has been counted.
* `P` may be any value, even one that was counted before. Counting the pending
  copies of any value and adding them to that value's bin is always right. A
  badly chosen `P` only wastes a clock. This happens when block `N-1` is empty
  at a shift and `S` falls back to row 0.

Each clock therefore either shifts the window or counts at least one pixel of
block `N`. An image of `WORDS = ceil(PIXELS / T)` words needs exactly
`WORDS + N` shifts. This covers `N` shifts to fill the window and to empty it.
It needs at most one further clock per distinct value in each column passing
block `N`. At full size the measured counting clocks are:

| image (256 x 256, 8 bit)               | counting clocks | per pixel |
|----------------------------------------|-----------------|-----------|
| uniformly random pixels                | 63 793          | 0.97      |
| smooth diagonal ramp with light noise  | 32 833          | 0.50      |

With a 3 x 3 window, the design gains most on images with many repeated
neighbouring values. A larger `T` or `N` catches more repeats per clock, at
the cost of `T x N` comparators.

## From C to the histogram RAM: the storing unit

`count_sum` applies the gating the original diagram shows. Block `r`'s `C_r`
goes through a mux that passes it while `c_control[r] | t`, and gives 0
otherwise. The result is registered, and the registered values are summed into
`C`. Because of that register, `C` trails `P` by one clock, so `count_sum`
also registers `P` and the "update valid" flag. Its outputs are then one
aligned update: `histogram[p_d] += c`.

The storing unit is a two-stage read-modify-write on a simple dual-port RAM
(port A writes, port B reads):

| clock | action |
|-------|--------|
| k     | Port B reads bin `P` (only if `mem_enable`). `P`, `C` and `mem_enable` are registered as `ADDRA`, `C` and `x`. |
| k+1   | `data_in = (x ? DOUTB : R3) + C` is written to bin `ADDRA` and loaded into `R3`. |

Two updates to the same bin on consecutive clocks would break this: the
second read happens on the same edge as the first write, and the RAM returns
the old value. The controller detects this case and drives `mem_enable` low.
The mux then takes `R3`, which holds the value just written. In this design
the case arises after a shift where `S` fell back to a pixel of the level that
was just counted. It is common in flat image regions.

## Sequencing

`hist_controller` runs `IDLE -> CLEAR -> RUN -> DRAIN -> IDLE`:

1. **start** empties the window (all `D = 0`) and zeroes `S` and `mem_ads`. It
   sets `t` and starts a sweep that writes 0 to all 256 bins (256 clocks).
2. **RUN**: every clock is a counting clock.
   * On each shift, `mem_ads` (the word entering block 1) advances until every
     word has been read.
   * The `c_control` flags move right with the data. A flag is 1 for blocks
     that hold image columns.
   * `t` falls once the first image column reaches block `N`.
   * The window starts empty, so `q = 1` in the first clocks and it fills by
     itself.
3. The run ends on the shift that moves the last image column out of block
   `N`.
4. **DRAIN** waits two clocks, so the last update can pass the `count_sum` and
   storing-unit registers. Then `done` rises. It stays high until the next
   `start`.

The frame store reads synchronously. The controller therefore presents the
address that `mem_ads` will have after the current clock. Word `mem_ads` is
then always on the memory output when a shift takes it.

## Interface of `histogram_top`

| port | dir | width | use |
|------|-----|-------|-----|
| `clk`, `rst_n` | in | 1 | clock; asynchronous active-low reset |
| `img_we`, `img_waddr`, `img_wdata` | in | 1, 15, 3x8 | load the frame store, one word of `T` pixels per clock; image pixel `n` goes to word `n / T`, row `n % T` |
| `start` | in | 1 | one-clock pulse while idle: clear the bins and count the stored image |
| `busy` | out | 1 | clearing, counting or draining |
| `done` | out | 1 | histogram complete; held until the next `start` |
| `hist_rd_en`, `hist_rd_addr` | in | 1, 8 | read a bin while idle |
| `hist_rd_data` | out | 17 | bin count, one clock after the read |

65536 is not a multiple of 3, so the last word holds one pixel. Row-valid flags
from the frame store make the unused rows enter the window already counted.

## Parameters

Shared sizes live in `rtl/hist_pkg.sv`. Every module takes them as
parameters, and `histogram_top` passes them down.

| parameter | default | meaning | origin |
|-----------|---------|---------|--------|
| `W` (`PIX_W`) | 8 | bits per pixel; 2^W bins | original (8-bit gray scale) |
| `T` (`ROWS`) | 3 | rows of the window, comparators per block | original FPGA prototype: three comparators per block |
| `N` (`BLOCKS`) | 3 | processing blocks (window columns) | original FPGA prototype: 3-bit `c_control` |
| `PIXELS` (`IMG_PIXELS`) | 65536 | image size | original (256 x 256) |
| bin width | 17 | derived: holds a count of `PIXELS` | this design |

## Files

| file | block |
|------|-------|
| `rtl/histogram_top.sv` | top: wires everything below |
| `rtl/image_memory.sv` | frame store feeding block 1 |
| `rtl/pixel_column.sv` | one column of pixel registers with the `q` load mux |
| `rtl/processing_block.sv` | `T` comparators, AND gates, status registers, `C_r` |
| `rtl/comparator.sv` | pixel vs `P`, 0 on match |
| `rtl/selection_unit.sv` | `q`, the two priority encoders, `S` register, `P` mux |
| `rtl/priority_encoder.sv` | lowest set bit |
| `rtl/count_sum.sv` | `C_r` gating, registers and sum; `P` alignment |
| `rtl/storing_unit.sv` | read-modify-write with the `R3` bypass, clear sweep, host read |
| `rtl/dual_port_ram.sv` | histogram RAM |
| `rtl/hist_controller.sv` | sequencing, `mem_ads`, `c_control`, `t`, `mem_enable` |
| `rtl/hist_pkg.sv` | sizes and the state type |

## Departures and choices

These points follow the original where it is clear, and are this design's own
choice where it is silent or self-contradictory.

* **Choice between `S0` and `S1`.** The original algorithm listing takes `S0`
  on a shift and `S1` otherwise. Its selection-unit diagram wires the
  `K[.][N-1]` encoder to mux input 1 (taken on a shift). The diagram is
  followed here, since after a shift block `N` holds what block `N-1` held.
 
* **Position of the `S` register.** The diagram draws the register on the
  `S0` path only. Here it sits after the 2:1 mux. Left unregistered, the `S1`
  path would form a combinational loop through `P` and the comparators.
* **`q`** is the NOR of `K[.][N]`, as the text says. The listing's formula
  reads as an OR of the inverted bits.
* **Initial window.** The listing starts with the window full (`D = 1`
  everywhere). Here it starts empty and fills by shifting, so no preload path
  is needed. It costs `N` clocks.
* **`c_control` and `t`.** The diagram feeds both into a two-input gate whose
  type is not given. That gate selects `C_r` or 0. An OR is used, and
  `c_control[r]` means "block `r` holds image data". The listing's stop test
  "`c_control(N) == 1`" does not fit that meaning. The run instead ends when
  the last image column leaves block `N`. With this meaning the gating never
  changes a result: blocks without image data have no pending pixels.
* **Port A write enable.** The RAM diagram labels `ENA` with `x`, the
  registered `mem_enable`. Port A here writes on every update instead.
  Otherwise, a value accumulated through `R3` would never reach the RAM. When
  `mem_enable` goes low is not specified. Here it means "same bin as the
  previous update".
* **Comparator.** The prototype's comparator also has greater/lesser outputs.
  Only equality is used, so only equality is built.
* **Not specified, chosen here:**
  * the frame-store layout and its load port;
  * the start/busy/done handshake;
  * the clear sweep and the host read port of the histogram RAM;
  * reset (asynchronous on control and status registers; none on the pixel
    registers and RAMs);
  * all widths other than the pixel width.
* **Not built.** The original motivates the design with joint histograms of
  two images, for mutual-information image registration. It describes the
  datapath for one image only. With `W = 16` and each pixel formed as the
  pair `{a, b}`, the same RTL produces a 65536-bin joint histogram.
  `tb/histogram_joint_tb.sv` checks this on two 8 x 8 images. It is not the
  default configuration: at full size it needs a 1 Mbit frame store and a
  65536 x 17-bit histogram RAM.

## Verification

Each block has a self-checking testbench in `tb/`. It compares the block with
values computed independently in the testbench, and ends with a
`TB_RESULT checks=... failures=...` line.

* `histogram_top_tb` runs 8 images back to back on one instance: random, flat,
  ramp and sparse, each 40 pixels with a partly filled last word. The size is
  4-bit pixels and a 3 x 3 window. It checks:
  * every bin;
  * the number of shifts (`WORDS + N`) and the bound on counting clocks;
  * that window shift, window hold, selection from block `N` and from block
    `N-1`, the `R3` bypass and the fill phase `t` each occurred.
* `histogram_full_tb` runs the default configuration: two 256 x 256 images,
  all 256 bins, and the sum of the bins.
* The other testbenches cover single blocks. They use random stimulus against
  small models, except for the comparator, which is tested exhaustively.

To run one with Verilator 5:

```
verilator --binary --timing --assert -Irtl -Itb rtl/hist_pkg.sv \
    tb/histogram_full_tb.sv --top-module histogram_full_tb
./obj_dir/Vhistogram_full_tb
```

Replace the testbench name to run another. The full-size run takes well under
a second of simulation time.
