# MCADSW: a stereo disparity engine with mini-census adaptive support weights

This RTL computes a dense disparity map from a rectified stereo pair. It
implements the *mini-census adaptive support weight* (MCADSW) algorithm as a
hardware pipeline. The cost of matching a left pixel with a right pixel `d`
columns to its left is the Hamming distance between their 6-bit
*mini-census* strings. These costs are summed over a 31x31 window, and each
pixel's cost is weighted by how close its colour is to the window centre, so
the window takes on the shape of the object. The disparity with the smallest
sum wins. The default build handles 352x288 (CIF) frames with 64 disparity
levels. One frame takes 2.26 million clock cycles, which is 42 frames/s at
95 MHz.

The design uses the standard hardware simplifications of adaptive support
weights:

* **Mini-census** instead of a full census: each pixel is compared with only
  6 pixels.
* **No proximity weight**: only colour similarity decides a pixel's weight.
* **YUV colour, Manhattan distance**: the distance is `|dY| + |dU| + |dV|`,
  using integer arithmetic only.
* **Scale-and-truncate weights**: `64*exp(-dist/7.2)` keeps only its leading
  one bit. A weight is therefore a power of two (64, 32, 16, ..., 1, or 0), and
  "cost times weight" is one shift.
* **Two-pass aggregation**: a vertical pass sums each 31-pixel column of the
  window, then a horizontal pass sums 31 column sums.

## The algorithm, exactly as built

For a left pixel `p = (x, y)` and disparity `d`:

* **Mini-census** `b(q)`: 6 bits, MSB first. The bits are for the pixels at
  (dx,dy) = (0,-2), (0,-1), (-2,0), (+2,0), (0,+1), (0,+2) around `q`. A bit
  is 1 when that pixel's luminance is **not larger** than the luminance of
  `q`. Example: a centre of 34 with neighbours 5, 7, 19, 41, 38, 52 gives
  `111000`.
* **Census cost** `E(q,d) = popcount(bL(q) xor bR(q - (d,0)))`, with a range
  of 0..6.
* **Weight** `w(a,c)`:
  * distance 0 gives 64;
  * 1..4 gives 32;
  * 5..9 gives 16;
  * 10..14 gives 8;
  * 15..19 gives 4;
  * 20..24 gives 2;
  * 25..29 gives 1;
  * 30 or more gives 0.

  The RTL stores the weight as a 3-bit code `k`: `k = 0` means weight 0, and
  otherwise the weight is `2^(k-1)`.
* **Vertical cost** of window column `c`:
  `V(c,d) = sum_{i=-15..15} E((c, y+i), d) * w((c, y+i), (c, y))`. The weight
  is taken relative to the centre of *that column*.
* **Final cost**: `F(p,d) = sum_{j=-15..15} V(x+j, d) * w((x+j, y), (x, y))`.
* **Disparity**: `argmin_d F(p,d)`. On a tie, the smaller `d` wins.
* **Borders**: a coordinate outside the image is clamped to the nearest image
  pixel. This applies to every pixel read: census neighbours, window pixels
  and right-image pixels.

Cost widths are sized for the worst case, so nothing saturates:

* vertical costs are 14 bits;
* final costs are 25 bits.

## Architecture

```
        external memory (32-bit words)
                  |
          memory_controller ----------------------------+
   (FIFO first, then round robin)                       |
        |                         |                     |
 mini_census_transformer    weight_generator            |
  YL buf   YR buf            Y buf U buf V buf          |
  census   census            colour-weight kernel       |
  kernels  kernels           + horizontal row buffer    |
  MCL bank0/1  MCR bank0/1   VW bank0/1   HW bank0/1    |
        |  mcl, mcr            | vw, hw                 |
        +----------+-----------+                        |
                   |                                    |
          cost_aggregator_wta                           |
   8 x vertical_aggregator -> pingpong_buffer           |
   -> 3 x horizontal_aggregator -> 3 x wta_unit         |
   -> 18-entry output latch -> disparity_fifo ----------+
```

### Blocks of 18x18 outputs

The frame is cut into 18x18 output blocks, processed in raster order. At the
default size this is 20 x 16 = 320 blocks. The last block column reaches past
column 351, and its outputs outside the image are dropped.

Each block needs the following regions, measured from the block origin
`(bx0, by0)`:

* **Left censuses and all weights**: a 48x48 region starting at
  `(bx0-15, by0-15)`. 48 = 18 + 31 - 1.
* **Right censuses**: 48 rows by `48 + DMAX - 1` (111) columns starting at
  `(bx0-15-(DMAX-1), by0-15)`, so that every disparity of every column is
  present.
* **Luminance fetched for the census units**: 2 extra pixels on each side,
  because the census template reaches 2 pixels out.

Whole blocks are fetched because the windows of neighbouring pixels overlap.
Each pixel column is then read and processed once for all the windows that
contain it, instead of once per window.

**Preparation and aggregation overlap.** The mini-census transformer and the
weight generator fill census/weight bank `s mod 2` for block `s`. At the same
time, the cost aggregator works on block `s-1` from the other bank. The top
level starts both jobs together and waits for both to finish. Preparation of
a CIF block takes about 2,400 cycles (censuses) and 3,100 cycles (weights),
mostly memory reads, and the two share the memory port. Aggregation takes
7,038 cycles, so aggregation sets the frame time:

```
frame = prep(block 0) + 320 * 7038 + drain  =  2,256,674 cycles (simulated)
```

### Cost aggregator timing (the core of the design)

Within a block, output rows `y = 0..17` are processed one after another. For
one row, disparities run from 0 to 63. For each disparity, the 48 region
columns are covered in 6 groups of 8 columns, one group per cycle. `t` counts
the cycles from the start of the row.

| cycle | what happens |
|---|---|
| `t = 6d + g` | The address `(y, g, d)` goes to the census and vertical-weight buffers. They answer one cycle later with 8 columns x 31 rows of left censuses, right censuses and vertical weight codes. The right column for left column `c` is `c + DMAX-1 - d`. |
| `t + 1` | 8 `vertical_aggregator` lanes compute 31 Hamming distances each, shift each by its weight, and sum them in an adder tree. The 8 costs are written into group `g` of ping-pong bank `d mod 2`. |
| `6d + 7 + k`, `k = 0..5` | Bank `d mod 2` is complete. The other bank is already receiving disparity `d+1`. The bank delivers the 33 costs of columns `3k .. 3k+32`. Horizontal aggregator `j` takes costs `j .. j+30` with the horizontal weights of output pixel `x = 3k+j`, and `wta_unit j` updates slot `k` at the end of the cycle. |

The 33-wide read gives three windows from one read. This reuse of
neighbouring columns is why three aggregators need only 33 costs instead of
93.

Consequences:

* **First result**: the first WTA update comes 7 cycles after a row starts.
* **Row time**: the last update is at `t = 6*63 + 7 + 5 = 390`, so a row takes
  `7 + 6*64 = 391` cycles.
* **Block time**: `18 * 391 = 7038` cycles.
* **Throughput**: 3 final costs per cycle, or 272 million disparity
  evaluations per second at 95 MHz.

In the first cycle of the next row, the 18 winning disparities are copied
into an output latch. The latch empties one entry per cycle into the
disparity FIFO. If the latch is still not empty when a row ends, the
aggregator stalls until it is. This only happens when the memory has refused
writes for a long time.

### Weight generator

For every output row `y` of the block, the weight generator makes two passes:

1. **Vertical pass** (48 cycles): one region column per cycle. For column
   `c` it computes the 31 weights of pixels `(c, y..y+30)` relative to
   `(c, y+15)`, and copies `(c, y+15)` into the **horizontal row buffer**.
2. **Horizontal pass** (18 cycles): one output pixel per cycle. For pixel
   `x` it computes the weights of row-buffer entries `x..x+30` relative to
   entry `x+15`.

The horizontal pass never goes back to the input buffers. Both passes share
the same 31 `color_weight` units (Manhattan distance plus weight table).

The weights are stored as follows:

* **VW buffer**: 18 x 48 columns of 31 codes per bank;
* **HW buffer**: 18 x 18 pixels of 31 codes per bank.

### Mini-census transformer

The left and right units each have an input buffer and one column of 48
census kernels. Both sides compute one region column per cycle. The results
go to the MCL buffer (48x48 per bank) and the MCR buffer (48x111 per bank).

### Input buffers

An input buffer fetches the 32-bit words that cover its window, row by row.
A byte selector for each column then puts every pixel of a returned word in
its place. This selector is also how coordinates outside the image are
clamped: window columns left of the image all take pixel 0 of the word that
holds it.

### Memory interface and map

| port | meaning |
|---|---|
| `mem_req`, `mem_we`, `mem_addr[19:0]`, `mem_wdata[31:0]` | request; held until accepted |
| `mem_ready` | the memory accepts the request in this cycle |
| `mem_rdata[31:0]` | read data, one cycle after an accepted read |
| `start` / `busy` / `done` | start a frame / frame running / 1-cycle pulse after the last disparity write |

**Arbitration.** The memory controller grants the disparity FIFO first. The
mini-census transformer and the weight generator alternate (round robin) when
both ask.

**Word addresses** (`PW = IMG_W*IMG_H/4`):

| region | base | layout |
|---|---|---|
| Y left | 0 | pixel `(x,y)` in word `y*IMG_W/4 + x/4`, byte `x mod 4` (bits `8*(x%4) +: 8`) |
| Y right | PW | same |
| U left | 2 PW | same |
| V left | 3 PW | same |
| disparities | 4 PW | word `y*IMG_W + x`, disparity in bits [5:0] |

`IMG_W` must be a multiple of 4.

## Parameters

| parameter | default | where |
|---|---|---|
| `IMG_W`, `IMG_H` | 352, 288 | `mcadsw_top`, preparation units |
| `DMAX` | 64 | `mcadsw_top`, census transformer, aggregator, WTA |
| `WIN`, `BLK`, `LANES`, `NWTA` | 31, 18, 8, 3 | fixed in `mcadsw_pkg` (the schedule depends on them) |
| FIFO depth | 32 | `disparity_fifo` |

## What this RTL follows, and where it departs

These parts follow the source architecture:

* the algorithm and its simplifications;
* the 31x31 window;
* the 18x18 block with a 48-wide region;
* 8 vertical lanes;
* the 33-cost ping-pong read feeding 3 horizontal aggregators and 3 WTA
  units;
* the 7-cycle initial delay and 6 cycles per disparity, giving 7038 cycles
  per block;
* overlap of preparation with aggregation;
* the 32-bit memory port;
* FIFO-first / round-robin arbitration.

These are this design's own choices, where the source is silent:

* border clamping;
* left image as the reference;
* the tie rule;
* the memory map and handshake;
* one disparity per memory word;
* cost widths and the 3-bit weight code;
* the output latch and stall rule;
* FIFO depth;
* reset behaviour: control is reset asynchronously, and buffers are always
  written before they are read;
* the weight constant `gamma = 7.2`. The source does not print it. This
  value puts the weight steps at distances 5, 10, ..., 30, which matches the
  source's weight curve.

Known departures:

* **Preparation speed.** The source prepares a block's censuses in 470 cycles
  and its weights in 1,536. Here they take about 2,400 and 3,100 cycles. This
  does not change the frame time, because preparation is hidden behind
  aggregation.
* **External bandwidth.** Each block's windows are fetched anew from memory.
  The source reports an average of 5.17 reads per pixel and 45 MB/s at
  30 frames/s. In the full-frame simulation this design reads 1,229,504
  words per CIF frame, which is about 3,840 words per block. That is 12.1
  reads per pixel of each stored plane, or about 148 MB/s at 30 frames/s.
  Column reuse inside a block is built. The wider right window and the
  re-reading of the 30-pixel overlap between neighbouring blocks make up the
  difference.
* **On-chip storage.** About 55 kB, against the 21.3 kB reported for the
  original. The difference comes from:
  * double-banked census and weight buffers holding every weight of the
    block;
  * whole-window input buffers.

  The original's buffer organisation (upper/lower word buffers, packed
  word registers) is not reproduced.
* **Ping-pong schedule.** A bank is read only after all of it has been
  written. The original staggers reads behind writes. Both give the same
  throughput.
* **Not checked.** Clock frequency, gate count and power.

## Verification

Each block has a self-checking testbench in `tb/`. Each one prints
`TB_RESULT checks=N failures=M`.

| testbench | what it checks |
|---|---|
| `tb_mini_census` | the two worked examples (`111000`, `111011`) and random pixels |
| `tb_color_weight` | the weight against `$exp`, for every small distance and for random colours |
| `tb_vertical_aggregator`, `tb_horizontal_aggregator` | random sums, including the worst case |
| `tb_wta_unit` | minimum search, ties, restart at `d = 0` |
| `tb_pingpong_buffer` | alternating banks, 33-wide windows |
| `tb_disparity_fifo` | a queue model through full and empty |
| `tb_memory_controller` | priority, round robin, wait states, read-valid timing |
| `tb_input_buffer` | windows over every border, exact number of words read |
| `tb_mini_census_transformer`, `tb_weight_generator` | every census or weight of two blocks, read back through the read ports |
| `tb_cost_aggregator_wta` | all 324 disparities of a random block; 7-cycle first update; 7038-cycle block; stalls under back-pressure |
| `tb_mcadsw_top` | a 40x36 frame with 8 disparities compared pixel-for-pixel with a reference model (`tb/mcadsw_ref_pkg.sv`) |
| `tb_mcadsw_full` | one full CIF frame with 64 disparities at the default parameters |
| `tb_mcadsw_tsukuba` | one full 384x288 frame (`IMG_W = 384`) |

**`tb_mcadsw_top` mechanism counts.** This testbench also counts each
mechanism and fails if any one never happened:

* prep/aggregation overlap;
* round-robin contention;
* FIFO priority;
* memory wait states;
* FIFO full;
* aggregator stall;
* dropped outside outputs;
* use of both banks.

**`tb_mcadsw_full` checks:**

* every pixel is written exactly once;
* a sample of pixels matches the reference;
* the frame time is 320 x 7038 cycles plus the first preparation.

It takes about a minute with Verilator, including the build.

**`tb_mcadsw_tsukuba`** runs the same checks at the size of the Tsukuba
stereo pair, 384x288. This is the only change to the hardware:
`IMG_W = 384`. The synthetic scene has disparities below 16, and the full
64-level search is kept. The frame takes 2,481,986 cycles (22 x 16 blocks),
which is 38 frames/s at 95 MHz.

The other standard stereo pairs (Venus, Teddy, Cones, Sawtooth) are wider
than 352 and their widths are not multiples of 4. Running them needs a padded
image and new `IMG_W`/`IMG_H` values. They were not simulated.

The reference model is written directly from the formulas above. It uses no
buffers and no schedule.

### Running a testbench

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb \
  rtl/mcadsw_pkg.sv tb/mcadsw_ref_pkg.sv tb/tb_mcadsw_top.sv \
  --top-module tb_mcadsw_top -o sim
./obj_dir/sim
```

Replace `tb_mcadsw_top` with any testbench name. The unit testbenches do not
need `tb/mcadsw_ref_pkg.sv`, but including it does no harm.
`tb/ext_memory_model.sv` is a behavioural model of the external memory, used
only by the testbenches.

## Files

* `rtl/mcadsw_pkg.sv`: constants, the `mem_req_t` and `yuv_t` types, the
  weight function and the memory map.
* `rtl/mcadsw_top.sv`: frame and block scheduler; instantiates everything
  else.
* Memory path: `rtl/memory_controller.sv`, `rtl/disparity_fifo.sv`,
  `rtl/input_buffer.sv`.
* Census: `rtl/mini_census_transformer.sv`, `rtl/mini_census.sv`,
  `rtl/hamming_cost.sv`.
* Weights: `rtl/weight_generator.sv`, `rtl/color_weight.sv`.
* Aggregation: `rtl/cost_aggregator_wta.sv`, `rtl/vertical_aggregator.sv`,
  `rtl/pingpong_buffer.sv`, `rtl/horizontal_aggregator.sv`,
  `rtl/wta_unit.sv`.
* `tb/`: the testbenches listed above, plus `tb/mcadsw_ref_pkg.sv` and
  `tb/ext_memory_model.sv`.
