# Straight-lane detector in SystemVerilog

This design finds the lane markings in a 512 x 512 grey-scale road picture, as
seen from a camera on a car. The output is four straight lines: the two
strongest lines on the left lane boundary and the two strongest on the right.
All of it runs as one pipeline that takes one pixel per clock. It has no
processor and no frame buffer beyond the input picture.

The method works in four steps:

1. **Find edges.** Smooth the picture with a 3x3 Gaussian filter. Take Sobel
   gradients. Keep the pixels whose gradient magnitude |Gx| + |Gy| is above a
   threshold.
2. **Keep only edges pointing the right way.** Compute each edge's gradient
   angle with a CORDIC. Keep the edge only if the angle falls in the window
   expected for a left or a right lane marking. Everything else (cars,
   shadows, the horizon) is dropped here.
3. **Vote.** Each surviving edge votes, in a Hough space of (y-intercept b,
   angle theta), for all 36 lines of its region that pass through it. The
   line is written `b = y +/- x*|cot(theta)|`. This needs one table lookup and
   one multiplier per vote, and no sine/cosine pair. Two maximum detectors
   follow the votes as they are counted.
4. **Draw.** Turn the winning (b, theta) pairs back into pixel coordinates,
   one picture row per clock.

The architecture, the region-of-interest (ROI) numbers, the fixed-point
formats and the choice of safety mechanisms follow the thesis *Digital
Design, Verification and Functional Safety of Lane Detection Algorithm: A
Safety Critical Automotive Application*. The RTL, the testbenches and the
points listed under "Departures and own choices" are this design's own.

## Coordinates and angles

These conventions are used everywhere and are the easiest thing to get wrong:

- **X is the row** (0 at the top) and **Y is the column**. A line is
  `b = x*cot(theta) + y`. That gives:
  - **left lines**: `y = b - x*|cot|`
  - **right lines**: `y = b + x*|cot|`
  - b is the column where the line meets row 0.
- **Gradient angle.** theta = atan2(Gx, Gy), folded into 0..180 degrees.
  - Gx is the column difference (right minus left).
  - Gy is the row difference (bottom minus top).
  - The ROIs are usually written as -70..-35 deg (right lane) and -145..-110
    deg (left lane). Adding 180 degrees gives the folded ranges used here:
    **110..145 (right)** and **35..70 (left)**.
  - With this convention, a bright stripe running from bottom-left to
    top-right (a left lane marking) has edges near 35..70 degrees.
- **Angle units.** Angles leave the CORDIC as integers in units of
  atan(2^-15) rad. 90 degrees is 51,472 units and one degree is about 571.9.
- **Theta index.** A result line carries a theta index i = 0..35:
  - left lines: i means -145 + i degrees (35 + i here)
  - right lines: i means -70 + i degrees (110 + i here)
- **Cotangent table.** `cot_table(k) = round(cot(35 + k deg) * 2^14)`.
  - A left index i reads entry i.
  - A right index i reads entry 35 - i, because |cot(110 + i)| = cot(70 - i).
- **Intercept ROIs.** The ROI for b is -52..180 for right lines and 336..566
  for left lines. It is quantised in steps of 2 pixels, giving 117 and 116
  bins.

## Pixels to edges (`edge_detection`)

```
addr_gen -> image_rom -> image_control(512) -> gaussian_filter
        -> image_control(510) -> sobel_filter -> output register
                                   pos_counters (X, Y of each output)
```

**Input picture.** The address generator counts 0..262,143 after `start`.
The ROM is read once per clock, with one clock of latency. By default the ROM
holds a synthetic road: a dark surface with two 5-pixel stripes. Set
`INIT_FILE` to `$readmemh` a real picture, one hex byte per pixel in raster
order. No file is needed for simulation.

**Line buffers: the core of this stage.** Each 3x3 filter needs three
picture rows at once.

- `line_buffer` is a one-row RAM. One read address x returns slots x, x+1 and
  x+2 together, so one access yields a whole window row.
- `image_control` stacks **four** such buffers. `lb_control` drives them:
  - Row r of the incoming stream is written into buffer r mod 4.
  - While row r is written, window row r-4 is read from the three other
    buffers, one window per column c < W-2.
  - The 2-bit `top_sel` says which buffer holds the window's top row.
- The fourth buffer means a finished row never has to wait before it is
  overwritten. The pipeline fills once, 4*W-1 pixels before the first
  window, and never pauses after that.
- When the input ends, the last two window rows are still unread. An
  internal column counter flushes them (2*W extra clocks).
- A frame of W x H pixels gives (W-2) x (H-2) windows in raster order.
- The unit is used twice:
  - 512 wide in front of the Gaussian filter;
  - 510 wide in front of the Sobel filter. Its input has gaps at row ends,
    and the control only counts valid pixels.

**Filters.**

- `gaussian_filter`: (1 2 1; 2 4 2; 1 2 1)/16, built from shifts and adds.
  The result is floored. One register stage.
- `sobel_filter`:
  - Gradients Gx and Gy are 11-bit signed values.
  - The edge flag is |Gx| + |Gy| > 210.
  - Two register stages.

**Position counters.** `pos_counters` number the Sobel outputs.

- X (row) and Y (column) both start at 3 and run to 510, giving 508 x 508
  outputs per frame.
- They are the picture coordinates of the pixel at the window centre, counted
  from 1.

## Edge angle (`theta_detection`)

```
quadrant_detector (1 clk) -> cordic (10 clk) -> theta_comparator (1 clk)
```

- **Quadrant detector.** The CORDIC only handles the first quadrant.
  - If Gx and Gy have the same sign, the CORDIC gets (x = |Gy|, y = |Gx|).
  - If the signs differ, it gets (x = |Gx|, y = |Gy|) and 90 degrees is added
    afterwards.
- **CORDIC.** A vectoring CORDIC, one iteration per pipeline stage, 10
  stages.
  - The inputs get 5 extra fraction bits.
  - The angle table is round(atan(2^-i) * 2^15).
  - Position and quadrant flag ride along in a side-band pipeline.
  - Over random gradients the error is about 0.06 degrees on average and well
    under 1 degree.
- **Comparator.** It adds the 90 degrees where needed and checks both ROIs,
  bounds included.
  - An edge inside an ROI leaves as `wr_en` with `{lr, x, y}` (lr = 1 for
    right).
  - An edge outside both ROIs pulses `rejected`.
- **Latency.** 12 clocks from edge to FIFO write. `done` is delayed by the
  same amount.

## Voting (`hough_transform`)

```
sync_fifo -> ht_controller -> lut_counter -> cot_lut -> hough_mapper
          -> address_flattener -> accumulator -> max_detector (left, right)
```

- **FIFO.** 1024 entries of `edge_t`, a 2-port RAM with internal pointers.
  - `full` means every slot is written and unread. `valid` means an edge is
    waiting.
  - An edge that arrives while the FIFO is full is **dropped** and reported on
    `fifo_overflow`. The edge stream upstream never stalls.
  - Drop-on-full matters only for cluttered pictures. The synthetic road
    never fills the FIFO.
- **Controller.** A two-state FSM.
  - In IDLE, when an edge is waiting and the accumulator is not being cleared,
    it reads the edge and starts the LUT counter in the same clock.
  - It stays in BUSY until the counter's last step.
  - One edge therefore costs exactly **37 clocks**. An assertion checks that
    reads are at least that far apart.
- **Mapping.**
  - The counter walks theta index 0..35, one per clock.
  - `cot_lut` (registered) returns |cot| in unsigned 10.14 format.
  - `fxp_mult` forms x*|cot|. The operand ranges are known, so only product
    bits [37:14] are kept.
  - `hough_mapper` computes `b = floor(y -/+ x*|cot|)`: subtract for the right
    region, add for the left.
- **Address flattening.** A (b, theta) outside its region's b ROI casts no
  vote and pulses `invalid_b`. Otherwise the 2-D cell becomes one RAM
  address:
  - right: `((b + 52) >> 1) * 36 + i`
  - left: `((b - 336) >> 1) * 36 + i + 4212`

  The left block starts right after the 117 x 36 right block. There are
  8,388 cells in total.
- **Accumulator.** A 2-port RAM of 16-bit saturating counters.
  - A vote is read in one clock and written back +1 in the next.
  - **Bypass:** if the next vote hits the address just written, the value
    being written is forwarded instead of the stale RAM word. Within one
    edge, consecutive votes always have different theta indices, so the
    bypass never fires in normal operation. It exists to make the
    accumulator correct for any vote stream.
  - On `start` the accumulator clears itself by sweeping all 8,388 addresses.
    The controller waits for the sweep, and edges arriving meanwhile queue in
    the FIFO.
- **Maximum detectors.** One per region. Each watches the accumulator's
  writes (cell, new count, b, theta index) and keeps the two highest counts
  of two distinct cells.
  - A cell already held is updated in place.
  - Otherwise a count above the first entry demotes it to second place.
  - A count above only the second entry replaces that.
  - Counts only grow, so this tracks the true top two without a final scan.
- **End of frame.**
  - `in_done` (from theta detection) marks the last edge.
  - When the FIFO and the voting pipeline are empty, `done` pulses.
  - `lanes_valid` then rises and holds `lanes` until the next `start`.

## Drawing (`line_drawer`)

- `done` of the Hough stage starts the line drawer. It latches the four lines
  and sweeps x = 0..511, one row per clock.
- For each line it outputs `y = floor(b -/+ x*|cot|)`, using the same table
  and multiplier format as the voting.
- `pix_valid[i]` is set when line i has votes and its y lies inside the
  picture.
- Writing these pixels over a picture is left to whoever uses the outputs.

## Safety mechanisms (`FUSA = 1`, the default)

Blocks whose failure would silently corrupt the result are replicated:

| where | replicated block | mechanism |
|---|---|---|
| edge detection | address generator, both line-buffer control units, position counters | duplicate + `dup_checker` |
| theta detection | CORDIC | duplicate + `dup_checker` |
| Hough | LUT counter, address flattener, accumulator, both maximum detectors | duplicate + `dup_checker` |
| Hough | controller FSM | triplicate + `tmr_voter` (2-of-3 majority) |

- A duplicate receives the same inputs as the working copy. Its outputs only
  feed the checker.
- `dup_checker` registers `a != b`. `tmr_voter` outputs the bitwise majority
  and a mismatch flag, so a single faulty controller is out-voted and also
  reported.
- All flags meet in the top's sticky `fusa_err`, which is cleared by `start`.
- Memories (ROM, line buffers, FIFO RAM) are not replicated.
- **Keep the replicas apart in synthesis.** A copy is identical logic with
  identical inputs, so a synthesis tool that merges equivalent cells folds
  it into the original, and the checker then compares a signal with itself.
  Put keep/dont-touch attributes on the replica instances, or use the vendor
  flow's equivalent.

`FUSA = 0` builds the plain datapath.

## Top level (`lane_detection_top`)

| port | dir | meaning |
|---|---|---|
| `clk`, `rst_n` | in | clock; asynchronous active-low reset |
| `start` | in | one-clock pulse: process the picture in the ROM |
| `lanes` | out | `lanes_t {l1, l2, r1, r2}`, each `line_t {votes[15:0], b (signed 13), idx[5:0]}`; l1/r1 are the stronger lines |
| `lanes_valid` | out | `lanes` is this frame's result |
| `ld_valid`, `ld_x`, `ld_y[4]`, `ld_pix_valid[4]`, `ld_done` | out | drawn lines, one row per clock, order l1, l2, r1, r2 |
| `ev_pixel`, `ev_edge`, `ev_theta_reject`, `ev_fifo_overflow`, `ev_invalid_b`, `ev_acc_bypass` | out | one-clock event pulses, for counting |
| `fifo_full` | out | edge FIFO full |
| `fusa_err` | out | some replica disagreed since the last `start` |

Parameters: `FUSA` (default 1) and `FIFO_DEPTH` (default 1024). Picture size
and all formats are in `rtl/ld_pkg.sv`. The sub-blocks take `IMG_W`/`IMG_H`
parameters, and the testbenches shrink them.

**Timing on the built-in road picture.**

- 272,260 clocks from `start` to `lanes_valid`:
  - 262,144 pixel reads;
  - 4*W-1 fill clocks and 2*W flush clocks in each of the two image controls;
  - the Hough tail.
- At a 263 MHz clock this is about 966 frames/s.
- The Hough stage keeps up as long as a frame has fewer than about 7,300 ROI
  edges (37 clocks each). The FIFO absorbs bursts of up to 1024.
- The line drawer then takes 512 more clocks.

## Departures and own choices

- **Frame latency.** It is about 3.6% longer than the roughly 262,400 clocks
  reported for the original design. The flush of the last two window rows and
  the accumulator-to-result tail are counted here. The original schedule
  reads three buffers while filling the fourth and does not say how the last
  rows are handled.
- **One FIFO.** A single FIFO of packed `{lr, x, y}` entries replaces three
  parallel FIFOs (x, y, flag). The behaviour is the same.
- **Sizes not given by the original.** FIFO depth (1024), drop-on-full with
  an overflow count, 16-bit saturating vote counters, and the accumulator
  clear sweep are choices of this design.
- **Left-region address offset.** It is taken as "after the whole right
  block" (117 * 36 = 4212).
- **Angle table.** The CORDIC angle table is computed by rounding. Its first
  two entries are one unit (0.002 deg) larger than a truncated table.
- **ROI polarity.** The ROIs are applied to the folded angle atan2(Gx, Gy)
  described above. That is the reading of the signed ROI values under which
  they select lane markings in a picture whose rows grow downwards.
- **No camera or display.** There is no camera interface and no video
  output. The picture comes from the ROM and the drawn lines leave as a pixel
  stream.
- **Test picture.** The default ROM picture is synthetic. The road
  photographs used to tune the ROIs are not included.
- **Safety scope.** Only the replication mechanisms are built. The
  fault-campaign flow used to choose them is not part of the RTL.

## Simulating

Every block has a self-checking testbench in `tb/` with the same name plus
`tb_`. Each one:

- compares against values computed independently inside the testbench;
- checks cycle counts where the design promises a rate or latency;
- has a watchdog;
- ends with `TB_RESULT checks=N failures=M`.

To build and run one with Verilator 5 (`-Wno-fatal` because the testbenches
mix integer widths freely and Verilator warns about that):

```
verilator --binary --assert -Wno-fatal -Irtl -Itb rtl/ld_pkg.sv tb/tb_hough_transform.sv \
          --top-module tb_hough_transform -o sim
./obj_dir/sim
```

Every register that is read has a reset. The testbenches give `rst_n` a real
falling edge at time 1, so they also pass with randomised power-up state
(`./obj_dir/sim +verilator+rand+reset+2`, built with `--x-assign unique`).

`tb_lane_detection_top` runs the whole design at full size, with no
parameter overrides, in a few seconds of Verilator time:

- **Frame 1, the built-in road picture.**
  - Both maxima of each region lie on the right stripe: angle within one
    index, b within 6.
  - The drawn lines match a floating-point reference to within 1 pixel,
    including clipping at the picture border.
  - All 508 x 508 filtered pixels appear.
  - No safety error is raised.
- **Frame 2, random noise** (written into the ROM by the testbench). It
  floods the FIFO, so edges are dropped, and the frame must still finish. It
  also injects two faults:
  - One CORDIC replica's output is forced, and `fusa_err` must rise.
  - The accumulator's vote address is held for three clocks so that the
    bypass fires.
- Every event output must occur at least once.

Other testbenches with reference models:

- `tb_edge_detection`: bit-exact Gauss/Sobel reference on a 16 x 12 picture.
- `tb_hough_transform`: bit-exact Hough reference, including the 37-clock
  edge spacing and overflow accounting. It also forces a controller replica
  and a duplicated counter to show that the voter masks a fault and the
  checkers report it.
- `tb_cordic`: against `atan2`.
- `tb_max_detector`: against a full top-two search.

## Files

| file | content |
|---|---|
| `rtl/ld_pkg.sv` | constants, `edge_t`/`line_t`/`lanes_t`, CORDIC angle and cot tables, test-picture geometry |
| `rtl/lane_detection_top.sv` | top level |
| `rtl/edge_detection.sv`, `image_rom`, `addr_gen`, `image_control`, `lb_control`, `line_buffer`, `gaussian_filter`, `sobel_filter`, `pos_counters` | pixels to edges |
| `rtl/theta_detection.sv`, `quadrant_detector`, `cordic`, `theta_comparator` | edge angle and ROI filter |
| `rtl/hough_transform.sv`, `sync_fifo`, `ht_controller`, `lut_counter`, `cot_lut`, `fxp_mult`, `hough_mapper`, `address_flattener`, `accumulator`, `max_detector` | voting |
| `rtl/line_drawer.sv` | inverse transform / drawing |
| `rtl/dup_checker.sv`, `rtl/tmr_voter.sv` | safety mechanisms |
| `tb/tb_*.sv`, `tb/tb_check.svh` | testbenches and their shared check macros |
