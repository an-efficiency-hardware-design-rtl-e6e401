# Lane detector with a (b, θ) Hough transform

This is a streaming lane detector for one forward-looking camera. RGB pixels
go in at one per clock. After the last pixel of each frame, two line
equations come out: one for the left lane marking and one for the right.

The core is a line Hough transform, with two changes from the textbook form
that keep it small:

* **Votes are cast in intercept form, not normal form.** An edge pixel
  `(x, y)` with gradient angle θ does not vote for `ρ = x·cosθ + y·sinθ`.
  It votes for
  `b = cot(θ)·x + y`, which equals `ρ / sinθ`.
  Every pixel on one straight line gives the same `b`. The winning cell
  `(b, θ)` is therefore already a line equation: with `m = cot θ`, the line
  is `b = m·x + y`, or `y = b − m·x`. No inverse transform is needed
  afterwards, and only one trigonometric table (cot) is needed, not
  separate sin and cos tables.
* **Only the region of interest (ROI) is stored.** Lane markings seen from the
  car fall in a narrow range of angles. Only the rows `y = 100…400` of the
  image are used, and only gradient angles of 30…53° and 130…153°. The
  intercept then stays within −860…400. The accumulator holds 48 angle rows
  × 1261 intercepts = 60,528 counters. A full (ρ, θ) space for the same
  image would be 180 × 750 cells. The cot table holds 48 words.

Each edge pixel votes once, with the angle measured by the edge detector.
The transform does not sweep over every θ. At one pixel per clock, a
1024 × 1024 frame takes 1,048,576 cycles, which is 4.19 ms at 250 MHz.

## Data flow

```
 RGB ──► masking_grayscale ──► sobel_edge_detection ─────────────────────► hough_transform ──► 2 lines
         gray, rows outside     3×3 window on 2 RAM line buffers            b = cot θ·x + y
         the ROI forced to 0    Gx, Gy ─► vectoring CORDIC ─► θ, |G|         ROI filter + address
                                edge = |G| ≥ EDGE_TH, centre (x, y)         even / odd voting banks
                                                                            θ select ─► cot ROM ─► delay
```

| stage | module | latency (cycles) |
|---|---|---|
| gray + mask | `masking_grayscale` | 1 |
| Sobel window + Gx/Gy | `sobel_edge_detection`, `gx_gy_operator` | 1 |
| CORDIC | `vectoring_cordic` | ITER + 2 = 14 |
| cot lookup, multiply, add | `hough_transform`, `cot_lut` | 3 |
| ROI filter and address | `address_generate` | 1 |
| vote, frame end, peaks | `voting_module` | 3 |
| θ select, cot lookup of m, alignment | `theta_select`, `peak_delay` | 4 |

`lines_valid` pulses 27 cycles after the last pixel of a frame has entered.
When frames follow back to back, it pulses once every W·H cycles.

## Coordinates and the two lanes

All geometry uses a frame centred on the image:

* `x = column − W/2` and `y = row − H/2`.
* `y` grows downwards, so a 1024-pixel image spans −512…511 on both axes.
* The ROI is the band `100 ≤ y ≤ 400`, below the vanishing point near the
  image centre.

θ is the direction of the image gradient, which is the normal of the edge.
It is folded to 0…179° and rounded to whole degrees.

In this frame:

* A left lane marking, at x < 0 going up towards the centre, has its normal
  at 30…53°.
* A right lane marking has its normal at 130…153°.

Each voting bank therefore keeps two peaks: one over the votes with θ < 90°
(left) and one over the votes with θ > 90° (right). This sign convention
matters. With y pointing up instead, the two bands swap sides. The stated
intercept range −860…400 only holds for the y-down reading.

## The accumulator (`voting_module`)

This is the part that needs the most care.

**Layout.** There is one row per whole degree: rows 0…23 are 30…53° and rows
24…47 are 130…153°. Each row has one column per intercept:

```
addr = row(θ) · 1261 + (b + 860)
```

`address_generate` computes this address. It accepts a vote only if the pixel
is an edge, lies in the ROI rows and has θ in a band, and only if the
computed `b` is within −860…400. Everything else is dropped. This filter is
what lets the RAM be this small.

**Voting.** Each bank is a simple dual-port RAM of 9-bit saturating
counters.

1. A vote reads its cell on port A.
2. One cycle later, the incremented value is written through port B. The
   address and write enable pass through a register on their way to port B.

If two consecutive votes hit the same cell, the second one reads the RAM
before the first has written it. A forwarding register feeds the value being
written back into the increment, so no vote is lost. On the synthetic road
frames about one vote in 200 takes this path.

**Peaks without a scan.** The incremented count is compared at once with the
running maximum of its side (left or right). If it is strictly greater, it
replaces the maximum, and the vote's `b` and θ are registered as the new
peak. When the frame ends, the peak of each side is already known:

* No pass over the RAM is needed.
* On a tie, the first cell to reach the highest count wins.
* A peak with fewer than `VOTE_TH` votes is reported with `valid = 0`.

**Even and odd banks.** `hough_transform` holds two banks and switches
between them after each frame's last pixel. While one bank votes on the
current frame, the other reports its peaks and then clears itself. Clearing
writes zero to every cell through port B, one per cycle, so it takes 60,528
cycles. Clearing therefore never stalls the pixel stream, provided a frame
lasts at least that long. A 1024 × 1024 frame lasts 17 times longer. If a
vote reaches a bank that is still clearing, the vote is dropped and flagged
on `vote_lost`. A bank also clears itself after reset, so wait for
`bank_ready == 2'b11` before sending the first frame.

**Output.** When a bank finishes, `theta_select` sends the left peak angle
and then the right peak angle through the second port of the cot ROM.
`peak_delay` pairs each returned `m = cot θ` with its peak. `hough_transform`
then drives both lines with a one-cycle `out_valid`. The lines hold until
the next frame's lines replace them.

## Edge front end

* **`masking_grayscale`** converts RGB to gray as
  `(77R + 150G + 29B + 128) >> 8`. It forces to 0 every pixel on a row
  outside the ROI, and counts columns and rows itself: every `in_valid`
  cycle is the next pixel in raster order.
* **`sobel_edge_detection`** builds a 3×3 window from six registers and two
  RAM line buffers (`line_fifo`). A line buffer replaces a chain of about
  1000 registers per row:

  ```
  gray → w22 → w21 → w20 → FIFO → w12 → w11 → w10 → FIFO → w02 → w01 → w00
  ```

  Each FIFO holds W − 3 words. Its output register is the first window
  register of its row. Windows whose centre is on the first or last column
  or row would wrap around, so they are marked unusable and never vote.
* **`gx_gy_operator`** applies the Sobel kernels:
  `Gx = right − left` and `Gy = bottom − top`.
* **`vectoring_cordic`** is a 12-stage pipelined CORDIC.
  1. It first folds the vector into the right half-plane. This changes the
     angle by 180°, which does not matter modulo 180.
  2. It then rotates the vector onto the x axis, accumulating the angle in
     1/256°.
  3. It outputs the angle rounded to whole degrees, and the magnitude with
     the CORDIC gain removed (×311/512).
* A pixel is an edge when its magnitude is at least `EDGE_TH`. The maximum
  magnitude is 1442.

## Interface of `lane_detector_top`

| port | dir | width | meaning |
|---|---|---|---|
| `clk`, `rst_n` | in | 1 | clock, asynchronous active-low reset |
| `in_valid` | in | 1 | a pixel is present; low cycles pause the stream |
| `in_r`, `in_g`, `in_b` | in | 8 each | pixel colour, raster order, frame after frame |
| `lines_valid` | out | 1 | one-cycle pulse: the lines of the frame just finished |
| `line_left`, `line_right` | out | `lane_line_t` | `{valid, theta[7:0], b[11:0] signed, m[15:0] signed Q3.12, votes[8:0]}` |
| `bank_ready` | out | 2 | even/odd accumulator cleared and ready |
| `vote_lost` | out | 1 | a vote was dropped because its bank was still clearing |

The struct `lane_line_t` and all shared constants are in `rtl/lane_pkg.sv`.
In image terms, a reported line is the set of pixels with
`y ≈ b − (m / 4096)·x` in the centred frame.

## Parameters

| parameter | default | meaning |
|---|---|---|
| `W`, `H` | 1024, 1024 | image size |
| `Y_LO`, `Y_HI` | 100, 400 | ROI rows (centred y) |
| `B_LO`, `B_HI` | −860, 400 | stored intercept range; sets the accumulator depth |
| `EDGE_TH` | 200 | edge threshold on the gradient magnitude |
| `VOTE_TH` | 16 | minimum peak height for a valid line |
| `ITER` | 12 | CORDIC stages |

The angle bands (30…53°, 130…153°), the cot format (16 bits, 12 of them
fractional) and the counter width (9 bits) are package constants.

Memory at the defaults:

* 2 banks × 60,528 × 9 bits = 1.09 Mbit of accumulator.
* 2 × 1021 × 8 bits of line buffer.
* A 48-word cot ROM.

## What is fixed and what was chosen here

The following come from the original architecture:

* the three-stage chain;
* the RAM line buffers in the Sobel window;
* the vectoring CORDIC for angle and magnitude;
* the `b = cot(θ)·x + y` vote;
* the single cot table limited to 30…53° and 130…153°;
* the intercept range −860…400, with offset 860;
* the ROI rows 100…400;
* the accumulator read on one port and incremented into the other;
* the running-maximum peak registers;
* the split of votes at 90° into left and right;
* the two alternating voting banks;
* the output as a line equation (b, m).

The following are this implementation's choices:

* **Gray weights and masking.** The masking stage zeroes whole rows outside
  the ROI.
* **Numeric thresholds.** The edge threshold and the vote threshold.
* **Word widths.** All word widths, the CORDIC depth and the fixed-point
  formats.
* **Forwarding path.** The forwarding of back-to-back votes to one cell.
* **Out-of-range votes.** Votes with `b` outside the stored range are
  dropped.
* **Shared ROM port.** The two-cycle sharing of the ROM port between the
  lanes, left first.
* **Frame end and lost votes.** The frame-end protocol and the
  lost-vote flag.
* **Accumulator size.** Both end angles and both end intercepts are
  included: 48 × 1261 cells rather than 46 × 1260.
* **Which band is left.** Lines below 90° are the left lane, as explained
  under [Coordinates and the two lanes](#coordinates-and-the-two-lanes).

Not covered:

* The 250 MHz clock rate is a synthesis result for a Virtex-7 device. This
  RTL was only simulated and linted.
* The memory saving quoted for the original architecture (about 1–2 % of
  a conventional four-module (ρ, θ) accumulator of 180 × 750 cells each)
  does not follow from the sizes above. Two banks of 60,528 cells come to
  about 22 % of 4 × 134,250 cells.
* The published detection accuracy (precision/recall on recorded road
  video) was measured on video data that is not part of this design. The
  testbenches use synthetic frames.

## Verification

Every module has a self-checking testbench in `tb/`. Each prints
`TB_RESULT checks=N failures=M` and has a watchdog.

| testbench | what it checks |
|---|---|
| `tb_masking_grayscale` | gray formula, ROI masking, raster counters, end-of-frame flag, with random stream gaps |
| `tb_line_fifo` | delay of exactly DEPTH enables with random gaps |
| `tb_gx_gy_operator` | Sobel sums on random and full-scale windows |
| `tb_vectoring_cordic` | angle within 1° of atan2 mod 180, magnitude within 2 %, latency |
| `tb_sobel_edge_detection` | the whole window against a convolution model over three frames |
| `tb_cot_lut` | all 180 angles on both ports, the band limits |
| `tb_address_generate` | accept/drop at every limit, address formula |
| `tb_voting_module` | counts and peaks against a software accumulator, forwarding, saturation at 511, threshold, clear time, votes lost while clearing, empty frame |
| `tb_theta_select`, `tb_peak_delay` | ROM port sharing and line assembly, 4-cycle timing |
| `tb_hough_transform` | full-size accumulator on synthetic edge streams, three frames over both banks, peaks against a real-arithmetic histogram, 11-cycle latency |
| `tb_lane_detector_top` | end to end at 1024 × 1024: two road frames with blurred lane markings and one empty frame; θ within 1°, `b` within the marking half-width, `m`, frame period, latency; counts that each mechanism occurred |
| `tb_lane_video` | detection workload at 1024 × 1024: 12 back-to-back frames of three road types (clean solid markings; worn dashed low-contrast markings; solid markings with a vehicle-like box, a stop line and a road-arrow stroke), lane angle and offset changing per frame; prints precision and recall per road type |

In `tb_lane_detector_top`, the marking edges are blurred over two pixels,
as a camera image would be. A 3×3 Sobel on perfectly hard pixel staircases
biases thin diagonal edges towards 45°.

On the synthetic video every lane of all 12 frames is found with no false
lines. The peaks of solid markings reach 70–165 votes. Dashed, low-contrast
markings give only 18–29 votes, which is why `VOTE_TH` defaults to 16. An
empty road gives no votes at all. The clutter in the urban frames produces
no false lines for two reasons:

* Its edges are horizontal or vertical, so they fall outside the angle bands.
* The arrow stroke is short.

To simulate with Verilator (5.x), run from the folder that holds `rtl/` and
`tb/`:

```
verilator --binary --timing --assert --top-module tb_lane_detector_top \
    -y rtl -y tb +libext+.sv -Irtl rtl/lane_pkg.sv tb/tb_lane_detector_top.sv
./obj_dir/Vtb_lane_detector_top
```

Replace the name to run any other testbench. The end-to-end run (three
full-size frames, about 3.2 million cycles) takes roughly ten seconds. The
package must come first on the command line. Every module imports
`lane_pkg`.

## Files

* `rtl/lane_pkg.sv`: constants, ROI/band helpers, the cot formula, `lane_line_t`.
* `rtl/lane_detector_top.sv`: the top-level module.
* Edge front end: `rtl/masking_grayscale.sv`, `rtl/line_fifo.sv`,
  `rtl/gx_gy_operator.sv`, `rtl/vectoring_cordic.sv`,
  `rtl/sobel_edge_detection.sv`.
* Hough stage: `rtl/hough_transform.sv`, `rtl/cot_lut.sv`,
  `rtl/address_generate.sv`, `rtl/voting_module.sv`, `rtl/theta_select.sv`,
  `rtl/peak_delay.sv`.
* `tb/tb_*.sv`: one testbench per module, plus `tb_lane_video`.
