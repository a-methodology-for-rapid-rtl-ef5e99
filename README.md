# Edge-direction defect detector

This is a streaming video circuit that finds defects in strongly patterned images, such as a wafer or a woven mesh. It does not compare the image with a reference. It relies on one observation: a regular pattern shows only a few edge directions, and it shows them everywhere. A defect is a place whose local edges point in a direction that the image as a whole rarely contains. For each pixel the circuit measures how much of each of four directions (0, 45, 90 and 135 degrees) lies around it. It weights that amount by the inverse of how common the direction is over the whole frame, and outputs the largest weighted value. Repeated pattern comes out dark and anomalies come out bright.

The structure is that of a data-flow design first prototyped on an array of small programmable data-flow processors. It was then turned into dedicated silicon by keeping only the resources each operator used and merging neighbouring operators. That process is called "derivation from emulation". This RTL is the fully merged, fixed-function form:

- one **extraction macro**, which was the published direction-extraction chip;
- four **direction macros**, one per direction;
- a **max** stage.

```
            picture ──► extraction macro ──► direction, edge ──┬──► direction macro k=0 ──┐
 threshold ───────────►  (3 clocks)      ──► edge count N ─────┤    direction macro k=1 ──┤
                                                               ├──► direction macro k=2 ──┼──► max ──► defect
                                                               └──► direction macro k=3 ──┘ (1 clock)
                                                                     (6 clocks each)
```

The defect pixel leaves 10 clocks after its input pixel.

The top level, `derived_chipset`, holds this detector and, beside it, a set of **derived single-processor operators** (`derived_dfp_set`): add, abs, and, max, a 256-word FIFO, a pixel delay, a line delay and an 8-bit histogram. These are the individual operators the derivation step produces before any merging, each a small data-flow node with its own two-word FIFOs and a valid/ready handshake. The two parts share only clock and reset. They are described in their own section below.

## Token streams

Every block passes pixels as *tokens*: an 8-bit value plus a sideband `ctl_t` (`valid`, `eof`), defined in `dd_pkg`.

- At most one token arrives per clock. Idle clocks (`valid = 0`) may appear anywhere.
- `eof` marks the last pixel of a frame.
- There is no back-pressure. Every stage accepts every token, as on a pixel-clocked video path.
- The line length is the run-time input `line_len`. It can be 1 to 512 pixels at the default size.
- No frame size is built in. A frame is whatever lies between `eof` markers.

Delays follow the token order and nothing else. "The pixel before" is the previous token, even when that token ended the previous line. "The pixel above" is the token `line_len` positions earlier, even when that token is in the previous frame. This is how a FIFO placed in a data-flow graph behaves, and the design keeps that behaviour. Borders get no special treatment. Before a delay memory has been filled once after reset, it reads as 0.

Boolean pixels are 255 for true and 0 for false.

**Frame gap.** Leave at least 6 idle clocks between the last pixel of one frame and the first pixel of the next. The new frame statistics (see below) reach the output multipliers 15 clocks after `eof` enters. A pixel reaches those multipliers 8 clocks after it enters. With a shorter gap, the first pixels of the next frame are still weighted by the older statistics. Real video blanking is far longer than 6 clocks.

## Extraction macro (`extraction_macro`)

| stage | block | what it computes |
|---|---|---|
| 1 | `line_pixel_delay` | previous pixel `p1`; pixel one line above `pl`, from a 512-word circular line memory |
| 2 | `derivates` | `dx = pix − p1`, `dy = pix − pl` (9-bit signed); `angle = sign(dx) XOR sign(dy)`; `adx = abs(dx) >> 3`, `ady = abs(dy) >> 3` (5 bits each) |
| 3 | `atan_unit` | `direction` from a 1024×8 arctangent ROM at `{adx, ady}`, folded by `angle` |
| 3 | `edge_thresh` | `edge = max(adx, ady) >= threshold ? 255 : 0` |
| 4 | `frame_count` | `N`, the number of edge pixels in the frame, delivered one clock after the frame's last pixel leaves stage 3 |

**Direction code.** Directions are orientations (an edge and its reverse count as the same) over 0 to 180 degrees, coded 0 to 253. On this scale 90 degrees is exactly 127. The ROM holds `round(atan2(ady, adx) · 254/π)`, which covers the first quadrant (0 to 127). When `dx` and `dy` have opposite signs, the gradient lies in the second quadrant and the code becomes `(254 − atan) mod 254`. The ROM contents are computed at elaboration from that formula, so no data file is needed.

**Magnitudes are only 5 bits.** The 10-bit ROM address is split evenly between the two magnitudes, so each keeps its top 5 bits. The threshold compares the same 5-bit values, so useful thresholds are 0 to 31. The testbenches use 3, which means a step of at least 24 grey levels between neighbouring pixels.

## Direction macro (`direction_macro`)

This is the hardest part to follow. The direction macro combines a *local* measure with a *global* one. The global measure exists only once a frame is complete, so it is always one frame behind.

For direction `k`, with centre code `c = round(k·254/4)`, which gives 0, 64, 127 and 191:

1. **Weight** (`distance_lut`): `I = edge ? max(0, 255 − 4·d) : 0`. Here `d` is the circular distance between the pixel's direction and `c`, at most 127. An edge exactly on direction `k` weighs 255, and the weight falls to 0 a quarter turn away. As a result, every edge feeds the two nearest of the four directions.
2. **Local sum** (`box_sum3x3`): `CV = I` summed over the pixel, the two pixels before it, and the same three columns on the two lines above. The window trails the pixel; it is not centred on it. The sum uses two more 512-word line memories. Sums are kept at full width (12 bits, at most 2295).
3. **Mask**: `IF = edge ? CV : 0`. Only edge pixels can score.
4. **Global average** (`frame_count`, `direction_average`): over a frame, `S = ΣI` and `A = floor(S / N)`. `A` is the mean weight of direction `k` among all edge pixels, from 0 to 255. A high `A` means the direction is common. The division runs in 8 clocks, one quotient bit per clock. A frame with no edges gives `A = 0`.
5. **Inverse**: `INV(A) = min(255, round(4096 / A))`, with `INV(0) = 255`. The table is computed at elaboration.
6. **Contribution**: `contrib = min(255, (IF · INV) >> 10)`.

The `INV` used on frame *f* is the one computed from frame *f−1*. After reset `INV` is 255, so the first frame is unweighted. On a steady scene this one-frame lag makes no difference.

Example from the full-size test picture (a diagonal mesh with a small shaded patch):

- The mesh directions average 70 to 86, which gives `INV` of about 48 to 59.
- The patch direction averages 25, which gives `INV = 164`.
- On the second frame, 89 % of the patch pixels come out at 128 or above, against 0.04 % of the rest of the picture.

## Max (`max_tree`)

`defect` is the largest of the four contributions. `dominant` is the lowest index that holds that maximum. It reports which direction made the pixel bright.

## Derived single-processor operators (`derived_dfp_set`)

Before merging, derivation turns each programmable processor into a small fixed operator: the resources the operator does not use are removed and the rest is frozen. The classic case is an 8-bit adder left with a one-stage pipeline and three two-word FIFOs (two inputs, one output). These operators keep their FIFOs, so they talk through a handshake instead of the detector's fixed timing:

- A token is an 8-bit value plus an `eof` flag (`tok_t` in `dfp_pkg`).
- A token moves on a clock where the sender's `valid` and the receiver's `ready` are both high. A sender holds the token until it moves.
- Every operator passes one token per clock when its inputs are present and its output is taken. A token needs two clocks from input port to output port, one through the 256-word FIFO.

| unit | module | what it does |
|---|---|---|
| 0-3 | `derived_op` | `y = a + b` (mod 256), `abs(a)` (a read as a signed byte), `a & b`, `max(a, b)`; `eof` of `a` |
| 4 | `df_fifo` | 256-word FIFO |
| 5, 6 | `derived_delay` | token `i` leaves with the value of token `i − 1` (pixel delay) or `i − 512` (line delay), 0 before that, and its own `eof` |
| h | `derived_histogram` | counts each value over a frame in a 256×9 memory (saturating at 511); after the `eof` token it sends the 256 counts in value order, `eof` on the last, and clears them |

The histogram clears its memory for 256 clocks after reset and takes no input while it sends counts.

On the top level these ports carry the prefix `lib_`: `lib_a_*[6:0]` and `lib_y_*[6:0]` for the seven units, `lib_b_*[2:0]` for the second operand of add, and and max (units 0, 2 and 3), and `lib_h_*`, `lib_hy_*` for the histogram.

## Detector ports (`defect_detector`, and `derived_chipset` without prefix)

| port | dir | width | meaning |
|---|---|---|---|
| `clk`, `rst_n` | in | 1 | clock; asynchronous active-low reset |
| `line_len` | in | 10 | pixels per line, 1 to `DEPTH` |
| `threshold` | in | 8 | edge threshold on the 5-bit magnitudes |
| `in_ctl`, `picture` | in | 2, 8 | input pixel stream |
| `out_ctl`, `defect` | out | 2, 8 | defect image, 10 clocks later |
| `dominant` | out | 3 | winning direction of each output pixel |
| `edge_count`, `edge_count_valid` | out | 20, 1 | edge pixels of the last frame |
| `dir_avg` | out | 4×8 | per-direction average `A` of the last frame |

Parameters:

- `DEPTH` (default 512) is the depth of every line memory. It is the maximum line length.
- `NDIR` (default 4) is the number of directions.
- `LINE` (default 512, top level only) is the length of the operator set's line delay.

Lines longer than 512 pixels need a larger `DEPTH`. The widths of `line_len` follow from it. The original 572×768 images need `DEPTH = 1024`. In the original hardware that role was played by an external FIFO.

Memory of the detector at the default size:

- Nine line memories of 512 words, 45,056 bits in all: one 8-bit memory in the extraction macro, and two 10-bit memories in each direction macro.
- Tables of 24,576 bits in all: the 1024×8 arctangent ROM, and two 256×8 tables in each direction macro (distance weights and inverse).

## What follows the original design and what does not

Taken from the original design:

- the operator chain;
- the 1024×8 arctangent ROM;
- the max/greater-or-equal edge test;
- the per-frame edge count;
- the distance-from-k table followed by masking;
- the 3×3 local sum built from pixel and line delays;
- weighting by the inverse of a global average;
- the four directions reduced by a max tree;
- the 512-word line memory and the 512-pixel line limit.

This design's own choices:

- **Stream and timing**: the token and sideband convention, no back-pressure, one register per operator group, the latencies, and the 6-clock frame gap.
- **Magnitude scaling**: `abs(d) >> 3`, the 5-bit reading of the operator that feeds the 10-bit ROM address.
- **Direction scale**: 254 codes per half turn, with the `(254 − atan) mod 254` fold. The original names this step only as an "add 254".
- **Table contents**: the triangular distance weights, `INV_NUM = 4096` and `OUT_SHIFT = 10`. The original loads all of these into RAMs without giving the values.
- **Per-direction count**: it is the *sum of weights* of the frame. The original obtains this count from a comparison chain on the local sum that could not be given a consistent meaning, so it is not reproduced.
- **Average**: computed with a small divider instead of the original's reciprocal table and 8×8 multiplier. The result has the same meaning, but its rounding is this design's own.
- **Count width**: the frame counters are 20 bits, wider than the original processor's 16-bit counter, so that a 572×768 frame cannot overflow them.
- **No FIFOs between operators**: there are no two-word FIFOs between operators. All operators sit in one merged macro, which is the end point of the merging step.
- **Operator set**: only the operator names and their areas are known. The handshake, the token layout, the `abs` convention, the zero start of the delays, the per-frame histogram with saturation, and the 512-token line delay are this design's. Nothing joins the operators to each other or to the detector.

Not included: the programmable data-flow processor and the 1024-processor emulator that hosted the algorithm during prototyping. Their controller and instruction format were never specified, so they could not be reproduced.

## Verification

Each block has a self-checking testbench in `tb/`. Each one prints `TB_RESULT checks=N failures=M` and has a watchdog. `tb/dd_ref_pkg.sv` is an untimed integer model of the whole algorithm over token sequences, and the larger testbenches compare against it pixel by pixel.

| testbench | what it runs |
|---|---|
| `tb_line_pixel_delay`, `tb_derivates`, `tb_atan_unit`, `tb_edge_thresh`, `tb_frame_count`, `tb_distance_lut`, `tb_box_sum3x3`, `tb_direction_average`, `tb_max_tree` | one block each, random and corner cases, latency checked |
| `tb_extraction_macro` | 3 frames of 24×16, edge counts and latencies |
| `tb_direction_macro` | 5 frames, including one dominated by direction k and one with no edge |
| `tb_defect_detector` | whole detector at default parameters, 4 small frames. It counts that every mechanism occurs: edges and non-edges, each direction winning, saturation, renewed statistics, an edge-free frame and idle cycles |
| `tb_defect_detector_full` | whole detector at default parameters, three 572×512 frames, about 1.9 million checks |
| `tb_defect_detector_768` | `DEPTH = 1024`, three frames of the original 572×768 size |
| `tb_df_fifo`, `tb_derived_op`, `tb_derived_delay`, `tb_derived_histogram` | one operator each: random gaps and back-pressure against a model, then a full-rate phase checking one token per clock; FIFO `ready` and `valid`, histogram saturation |
| `tb_derived_dfp_set` | all eight operators at once through `lib_exerciser`, which also requires stalls, a full 256-word FIFO and a saturated bin |
| `tb_derived_chipset` | the top level: the small detector test and the operator set together |
| `tb_derived_chipset_full` | the top level at default parameters: three 572×512 frames through the detector while the operator set runs, about 1.9 million checks |

All of them pass. The reference model was written from the algorithm description, not from the RTL. It shares the RTL's interpretations listed above, so it confirms the implementation of those choices, not the choices themselves.

To run one with Verilator 5:

```
verilator --binary --timing --assert -Irtl -Itb \
    rtl/dd_pkg.sv rtl/dfp_pkg.sv tb/dd_ref_pkg.sv tb/tb_derived_chipset_full.sv \
    --top tb_derived_chipset_full -Mdir obj -o sim && ./obj/sim
```

Verilator finds the other modules by file name through `-Irtl`. The full-size run takes a few seconds.

## Files

- `rtl/derived_chipset.sv`: the top level.
- `rtl/dd_pkg.sv`: widths, constants and the `ctl_t` sideband.
- `rtl/defect_detector.sv`: the detector.
- `rtl/extraction_macro.sv`, `line_pixel_delay.sv`, `derivates.sv`, `atan_unit.sv`, `edge_thresh.sv`, `frame_count.sv`: the extraction path.
- `rtl/direction_macro.sv`, `distance_lut.sv`, `box_sum3x3.sv`, `direction_average.sv`: one direction.
- `rtl/max_tree.sv`: the max stage.
- `rtl/dfp_pkg.sv`, `derived_dfp_set.sv`, `derived_op.sv`, `df_fifo.sv`, `derived_delay.sv`, `derived_histogram.sv`: the derived operator set.
- `tb/`: the testbenches, the reference model (`dd_ref_pkg.sv`) and the operator-set driver (`lib_exerciser.sv`).
