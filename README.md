# Speed limit sign detector: a two-stage frame pipeline

This is a hardware detector for round speed-limit signs in a grayscale video stream. It does not use a trained classifier. Instead it chains three cheap tests, each of which removes most of the windows the previous test let through:

1. **Rectangle pattern matching (RPM).** A window whose border is a dark ring inside a brighter surround is a candidate. This test runs on the 8-bit image, at every pixel position and for every window size, in the same clock cycle.
2. **Circle detection (CD).** On a binarized copy of the frame, the border pixels of a candidate must point in the directions a circle's edge would point.
3. **Number recognition (NR).** The row and column histograms of the dark pixels inside the candidate are compared with a table of digit shapes. The matching entry gives the speed value.

The frame comes in at one pixel per clock, with no random memory access. RPM and binarization process frame *n* as it streams in. Meanwhile, CD and NR look only at the candidates that frame *n−1* produced.

Default configuration:

- frame size 640×360, 8-bit pixels;
- 14 window sizes: 20, 21, 23, 24, 26, 28, 30, 32, 34, 36, 38, 42, 46 and 50 pixels;
- a 512-entry candidate FIFO;
- two 640×360-bit binary image banks.

A frame takes 230,400 clocks. The result for a frame is ready early in the following frame.

## Block diagram

```
 camera ─► preprocess ─► column_buffer ─┬─► rpm (rpm_sw × NSW + rpm_controller) ─► lsw_fifo ─┐
 (8 bit)   bypass /       50 lines      │                                                    │
           ÷3 / field     → 50-pixel    └─► seb ─► bim_pingpong (bank A written,             │
                          column/clock        bank B read) ──────────────────┐               │
                                                                             ▼               ▼
                                                 speed_recog: reads the window rows, 2 words per line
                                                    ├─► circle_detect ─┐
                                                    └─► number_recog ──┴─► judgement ─► det_*, frame_*
 |<────────────── RPM stage, frame n ─────────────>|<────── NR stage, frame n−1 (same time) ──────>|
```

| file | block |
|---|---|
| `rtl/slt_pkg.sv` | shared constants, the 64-bit FIFO entry, the direction and mode enums, the number-class record |
| `rtl/slt_top.sv` | top level: the whole pipeline |
| `rtl/preprocess.sv` | optional down-sampling by 3, or de-interlacing |
| `rtl/column_buffer.sv` | 49 line memories; outputs the newest 50-pixel column each clock |
| `rtl/area_lum.sv` | sliding sum of one area (add the new column part, subtract the old one) |
| `rtl/rpm_sw.sv` | RPM for one window size (16 areas, 8 tests) |
| `rtl/rpm_controller.sv` | x/y counters, border masking, flag collection, FIFO entry write |
| `rtl/rpm.sv` | all window sizes in parallel plus the controller |
| `rtl/lsw_fifo.sv` | location and window-flag FIFO between the stages |
| `rtl/seb.sv` | 3×3 smoothing and binarization |
| `rtl/bim_pingpong.sv` | the two binary frame banks, swapped every frame |
| `rtl/speed_recog.sv` | NR-stage controller; owns CD, NR and judgement |
| `rtl/circle_detect.sv` | direction voting over a window |
| `rtl/number_recog.sv` | histogram features and class-table lookup |
| `rtl/judgement.sv` | combines CD and NR, and gives the per-frame decision |

## The column stream

All windows share one trick. As pixel (x, y) arrives, `column_buffer` outputs the 50 pixels directly above it, rows y−49..y (`col[49]` is the newest). Every window size therefore sees, in the same clock, the new right-hand column of the window whose bottom-right corner is (x, y). The line memories are RAMs indexed by x, read and written in the same cycle.

The rows above the top of the frame still hold the previous frame. Any window that reaches into them is discarded:

- `rpm_controller` keeps a window only if x ≥ M−1 and y ≥ M−1;
- `seb` skips border pixels.

## Rectangle pattern matching (hardest part)

### Geometry

For a window of side M:

- each side carries two dark "B" strips on the outside and two bright "W" strips just inside them;
- that gives 16 areas in total, tested as 8 pairs;
- a pair passes when `I(W) − I(B) > thr·k·h`;
- the window is a candidate when all 8 pairs pass.

Every area is a strip k = M/10 pixels thick and h = M/5 pixels long, so all 16 areas hold the same k·h pixels. Along each side, the two pairs are centred on the two halves. Naming:

- B1/W1 and B2/W2 are on the top (left, right);
- B5/W5 and B6/W6 are on the bottom;
- B3/W3 and B4/W4 are on the right (upper, lower);
- B8/W8 and B7/W7 are on the left (upper, lower).

The threshold input `thr` is a per-pixel step, which is why it is multiplied by the area size.

In LED mode (`led=1`) each pair compares `|I(W) − I(B)|`. LED signs are bright rings on a dark background, so the contrast is inverted, and taking the magnitude catches them without inverting the image.

### Computation reuse

A naive design sums 16 areas for every window at every pixel. `rpm_sw` does it with six running sums per window size:

- **Sliding sums (local reuse).** Each running sum is an `area_lum`. When the window moves one pixel right, the sum adds the part of the new column that lies in the area and subtracts the part of the column that left it. The subtrahend comes from a shift register of the column parts added earlier (`S_store = S − S_sub`, `S = S_store + S_add`). The six column segments cover:
  - top B and W rows;
  - bottom B and W rows;
  - the right-hand B and W strips.
- **Delay lines (global reuse).** The left-side strips of a window contain exactly the pixels of the right-side strips of the window M−2k columns earlier. So B8/W8 are the B3/W3 sums delayed, and B7/W7 are the B4/W4 sums delayed. In the same way, the left halves of the top and bottom pairs (B1/W1, B6/W6) are delayed copies of the right halves (B2/W2, B5/W5).

In short, only the right-hand half of the ring is ever summed. The rest comes from short shift registers, `M−MID` entries long for horizontal strips and `M−K` for vertical ones.

### Controller and entries

`rpm` runs one `rpm_sw` per size on the same column. `rpm_controller` masks windows that reach outside the frame. When any size matches, it writes one 64-bit entry to the FIFO:

| bits | field |
|---|---|
| 63:52 | spare |
| 51:50 | frame tag |
| 49:19 | one flag per window size (31 bits; the default uses 14) |
| 18:10 | y of the bottom-right pixel |
| 9:0 | x of the bottom-right pixel |

One entry can therefore stand for several candidate windows of different sizes that share a corner. An entry is written two clocks after its column. If the FIFO is full, the write is dropped and counted (`lsw_drop_cnt`).

Signs appear only in a known part of the image. The `roi` input restricts candidates to a rectangle `{x0, y0, x1, y1}`, inclusive: a window is kept only if it lies wholly inside it. This cuts the work of the second stage. Set it to `{0, 0, W−1, H−1}` for the whole frame.

## Binarization and the two image banks

`seb` smooths each 3×3 neighbourhood with the kernel [1 2 1; 2 4 2; 1 2 1]. It writes 1 (bright) when the weighted sum exceeds 16·`seb_thr`. Pixel (x−1, y−1) is written when pixel (x, y) arrives.

`bim_pingpong` holds two banks, each storing lines as 64-bit words. The roles are fixed within a frame:

- SEB writes one bank, bit by bit;
- the NR stage reads the other bank, one word per clock, with one cycle of latency.

The banks swap at the first pixel of every frame (`bim_bank` shows which bank is being written).

## The NR stage (`speed_recog`)

### Matching entries to frames

The FIFO can hold entries of two frames at once: frame n−1, whose bank is being read, and frame n, which is being scanned. The 2-bit frame tag tells them apart:

- an entry with tag = current tag − 1 is processed;
- an entry with the current tag waits until the next swap;
- anything older is discarded and counted (`stale_drop_cnt`). This can only happen after an overrun.

When the FIFO has no entry of frame n−1 left, the stage raises `frame_end`. If the next swap comes first, the stage counts an overrun (`overrun_cnt`) and moves on to the newer frame.

### Reading a candidate

Each set flag of an entry is one candidate, taken smallest size first. For a window of side m whose top-left corner is (x0, y0), the stage streams lines y0−1 .. y0+m to CD and NR in parallel. Each streamed row holds the columns x0−1 .. x0+m. Points to note:

- The one-pixel margin on each side is there because the 3×3 direction templates need it.
- Each row is built from two adjacent 64-bit words, so a window that straddles a word boundary still costs two reads per line.
- Pixels outside the frame read as bright (1).

A candidate of side m therefore costs 2m+8 clocks, which is 108 for m = 50. At the default frame size that is about 2,100 of the largest candidates per frame.

### Circle detection

The window is cut into thirds along both axes. Each outer ninth expects the ring edge to point one way:

| | left third | middle third | right third |
|---|---|---|---|
| **upper third** | down-right | down | down-left |
| **middle third** | right | (none) | left |
| **lower third** | up-right | up | up-left |

Here "down-right" means the centre of the window lies down and to the right. A dark pixel votes if its 3×3 neighbourhood fits one of two templates for the expected direction d:

- **Inner edge of the ring.** The cell behind the pixel (−d) is dark and the cells in front of it (+d) are bright. For an axis direction that means all three cells of the +d row or column are bright. For a diagonal it means the +d corner is bright and at least one of the two cells beside that corner is bright.
- **Outer edge of the ring.** The same template with +d and −d exchanged.

Votes are counted one full row per clock. The window is a circle if

```
votes·8 ≥ circ_lo·m   and   votes·8 ≤ circ_hi·m
```

so the range is in eighths of a vote per pixel of side. On synthetic rings, circles give about 4–5 votes per pixel of side, and squares about 3.4 or 6.4. The testbenches use `circ_lo=32`, `circ_hi=44`.

### Number recognition

The region of interest is the central square of the window, with a margin of m/4 on every side, so its side is L = m − 2·⌊m/4⌋. As rows stream in, NR builds:

- a histogram of dark pixels per row and per column;
- the total dark area.

From these it takes four positions:

- the fullest row and the emptiest row;
- the fullest column and the emptiest column.

Each position is the first occurrence, expressed in eighths of the ROI (using a precomputed reciprocal of L). The area is expressed in 1/64ths of the ROI.

A class table of `NCLS` entries (`nr_class_t`) is written through `cfg_we/cfg_idx/cfg_data`. Each entry holds:

- `valid`;
- `speed`;
- the four expected position bins;
- an area range.

The lowest-index class whose four bins are equal and whose area lies in the range sets `match` and `speed`. The four bins and the area are also output, so a table can be trained from known signs.

### Judgement

A candidate is accepted if NR matches and, when `use_circle=1`, CD also says circle. Each acceptance gives `det_valid` with the speed, the window corner and the size. At `frame_end`, `frame_valid` reports:

- `frame_speed`: the speed of the largest accepted window, i.e. the nearest sign, or 0 if there was none;
- `frame_dets`: the number of acceptances.

## Pre-processing

`preprocess` sits in front of everything. Its `pp_mode` is one of:

- `PP_BYPASS`;
- `PP_DOWN3`: keep pixels whose column and line are both multiples of 3. A 1920×1080 stream becomes 640×360;
- `PP_DEINTER`: keep lines and columns whose parity equals `pp_field`.

It feeds both the pattern matching and the binarization, so the binary frame and the candidate positions share one frame size. `in_width` tells it the input line length. It adds one clock of latency.

## Parameters and settings

| parameter (slt_top) | default | meaning |
|---|---|---|
| `W`, `H` | 640, 360 | frame size after pre-processing |
| `CH` | 50 | column height = largest window |
| `NSW`, `SIZES` | 14, {20,21,23,24,26,28,30,32,34,36,38,42,46,50} | window sizes (ascending; up to 31) |
| `LSW_DEPTH` | 512 | candidate FIFO entries |
| `NCLS` | 8 | number classes |

The run-time inputs are `rpm_thr`, `led`, `roi`, `seb_thr`, `circ_lo`, `circ_hi` and `use_circle`, plus the class table. They are expected to be held stable during a frame.

Status outputs for monitoring:

- `cand_wr`, `cand_done`, `cand_circle`, `cand_nr`, `cand_votes`;
- `bim_bank`;
- `lsw_drop_cnt`, `overrun_cnt`, `stale_drop_cnt`.

Reset is asynchronous and active-low. It clears the control state but not the line memories or image banks.

## What is the source method and what is this design's own

These parts follow the published method:

- the two-stage pipeline with ping-pong binary image banks;
- the 50-line column buffer;
- one pixel per clock;
- the 64-bit, 512-entry candidate FIFO;
- the 16-area luminosity test with sliding sums and the left-from-right delay lines;
- the absolute difference for LED signs;
- the 14 window sizes;
- restricting candidates to the image area where signs appear;
- down-sampling by 3 and de-interlacing;
- direction voting with the directions set by the ninths of the window, accepted when the votes fall in a range;
- histogram max/min positions plus area as number features;
- about two clocks per window line in the NR stage.

These are choices of this design, since the method leaves them open:

- the strip size (M/10 × M/5) and the threshold scaled by area;
- the smoothing kernel;
- the exact 3×3 direction templates and the vote range scaled by m;
- the NR region of interest, the eighths and 1/64ths quantisation, and the class-table matching rule (the published method defines its digit features elsewhere, so NR here is a working stand-in of the same kind, not a reproduction);
- the rectangular shape of the candidate region (`roi`);
- the frame tags, the overrun and drop handling, and the entry layout;
- the per-frame decision of "largest accepted window";
- border handling.

Where the published text and its block diagram disagree on which right-side strip becomes which left-side strip, this design follows the geometry: each left strip is the same pixel set as the right strip of an earlier window.

Not included:

- The alternative faster circle detector, which votes per column inside the RPM stage and keeps per-size voting FIFOs. It trades area for fewer candidates and is not part of this pipeline.
- Variable scan step.
- A further number feature: the ratio between the fullest or emptiest rows or columns and the rest.

## Simulation

Every block has a self-checking testbench in `tb/`. The expected values are computed from the stimulus by the reference models in `tb/tb_ref_pkg.sv`, not by the RTL. Each testbench prints `TB_RESULT checks=N failures=M`. With Verilator 5:

```
verilator --binary --timing --assert -Irtl -Itb \
    rtl/slt_pkg.sv tb/tb_ref_pkg.sv tb/tb_slt_top.sv --top-module tb_slt_top
./obj_dir/Vtb_slt_top
```

Swap in any other `tb_*` as the top module.

| testbench | what it covers |
|---|---|
| `tb_area_lum`, `tb_column_buffer`, `tb_preprocess`, `tb_lsw_fifo`, `tb_bim_pingpong`, `tb_seb` | each primitive against a model, with random gaps in the input |
| `tb_rpm_sw` | one window size on random and synthetic images, painted and LED |
| `tb_rpm_controller`, `tb_rpm` | edge and region-of-interest masking, entry format, all sizes together |
| `tb_circle_detect`, `tb_number_recog`, `tb_judgement` | the NR-stage pieces on generated windows |
| `tb_speed_recog` | the NR stage with a behavioural image bank; checks 2m+8 clocks per candidate |
| `tb_slt_top` | end to end at 96×64: painted, region-of-interest, down-sampled, crowded and LED frames. Every mechanism (entries, bank swap, circle accept/reject, match, detection, LED, down-sampling, region of interest, FIFO overflow, overrun) must occur at least once |
| `tb_slt_full` | end to end at the default 640×360 size with no parameter overrides: two frames, checking that frame 0's result arrives during frame 1 (about 6,700 clocks into it) |
| `tb_slt_fullhd` | the full HD workload: 1920×1080 input down-sampled by 3 into the default design. Only every third pixel of every third line carries the scene; the rest is random |
| `tb_slt_day1` | a 640×390 camera: the design built with `H=390`, with a sign reaching below line 360 |

`tb_slt_full` simulates two full frames (about 461,000 clocks). `tb_slt_fullhd` simulates two full HD frames (4.1 million clocks). Each runs in well under a minute.

## Limits

- The RTL has been simulated, not timed on any device. The line memories and the two image banks are written as arrays: each bank is 230,400 bits, and the column buffer is 49×640×8 bits. They are meant to map to block RAM.
- Each window size is a separate `rpm_sw` with its own sums and delay lines, so logic grows about linearly with the number of sizes. Going from the default 14 sizes to all 31 sizes from 20 to 50 roughly doubles the RPM stage.
- Thresholds in the testbenches are tuned for synthetic images. Real video needs its own `rpm_thr`, `seb_thr`, vote range and class table.
