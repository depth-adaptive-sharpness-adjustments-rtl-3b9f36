# Depth-adaptive sharpening for side-by-side stereo video

Stereo video looks deeper when the object in front is crisper than the
scene behind it. This design makes use of that without moving any pixel or
changing any disparity. For each frame it does three things:

1. It measures block disparities between the two views.
2. From the histogram of those disparities it finds the dominant foreground
   object.
3. It sharpens only that object's pixels in both views, with an
   edge-preserving filter that does not add halos or jagged edges.

The background passes through unchanged.

The RTL processes 1920x1080 side-by-side video, with the left view in columns
0..959 and the right view in 960..1919. It needs an external frame store,
double-buffered by frame:

- While a frame is written into the frame store, it is analysed.
- While the next frame arrives, the stored frame is read out, sharpened and
  sent to the display.

The algorithm, the block sizes, the search ranges, the thresholds and the
order of the hardware blocks come from a published depth-adaptive
sharpening design for an FPGA. Each section below separates what that source
specifies from the choices made here. It ends with a full list of deviations.

## Data flow

```
RGB in -> rgb2yuv -+-> frame store write port ({Y,U,V}, two banks)
                   +-> Y -> line_buffer -> disparity_estimator -> dv_table
                                             (homogeneous_check,
                                              de_level2, de_level1,
                                              bidirectional_check)
          end of frame: closing_median_filter -> histogram_analyzer
                        -> labeling_table (largest foreground object)

display:  video_timing_generator -> frame store read port + foreground query
          -> sharpening_filter -> yuv2rgb -> RGB, de, hsync, vsync
```

`dase_top` wires these blocks together. The memory controller and the DRAM
behind the frame store are not part of the RTL. The top exposes them as two
ports:

- a write port;
- a read port whose data must arrive one clock after the request.

## Slices and the line buffer

Disparity is searched on a three-level pyramid:

| Level | Resolution | Searched here? |
|---|---|---|
| 0 | full | No. The hardware stops at level 1 and doubles that result, as the source does. |
| 1 | 1/2 | Yes |
| 2 | 1/4 | Yes |

The input is cut into slices of 32 lines. `line_buffer` down-samples the
luminance as it arrives:

- Level 1 is the rounded 2x2 mean.
- Level 2 is the rounded 4x4 mean.

For one slice of both views it stores 16 level-1 lines and 8 level-2 lines, in
two banks. The estimator searches one bank while the next slice fills the
other. A read returns 16 adjacent pixels one clock after the request, and
pixels outside the line read as 0.

Source versus this design:

- From the source: the 32-line slice, the 16 stored lines and the 16-pixel
  parallel read.
- Choices made here: the mean filters and the two banks.

## Disparity search (the part that takes the most care)

A slice has 60 matching blocks per view. Each block is 16 pixels wide, which
is 8x8 at level 1, centred vertically in the slice.

**Reference view.** The right view is the reference. A right-view block at
column x is compared with the left view at x + d. The stored code is
`clamp(2*d1 + 128, 0, 255)`, so 128 means zero disparity and larger codes are
nearer.

**Per-block sequence.** `disparity_estimator` issues one line-buffer read per
clock. A tag delayed by one clock sends each returned word to the right
sub-block. For each block it runs:

1. **Homogeneity** (`homogeneous_check`, 8 reads). If the range (maximum minus
   minimum) of the level-1 right-view block is below 8, the block is flagged.
   A flat block has no trustworthy match.
2. **Level 2** (`de_level2`, 8 + 40 reads):
   - The 8x8 right-view block is read first.
   - The left-view window then arrives as 5 words per row.
   - Every row word updates all 65 SADs for d in [-32, 32] in the clock it
     arrives.
   - Ties go to the smaller |d|.
   - The level-2 block sits at level-2 column clamp(4k-2).
3. **Level 1** (`de_level1`, 8 + 8 reads). Three SADs are computed at
   2*d2 - 1, 2*d2 and 2*d2 + 1. Ties go to the centre, then -1, then +1.
4. **Bi-directional check** (`bidirectional_check`, no extra reads):
   - From the matched left-view block at x + d1, it searches back into the
     right view at x - 1, x and x + 1.
   - The result counts as reliable only if the best reverse match is at x,
     that is, the reverse disparity is exactly -d1.
   - For this, the right-view level-1 rows are read from column x - 1. The same
     words then feed both `de_level1` and the reverse search, which keeps nine
     SADs running (3 forward candidates x 3 reverse positions).
5. **Write.** One dv_table entry `{unrel, code}` is written. `unrel` is set for
   a homogeneous block and for one that failed the reverse check.

A block takes 82 clocks, measured in the testbenches. The source reports 88
for the same phases. A slice of 60 blocks therefore needs about 4,930 clocks,
while a new slice arrives every 32 x 2200 = 70,400 clocks. If a slice arrives
while one is still being processed, it waits (one slice deep). A further one
is dropped and counted in `st_de_overruns`, which never happens at 1080p.

Source versus this design:

- From the source:
  - the level-2 range [-32, 32];
  - the level-1 range of ±1 around 2*d2;
  - the 8x8 block sizes;
  - the order of phases.
- Choices made here:
  - **Reverse check window.** The source asks for a reverse search "in a given
    search area" and does not show it in its hardware. Here it is limited to ±1
    at level 1, which costs one clock.
  - **Homogeneity rule.** The source names the homogeneity test but does not
    define it.
  - **Placement and codes:** where the blocks sit, the tie rules and the code
    format.

## Disparity map clean-up

`dv_table` holds two 34x60 planes of 9-bit entries. It serves a 3x3 window in
one clock, with edges replicated, plus a single read port.
`closing_median_filter` makes four passes, each going from one plane to the
other:

| Pass | Operation |
|---|---|
| 0 | Each unreliable entry becomes the lower median of its 8 neighbours. |
| 1 | 3x3 maximum (closing, first half). |
| 2 | 3x3 minimum (closing, second half). |
| 3 | 3x3 median. |

The four passes take 4 x 2040 + 1 clocks. The replaced-entry count is shown
as `st_replaced`.

## Finding the foreground: histogram and labeling

`histogram_analyzer` builds a 256-bin histogram of the cleaned codes. From it
the analyzer works out the following values:

- **θ:** 3 % of the block count. A window counts only if its sum is strictly
  greater than θ.
- **d_S:** the first bin from the left whose 5-bin window (d_S .. d_S+4) holds
  more than θ.
- **d_E:** the same search from the right.
- **Split:** d_S + 0.4 (d_E - d_S).
- **Peaks:** p_B is the first maximum below the split (background) and p_F the
  first maximum from the split up (foreground).
- **δ:** p_B + 0.4 (p_F - p_B), the foreground threshold.

If no window passes θ, d_S = 0 and d_E = 255 are used.

`labeling_table` marks blocks with code ≥ δ. It then runs a two-pass
connected-component labeling with an equivalence (parent) table, using
4-connectivity, and keeps only the largest component. At the start of each
display frame it latches the mask, so analysis of the next frame cannot
disturb the frame on screen.

A pixel query answers "foreground" if a kept block lies within 8 pixels of the
pixel, which gives the exterior band the source asks for. The left view uses
the right view's mask moved by p_F - 128, the dominant foreground disparity.

Source versus this design:

- From the source: the 3 % threshold, the 5-bin window, the 4:6 splits, the
  largest object, the 8-pixel band and the shifted mask for the left view.
- Choices made here:
  - the bin-window direction for d_E;
  - the integer rounding;
  - the fallback values;
  - 4-connectivity;
  - one shift for the whole object.

## Sharpening filter

`sharpening_filter` sees a 5x5 luminance neighbourhood, built from four line
delays of one raster line (HT) each. Frame-top rows and view-edge columns are
replicated. Each pixel goes through these steps:

1. **Edge level.** A 3x3 binomial low-pass is followed by a Sobel operator in
   each direction. The edge level is e = |Sobel| / 64.
2. **Weight λ** from e, separately for the horizontal and vertical direction:

   | Edge level e | λ |
   |---|---|
   | e < 20 | 0 |
   | 20 ≤ e < 40 | 1 |
   | 40 ≤ e < 70 | 0.8 |
   | 70 ≤ e < 100 | 0.4 |
   | e ≥ 100 | 0 |

   λ is held in fifths.
3. **Edge-preserving low-pass, horizontal and vertical.** The filter uses taps
   {1, 2, 4, 2, 1}. A tap is dropped when it differs from the centre pixel by
   60 or more. The remaining taps are renormalised by their own sum, with
   rounding.
4. **Output.** The high-pass signal is h = x - low-pass, and the result is
   y = clamp(x + (λh·hh + λv·hv) / 5).

Y is switched between sharpened and original by the foreground flag. Chroma is
passed from the store unchanged.

Source versus this design:

- From the source:
  - the thresholds 20/40/70/100;
  - the weights 1/0.8/0.4;
  - the Gaussian taps;
  - the 60 tap-exclusion threshold;
  - the structure of one-dimensional filtering per direction.
- Choices made here:
  - the binomial pre-filter;
  - the Sobel scaling;
  - the border handling.

## Display timing and latency

`video_timing_generator` runs one 1080p raster (2200 x 1125 clocks,
CEA-861 sync positions). It provides three counters offset from each other:

- **Fetch position:** drives the frame-store read and the foreground query.
  Fetch rows run to VA + 1, re-reading the last line, to fill the 5x5 window.
- **Filter centre:** 2*HT + 4 clocks behind the fetch.
- **Display position:** 2*HT + 6 clocks behind the fetch. This is where `de`,
  `hsync` and `vsync` are produced.

The output RGB is aligned with `out_de`. The conversions are full-range BT.601
in 8-bit fixed point, one register each.

## Interfaces of the top

| Group | Signals |
|---|---|
| Source video | `in_valid`, `in_x`, `in_y`, `in_r/g/b`: one pixel per clock with its coordinates. It must follow the display raster's frame rate. |
| Frame store | `fs_wr_en/addr/data` with data {Y,U,V} at address bank·HA·VA + y·HA + x; `fs_rd_en/addr`, then `fs_rd_data` one clock later. |
| Display | `out_de`, `out_hsync`, `out_vsync`, `out_r/g/b`. |
| Status | `analysis_done`, `st_delta`, `st_pf`, `st_obj_size`, `st_de_overruns`, `st_homog_blocks`, `st_bidir_fails`, `st_replaced`, `st_merges`, `st_mb_cycles`. |

Display frame n shows input frame n - 1 with frame n - 1's own mask. Until the
first analysis has finished, nothing is sharpened.

## Where this design departs from the source

- **Clocking.** There is one clock. The source runs the analysis core at
  200 MHz and the conversion and display at 148.35 MHz. No clock crossing is
  modelled.
- **Memory outside the RTL.** The DDR2 memory controller and the DRAM are
  outside the RTL, behind the two frame-store ports.
- **Format.** Only the left/right side-by-side format is built. The source
  also evaluates top/bottom (1920x540 views).
- **Level 0.** Level 0 is not searched, as in the source's hardware. Instead,
  the source assigns each search result to the central 8x8 of an overlapping
  16x16 block. Here there is one disparity per 16-pixel block column and
  32-line slice.
- **Search direction.** The search goes from the right view into the left. The
  source's algorithm text matches left into right, but its hardware reads an
  8x8 right block against a 72x8 left window, and that is followed here.
- **Reverse check.** The bi-directional check is limited to ±1 at level 1.
- **Homogeneity test.** The test and its threshold of 8 are this design's own.
- **Timing and counts.** A block takes 82 clocks here; the source measures 88.
  The resource use is not compared with the source's FPGA figures.
- **When the map is processed.** Clean-up, histogram and labeling run once
  per frame, after its last slice. Together they take 16,638 clocks at 1080p,
  inside the vertical blanking. The source quotes about 3,740 cycles
  for these steps.
- **DV table buffering.** The DV table is not double-buffered. Analysis
  finishes inside the vertical blanking, long before the next frame's first
  slice is written.

## Verification

Each block has a self-checking testbench in `tb/`. Each one compares the block
against a model written independently inside the testbench, prints
`TB_RESULT checks=N failures=M` and has a watchdog.

| Testbench | What is checked | Checks |
|---|---|---|
| tb_rgb2yuv, tb_yuv2rgb | random and corner colours | 2003 each |
| tb_line_buffer | both levels, banks, out-of-range reads | 3524 |
| tb_homogeneous_check | range threshold on random and flat blocks | 301 |
| tb_de_level2, tb_de_level1 | SAD arg-min, ties, line edges | 160, 180 |
| tb_bidirectional_check | reverse search on consistent and random views, latency | 1202 |
| tb_disparity_estimator | every entry of a slice against a hierarchical search model; planted disparity; flags; clocks per block ≤ 88 | 32 |
| tb_dv_table | window and read ports, edge replication | 1080 |
| tb_closing_median_filter | all four passes against a model | 72 |
| tb_histogram_analyzer | d_S, d_E, peaks, δ, θ boundary, on 129 maps | 131 |
| tb_labeling_table | labeling, largest object, band, shift | 10026 |
| tb_sharpening_filter | every output pixel against a model; all five λ intervals hit | 805 |
| tb_video_timing_generator | sync, de and counter offsets | 1667 |

Two end-to-end testbenches drive a synthetic stereo scene through the whole
top. The scene has a textured background at disparity 4, a rectangular object
at disparity 24 and a flat patch, over two frames of different brightness.

- `tb_dase_top` runs at 512x256.
- `tb_dase_top_full` runs at the default 1920x1080 with no parameter
  overrides, in about half a minute.

Both testbenches model the frame store. They check every displayed pixel:

- against an independent model of the sharpening filter;
- against the expected foreground region in both views.

They also count that each mechanism occurred at least once:

- a homogeneous block;
- a failed reverse check;
- a replaced entry;
- a label merge;
- a sharpened and an unsharpened pixel;
- left-view sharpening through the shift.

Both also check that this analysis fits inside the vertical blanking.

Results: 262,158 checks at 512x256 and 4,147,214 at full size, with no
failures.

To run a testbench with Verilator 5:

```
verilator --binary --timing --assert -Wno-fatal -Irtl -Itb \
    rtl/dase_pkg.sv tb/tb_dase_top_full.sv --top-module tb_dase_top_full
./obj_dir/Vtb_dase_top_full
```

Replace the testbench name to run any other testbench. Verilator finds the
modules in `rtl/` by file name.

## Parameters worth changing

- `dase_top`:
  - `HA`, `VA`: active size, 1920x1080.
  - `HT`, `VT`: raster size, 2200x1125.

  Smaller values give quick simulations. Keep each view (HA/2) a multiple of
  16 pixels, the block width.
- `dase_pkg`: the thresholds, which are:
  - `HOM_TH` (homogeneity);
  - `THETA_PCT` (histogram);
  - `SPLIT_NUM`/`SPLIT_DEN` (the 4:6 splits);
  - `EDGE_T1..4` and the λ values (sharpening weights);
  - `EP_TS` (edge-preserving tap exclusion);
  - `BAND_PX` (foreground band).
