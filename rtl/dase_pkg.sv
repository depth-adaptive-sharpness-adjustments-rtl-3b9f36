// dase_pkg: constants and small types shared by the depth-adaptive sharpness
// enhancement (DASE) design.
//
// The design takes a side-by-side (left | right) stereo video, estimates a
// block disparity map from a two-level hierarchical block search, segments the
// dominant foreground object from the disparity histogram and sharpens only
// that object. Numbers taken from the source design: 1920x1080 at 60 Hz,
// 16x16 matching blocks (60 per slice), level-2 search range [-32,32],
// level-1 refinement [-1,+1], histogram threshold 3 %, 4:6 split, edge
// thresholds T1..T4 = 20/40/70/100, edge-preserving threshold TS = 60, weights
// 1 / 0.8 / 0.4 over the three middle edge-level intervals.
// Own choices: 2200x1125 total raster (CEA-861 1080p timing), 32-line slices,
// an 8-bit DV code equal to full-resolution disparity + 128, weights held as
// multiples of 1/5.
package dase_pkg;

  // Raster
  localparam int unsigned H_ACT   = 1920;  // active pixels per line (L | R)
  localparam int unsigned V_ACT   = 1080;  // active lines per frame
  localparam int unsigned H_TOT   = 2200;  // total clocks per line
  localparam int unsigned V_TOT   = 1125;  // total lines per frame

  // Disparity estimation
  localparam int unsigned MB_SIZE     = 16;  // full-resolution matching block
  localparam int unsigned SLICE_LINES = 32;  // full-resolution lines per slice
  localparam int unsigned SR2         = 32;  // level-2 search range +/-SR2
  localparam int unsigned RD_PAR      = 16;  // pixels per line-buffer read
  localparam int unsigned HOM_TH      = 8;   // homogeneity: max-min below this

  // Histogram analysis
  localparam int unsigned THETA_PCT   = 3;   // d_S / d_E threshold, % of total
  localparam int unsigned SPLIT_NUM   = 4;   // 4:6 split -> 4/10 from the left
  localparam int unsigned SPLIT_DEN   = 10;

  // Sharpening
  localparam int unsigned EDGE_T1 = 20;
  localparam int unsigned EDGE_T2 = 40;
  localparam int unsigned EDGE_T3 = 70;
  localparam int unsigned EDGE_T4 = 100;
  localparam int unsigned EP_TS   = 60;      // edge-preserving LPF threshold
  localparam int unsigned BAND_PX = 8;       // exterior band added to object

  // Weight lambda in units of 1/5: 1.0 -> 5, 0.8 -> 4, 0.4 -> 2
  localparam logic [2:0] LAM_MID  = 3'd5;
  localparam logic [2:0] LAM_HIGH = 3'd4;
  localparam logic [2:0] LAM_VHI  = 3'd2;

  typedef logic [7:0] pix_t;

  // One entry of the disparity vector table
  typedef struct packed {
    logic       unrel;   // block judged unreliable (homogeneous)
    logic [7:0] code;    // full-resolution disparity + 128, clamped 0..255
  } dv_entry_t;

  // Lambda for one edge level (Fig. 5 staircase), in units of 1/5
  function automatic logic [2:0] edge_weight(input int unsigned e);
    if (e < EDGE_T1)      return 3'd0;
    else if (e < EDGE_T2) return LAM_MID;
    else if (e < EDGE_T3) return LAM_HIGH;
    else if (e < EDGE_T4) return LAM_VHI;
    else                  return 3'd0;
  endfunction

endpackage
