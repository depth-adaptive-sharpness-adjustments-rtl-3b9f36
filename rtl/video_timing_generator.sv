// video_timing_generator: display raster timing and the read-out positions
// that run ahead of it.
//
// One free-running raster counter pair (HT clocks per line, VT lines) is
// kept three times with different start values, so that the three views of
// the same raster keep fixed offsets:
//   fetch   - position being read from the frame store this clock: f_en over
//             the active columns of lines 0 .. VA+1, line numbers beyond the
//             last active line repeat it (bottom edge of the 5x5 filter);
//             f_start pulses at fetch position (0,0);
//   centre  - the fetch position OFF_C clocks earlier: the pixel at the
//             centre of the sharpening window (c_x, c_y, c_act);
//   display - the fetch position OFF_D clocks earlier: de, hsync, vsync and
//             the displayed pixel's coordinate.
// Defaults are the CEA-861 1080p timing (2200 x 1125 clocks, sync pulses 44
// clocks and 5 lines, positive). The source design only names this block;
// all its timing is this design's choice.
module video_timing_generator
  import dase_pkg::*;
#(
  parameter int unsigned HA    = H_ACT,
  parameter int unsigned VA    = V_ACT,
  parameter int unsigned HT    = H_TOT,
  parameter int unsigned VT    = V_TOT,
  parameter int unsigned HFP   = 88,
  parameter int unsigned HSW   = 44,
  parameter int unsigned VFP   = 4,
  parameter int unsigned VSW   = 5,
  parameter int unsigned OFF_C = 2 * H_TOT + 4,
  parameter int unsigned OFF_D = 2 * H_TOT + 6
) (
  input  logic        clk,
  input  logic        rst_n,
  output logic        f_en,
  output logic        f_start,
  output logic [11:0] f_x,
  output logic [11:0] f_y,
  output logic        c_act,
  output logic [11:0] c_x,
  output logic [11:0] c_y,
  output logic        de,
  output logic        hsync,
  output logic        vsync,
  output logic [11:0] d_x,
  output logic [11:0] d_y
);

  localparam longint unsigned TOT = longint'(HT) * longint'(VT);
  localparam longint unsigned PC  = (TOT - longint'(OFF_C) % TOT) % TOT;
  localparam longint unsigned PD  = (TOT - longint'(OFF_D) % TOT) % TOT;

  logic [11:0] fh, fv, ch, cv, dh, dv;
  logic [11:0] fh_n, fv_n, ch_n, cv_n, dh_n, dv_n;

  function automatic void step(input logic [11:0] h, input logic [11:0] v,
                               output logic [11:0] hn, output logic [11:0] vn);
    if (h == 12'(HT - 1)) begin
      hn = '0;
      vn = (v == 12'(VT - 1)) ? '0 : v + 12'd1;
    end else begin
      hn = h + 12'd1;
      vn = v;
    end
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      fh <= '0;              fv <= '0;
      ch <= 12'(PC % HT);    cv <= 12'(PC / HT);
      dh <= 12'(PD % HT);    dv <= 12'(PD / HT);
    end else begin
      fh <= fh_n; fv <= fv_n;
      ch <= ch_n; cv <= cv_n;
      dh <= dh_n; dv <= dv_n;
    end
  end

  always_comb begin
    step(fh, fv, fh_n, fv_n);
    step(ch, cv, ch_n, cv_n);
    step(dh, dv, dh_n, dv_n);
  end

  always_comb begin
    f_en    = (fh < 12'(HA)) && (fv < 12'(VA + 2));
    f_start = (fh == '0) && (fv == '0);
    f_x     = fh;
    f_y     = (fv < 12'(VA)) ? fv : 12'(VA - 1);
    c_act   = (ch < 12'(HA)) && (cv < 12'(VA));
    c_x     = ch;
    c_y     = cv;
    de      = (dh < 12'(HA)) && (dv < 12'(VA));
    hsync   = (dh >= 12'(HA + HFP)) && (dh < 12'(HA + HFP + HSW));
    vsync   = (dv >= 12'(VA + VFP)) && (dv < 12'(VA + VFP + VSW));
    d_x     = dh;
    d_y     = dv;
  end

endmodule
