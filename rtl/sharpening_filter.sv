// sharpening_filter: object-based, edge-preserving sharpness enhancement of
// the luminance, applied only where the foreground flag is set.
//
// Input: one sample per clock, every clock of the raster including blanking
// (so a line delay is exactly HT clocks): luminance, chroma and the
// foreground flag of that pixel. Four HT-deep line delays and five 5-sample
// shift registers form a 5x5 window. The caller supplies the active-area
// coordinate of the window centre (c_x, c_y, c_act) for the current clock;
// rows above the frame and columns beyond the edge of the pixel's own view
// (left view 0..VW-1, right view VW..2VW-1) are replaced by the nearest valid
// row or column, so the two views never mix. Rows below the frame must be
// fed again by the caller (the read-out repeats the last line).
//
// Per pixel, in one clock (source design, Figs. 4-6, Eq. 3):
//   weight part: 3x3 binomial LPF, then the horizontal and vertical Sobel
//     operators on the LPF output; edge level e = |Sobel| / 64 (LPF and
//     Sobel gains removed); lambda from the staircase of T1..T4 = 20/40/70/100:
//     0, 1, 0.8, 0.4, 0 (held as 0, 5, 4, 2, 0 fifths);
//   sharpening part: 5-tap Gaussian {1,2,4,2,1}/10 along the row (and the
//     column) whose taps are dropped when |x(k) - x(0)| >= TS = 60, then
//     renormalised (rounded division by the remaining weight); the
//     edge-preserving HPF is x minus that LPF output;
//   y = clamp(x + (lambda_h * hpf_h + lambda_v * hpf_v) / 5), rounded toward 0.
// Output, registered one clock after the compute clock: o_y (sharpened where
// the centre sample's fg flag is set, the original luminance otherwise),
// o_sharp (always sharpened), the centre chroma and flag, and o_act.
// The Sobel on the LPF output in place of a separate HPF plus edge operator,
// the normalisations and the rounding are this design's choices.
module sharpening_filter
  import dase_pkg::*;
#(
  parameter int unsigned HT = H_TOT,
  parameter int unsigned VW = H_ACT / 2
) (
  input  logic        clk,
  input  logic        rst_n,
  input  pix_t        s_y,
  input  pix_t        s_u,
  input  pix_t        s_v,
  input  logic        s_fg,
  input  logic [11:0] c_x,
  input  logic [11:0] c_y,
  input  logic        c_act,
  output logic        o_act,
  output pix_t        o_y,
  output pix_t        o_sharp,
  output pix_t        o_orig,
  output pix_t        o_u,
  output pix_t        o_v,
  output logic        o_fg,
  output logic [2:0]  o_lam_h,
  output logic [2:0]  o_lam_v
);

  typedef struct packed {
    logic fg;
    pix_t u;
    pix_t v;
    pix_t y;
  } smp_t;

  smp_t lb [4][HT];
  smp_t win [5][5];             // [row -2..+2][col -2..+2]
  smp_t tap [5];
  logic [$clog2(HT)-1:0] wp;

  always_comb begin
    tap[4] = '{fg: s_fg, u: s_u, v: s_v, y: s_y};
    for (int k = 0; k < 4; k++) tap[3 - k] = lb[k][wp];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wp <= '0;
      for (int i = 0; i < 5; i++)
        for (int j = 0; j < 5; j++) win[i][j] <= '0;
    end else begin
      wp <= (wp == ($clog2(HT))'(HT - 1)) ? '0 : wp + 1'b1;
      for (int i = 0; i < 5; i++) begin
        for (int j = 0; j < 4; j++) win[i][j] <= win[i][j + 1];
        win[i][4] <= tap[i];
      end
    end
  end

  // line delays (every entry is written before it is read back)
  always_ff @(posedge clk) begin
    lb[0][wp] <= tap[4];
    for (int k = 1; k < 4; k++) lb[k][wp] <= tap[4 - k];
  end

  // clamped 5x5 window of luminance
  int   x [5][5];
  smp_t ctr;
  always_comb begin
    automatic int vb = (c_x >= 12'(VW)) ? int'(VW) : 0;
    for (int i = 0; i < 5; i++) begin
      automatic int ri = i - 2;
      if (ri < -int'(c_y)) ri = -int'(c_y);
      for (int j = 0; j < 5; j++) begin
        automatic int cj = j - 2;
        if (cj < vb - int'(c_x)) cj = vb - int'(c_x);
        if (cj > vb + int'(VW) - 1 - int'(c_x)) cj = vb + int'(VW) - 1 - int'(c_x);
        x[i][j] = int'(win[ri + 2][cj + 2].y);
      end
    end
    ctr = win[2][2];
  end

  // weight computation part
  int s [3][3];
  int gx, gy, eh, ev;
  logic [2:0] lam_h, lam_v;
  always_comb begin
    for (int a = 0; a < 3; a++)
      for (int b = 0; b < 3; b++) begin
        s[a][b] = 0;
        for (int u = -1; u <= 1; u++)
          for (int w = -1; w <= 1; w++)
            s[a][b] = s[a][b] + ((u == 0) ? 2 : 1) * ((w == 0) ? 2 : 1) * x[a + 1 + u][b + 1 + w];
      end
    gx = (s[0][2] + 2 * s[1][2] + s[2][2]) - (s[0][0] + 2 * s[1][0] + s[2][0]);
    gy = (s[2][0] + 2 * s[2][1] + s[2][2]) - (s[0][0] + 2 * s[0][1] + s[0][2]);
    eh = ((gx < 0) ? -gx : gx) >>> 6;
    ev = ((gy < 0) ? -gy : gy) >>> 6;
    lam_h = edge_weight(eh);
    lam_v = edge_weight(ev);
  end

  // edge-preserving 1-D low-pass along a line of five samples
  function automatic int ep_lpf(input int p0, input int pm2, input int pm1,
                                input int pp1, input int pp2);
    int v [5];
    int g [5];
    int num, den;
    v = '{pm2, pm1, p0, pp1, pp2};
    g = '{1, 2, 4, 2, 1};
    num = 0;
    den = 0;
    for (int k = 0; k < 5; k++) begin
      automatic int dlt = v[k] - p0;
      if (dlt < 0) dlt = -dlt;
      if (dlt < int'(EP_TS)) begin
        num += g[k] * v[k];
        den += g[k];
      end
    end
    return (num + den / 2) / den;
  endfunction

  int hp_h, hp_v, ysum;
  pix_t ysh;
  always_comb begin
    hp_h = x[2][2] - ep_lpf(x[2][2], x[2][0], x[2][1], x[2][3], x[2][4]);
    hp_v = x[2][2] - ep_lpf(x[2][2], x[0][2], x[1][2], x[3][2], x[4][2]);
    ysum = x[2][2] + (int'(lam_h) * hp_h + int'(lam_v) * hp_v) / 5;
    if (ysum < 0)        ysh = 8'd0;
    else if (ysum > 255) ysh = 8'd255;
    else                 ysh = 8'(ysum);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      o_act <= 1'b0; o_y <= '0; o_sharp <= '0; o_orig <= '0; o_u <= '0; o_v <= '0;
      o_fg <= 1'b0; o_lam_h <= '0; o_lam_v <= '0;
    end else begin
      o_act   <= c_act;
      o_sharp <= ysh;
      o_orig  <= ctr.y;
      o_y     <= ctr.fg ? ysh : ctr.y;
      o_u     <= ctr.u;
      o_v     <= ctr.v;
      o_fg    <= ctr.fg;
      o_lam_h <= lam_h;
      o_lam_v <= lam_v;
    end
  end

endmodule
