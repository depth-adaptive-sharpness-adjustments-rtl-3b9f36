// tb_sharpening_filter: streams two frames of a 2x16-pixel-wide, 12-line
// side-by-side picture (line length 44 clocks with blanking) through the
// filter, with the window-centre coordinate running 2 lines + 3 clocks
// behind the input as the caller must supply it. Every active output pixel is
// compared with a model in the testbench built from the algorithm's
// description: clamped 5x5 window (rows at the frame edges, columns at the
// edges of each view), 3x3 binomial LPF, Sobel edge levels /64, the
// 0/1/0.8/0.4/0 staircase at 20/40/70/100, the 5-tap Gaussian with taps
// dropped at |difference| >= 60, and y = x + (lh*hh + lv*hv)/5 clamped;
// the foreground flag selects sharpened or original luminance, chroma passes
// from the centre. All five weight intervals must occur.
module tb_sharpening_filter;
  import dase_pkg::*;
  localparam int HA = 32, VW = 16, VA = 12, HT = 44, VT = 16, TOT = HT * VT;
  logic clk = 0, rst_n = 0;
  pix_t s_y = 0, s_u = 0, s_v = 0;
  logic s_fg = 0, c_act = 0;
  logic [11:0] c_x = 0, c_y = 0;
  logic o_act, o_fg;
  pix_t o_y, o_sharp, o_orig, o_u, o_v;
  logic [2:0] o_lam_h, o_lam_v;
  int checks = 0, failures = 0;
  int img [VA][HA];
  int fgm [VA][HA];
  int seen [6] = '{default: 0};

  sharpening_filter #(.HT(HT), .VW(VW)) dut (.*);

  always #5 clk = ~clk;
  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int px(input int r, input int c, input int cx);
    automatic int vb = (cx >= VW) ? VW : 0;
    if (r < 0) r = 0;
    if (r > VA - 1) r = VA - 1;
    if (c < vb) c = vb;
    if (c > vb + VW - 1) c = vb + VW - 1;
    return img[r][c];
  endfunction
  function automatic int lam(input int e);
    if (e < 20) return 0;
    if (e < 40) return 5;
    if (e < 70) return 4;
    if (e < 100) return 2;
    return 0;
  endfunction
  function automatic int lamidx(input int e);
    return (e < 20) ? 0 : (e < 40) ? 1 : (e < 70) ? 2 : (e < 100) ? 3 : 4;
  endfunction
  function automatic int lp(input int r, input int c, input int cx);  // 3x3 binomial x16
    automatic int s = 0;
    for (int i = -1; i <= 1; i++) for (int j = -1; j <= 1; j++)
      s += (2 - (i < 0 ? -i : i)) * (2 - (j < 0 ? -j : j)) * px(r + i, c + j, cx);
    return s;
  endfunction
  function automatic int eplpf(input int v [5]);
    automatic int g [5] = '{1, 2, 4, 2, 1};
    automatic int num = 0, den = 0;
    for (int k = 0; k < 5; k++)
      if ((v[k] > v[2] ? v[k] - v[2] : v[2] - v[k]) < 60) begin num += g[k] * v[k]; den += g[k]; end
    return (num + den / 2) / den;
  endfunction
  function automatic int model(input int y, input int x, output int lh, output int lv);
    int gx, gy, hv [5], vv [5], yy;
    gx = 0; gy = 0;
    for (int i = -1; i <= 1; i++) begin
      gx += (2 - (i < 0 ? -i : i)) * (lp(y + i, x + 1, x) - lp(y + i, x - 1, x));
      gy += (2 - (i < 0 ? -i : i)) * (lp(y + 1, x + i, x) - lp(y - 1, x + i, x));
    end
    gx = (gx < 0 ? -gx : gx) / 64;
    gy = (gy < 0 ? -gy : gy) / 64;
    lh = gx; lv = gy;
    for (int k = 0; k < 5; k++) begin hv[k] = px(y, x + k - 2, x); vv[k] = px(y + k - 2, x, x); end
    yy = img[y][x] + (lam(gx) * (img[y][x] - eplpf(hv)) + lam(gy) * (img[y][x] - eplpf(vv))) / 5;
    return yy < 0 ? 0 : (yy > 255 ? 255 : yy);
  endfunction

  int pos = 0;
  initial begin
    for (int y = 0; y < VA; y++) for (int x = 0; x < HA; x++) begin
      automatic int xv = x % VW;
      // ramps, steps of several heights, noise
      img[y][x] = (y < 4) ? ((xv < 8) ? 40 : 40 + 25 * (y + 1)) :
                  (y < 8) ? (xv * 14 + $urandom_range(0, 30)) : $urandom_range(0, 255);
      fgm[y][x] = (x % 5 != 0);
    end
    repeat (2) @(posedge clk); rst_n = 1;
    for (int t = 0; t < 2 * TOT + 3 * HT; t++) begin
      automatic int h = pos % HT, v = (pos / HT) % VT;
      automatic int cp = (pos - 3 - 2 * HT + 10 * TOT) % TOT;
      automatic int ch = cp % HT, cv = cp / HT;
      automatic int ry = (v < VA) ? v : VA - 1;
      // drive at the falling edge
      @(negedge clk);
      s_y  = (h < HA && v < VA + 2) ? 8'(img[ry][h]) : 8'($urandom_range(0, 255));
      s_u  = 8'(h + v);
      s_v  = 8'(h ^ v);
      s_fg = (h < HA && v < VA + 2) ? 1'(fgm[ry][h]) : 1'b0;
      c_x  = 12'(ch); c_y = 12'(cv);
      c_act = (ch < HA && cv < VA) && (pos >= 3 + 2 * HT);
      @(posedge clk); #1;
      if (c_act) begin
        int lh, lv, e;
        e = model(cv, ch, lh, lv);
        seen[lamidx(lh)]++; seen[lamidx(lv)]++;
        checks++;
        if (!o_act || o_sharp != 8'(e) || o_y != (fgm[cv][ch] ? 8'(e) : 8'(img[cv][ch])) ||
            o_orig != 8'(img[cv][ch]) || o_u != 8'(ch + cv) || o_v != 8'(ch ^ cv) ||
            o_fg != 1'(fgm[cv][ch]) || o_lam_h != 3'(lam(lh)) || o_lam_v != 3'(lam(lv))) begin
          failures++;
          if (failures < 10) $display("FAIL (%0d,%0d) got %0d/%0d exp %0d, lam %0d %0d exp %0d %0d",
                                      ch, cv, o_sharp, o_y, e, o_lam_h, o_lam_v, lam(lh), lam(lv));
        end
      end
      pos++;
    end
    for (int i = 0; i < 5; i++) begin
      checks++;
      if (seen[i] == 0) begin failures++; $display("FAIL weight interval %0d never seen", i); end
    end
    $display("interval counts %0d %0d %0d %0d %0d", seen[0], seen[1], seen[2], seen[3], seen[4]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
