// tb_dase_top_full: end-to-end test of dase_top on a synthetic stereo scene, at the full 1920x1080 size and 1080p raster timing.
//
// Scene: a blocky random background at disparity 4 and a textured
// rectangular object at disparity 24 (DV codes 132 and 152), left view built
// from the right one with the object occluding the background; a flat patch
// in the top-left corner of the right view. Two input frames are sent in step
// with the display raster (the second 10 levels brighter), so display frame 1
// shows input frame 0 and display frame 2 shows input frame 1 (the frame
// store banks alternate). A behavioural frame store with one-clock read
// latency stands in for the external memory.
// Checks, for every displayed pixel of display frames 1 and 2: the RGB equals
// either the testbench model of the unsharpened path (colour conversion
// there and back) or of the sharpened path (model of the sharpening filter on
// the model luminance); deep inside the object, in both views, it must be the
// sharpened one; far from the object the unsharpened one. Also: delta between
// the two codes and p_F = 152, de count per frame, no estimator overrun.
// Mechanisms that must occur at least once: homogeneous block flagged,
// block failing the bi-directional check,
// unreliable entry replaced, analysis completed per frame, pixels sharpened,
// pixels passed unsharpened, left-view mask shift used.
module tb_dase_top_full;
  import dase_pkg::*;
  localparam int HA = H_ACT, VA = V_ACT, HT = H_TOT, VT = V_TOT;
  localparam int VW = HA / 2, FSZ = HA * VA, TOT = HT * VT;
  localparam int DB = 4, DF = 24;
  localparam int OX0 = (VW / 64) * 16, OX1 = VW - (VW / 64) * 16;   // object columns (right view)
  localparam int OY0 = ((VA / 4) / 32) * 32 + 32, OY1 = VA;          // object lines
  logic clk = 0, rst_n = 0;
  logic in_valid = 0;
  logic [11:0] in_x = 0, in_y = 0;
  pix_t in_r = 0, in_g = 0, in_b = 0;
  logic fs_wr_en, fs_rd_en;
  logic [22:0] fs_wr_addr, fs_rd_addr;
  logic [23:0] fs_wr_data, fs_rd_data;
  logic out_de, out_hsync, out_vsync;
  pix_t out_r, out_g, out_b;
  logic analysis_done;
  logic [7:0] st_delta, st_pf;
  logic [11:0] st_obj_size;
  logic [15:0] st_de_overruns, st_homog_blocks, st_bidir_fails, st_replaced, st_merges;
  logic [9:0] st_mb_cycles;
  logic [23:0] fstore [2 * FSZ];
  int checks = 0, failures = 0;
  int n_analysis = 0, n_sharp = 0, n_plain = 0, n_left_fg = 0;

  dase_top u_dut (.*);

  always #5 clk = ~clk;
  initial begin
    repeat (4 * TOT + 1000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // behavioural frame store
  always @(posedge clk) begin
    if (fs_wr_en) fstore[fs_wr_addr] <= fs_wr_data;
    if (fs_rd_en) fs_rd_data <= fstore[fs_rd_addr];
  end
  always @(posedge clk) if (rst_n && analysis_done) n_analysis++;

  // clocks from the end of the last slice's estimation to the foreground
  // being ready (map clean-up, histogram, labeling)
  int an_run = 0, an_clocks = 0;
  always @(posedge clk) if (rst_n) begin
    if (u_dut.cm_start) an_run <= 1;
    else if (analysis_done) begin an_run <= 0; an_clocks <= an_run; end
    else if (an_run > 0) an_run <= an_run + 1;
  end

  // ---------------- scene ----------------
  function automatic int hsh(input int x, input int y, input int s);
    automatic logic [31:0] h = 32'(x) * 32'h9E3779B1 ^ 32'(y) * 32'h85EBCA77 ^ 32'(s) * 32'hC2B2AE3D;
    h = h ^ (h >> 15); h = h * 32'h2C1B3C6D; h = h ^ (h >> 12);
    return int'(h[7:0]);
  endfunction
  function automatic int bgv(input int x, input int y);
    if (x >= 0 && x < 32 && y < 32) return 120;
    return (hsh((x + 4096) / 4, y / 4, 1) * 3 / 4) + (hsh(x, y, 3) % 16);
  endfunction
  function automatic int objv(input int x, input int y);
    return 40 + (hsh((x + 4096) / 4, y / 4, 2) / 2) + (hsh(x, y, 4) % 24);
  endfunction
  function automatic int inobj(input int x, input int y);
    return (x >= OX0 && x < OX1 && y >= OY0 && y < OY1);
  endfunction
  function automatic int lum(input int f, input int x, input int y);  // scene value 0..255
    automatic int xv = (x >= VW) ? x - VW : x, v;
    if (x >= VW) v = inobj(xv, y) ? objv(xv, y) : bgv(xv, y);
    else         v = inobj(xv - DF, y) ? objv(xv - DF, y) : bgv(xv - DB, y);
    v = v + 10 * f;
    return v > 255 ? 255 : v;
  endfunction
  function automatic int cl(input int a); return a < 0 ? 0 : (a > 255 ? 255 : a); endfunction
  function automatic int fd(input int a); return (a >= 0) ? a / 256 : -((-a + 255) / 256); endfunction
  function automatic void rgb(input int f, input int x, input int y, output int r, output int g, output int b);
    automatic int v = lum(f, x, y);
    r = v; g = cl(v + 20); b = v / 2 + 60;
  endfunction
  function automatic void yuv(input int f, input int x, input int y, output int yy, output int uu, output int vv);
    int r, g, b;
    rgb(f, x, y, r, g, b);
    yy = cl(fd(77 * r + 150 * g + 29 * b + 128));
    uu = cl(fd(-43 * r - 85 * g + 128 * b + 128) + 128);
    vv = cl(fd(128 * r - 107 * g - 21 * b + 128) + 128);
  endfunction
  function automatic int yof(input int f, input int x, input int y);
    int yy, uu, vv;
    yuv(f, x, y, yy, uu, vv);
    return yy;
  endfunction
  function automatic void torgb(input int yy, input int uu, input int vv, output int r, output int g, output int b);
    r = cl(yy + fd(359 * (vv - 128) + 128));
    g = cl(yy + fd(-88 * (uu - 128) - 183 * (vv - 128) + 128));
    b = cl(yy + fd(454 * (uu - 128) + 128));
  endfunction

  // ---------------- sharpening model ----------------
  function automatic int px(input int f, input int r, input int c, input int cx);
    automatic int vb = (cx >= VW) ? VW : 0;
    r = r < 0 ? 0 : (r > VA - 1 ? VA - 1 : r);
    c = c < vb ? vb : (c > vb + VW - 1 ? vb + VW - 1 : c);
    return yof(f, c, r);
  endfunction
  function automatic int lam(input int e);
    return (e < 20) ? 0 : (e < 40) ? 5 : (e < 70) ? 4 : (e < 100) ? 2 : 0;
  endfunction
  function automatic int eplpf(input int v [5]);
    automatic int g [5] = '{1, 2, 4, 2, 1};
    automatic int num = 0, den = 0;
    for (int k = 0; k < 5; k++)
      if ((v[k] > v[2] ? v[k] - v[2] : v[2] - v[k]) < 60) begin num += g[k] * v[k]; den += g[k]; end
    return (num + den / 2) / den;
  endfunction
  function automatic int sharp(input int f, input int y, input int x);
    int w [5][5], s [3][3], gx, gy, hv [5], vv [5], yy;
    for (int i = 0; i < 5; i++) for (int j = 0; j < 5; j++) w[i][j] = px(f, y + i - 2, x + j - 2, x);
    for (int a = 0; a < 3; a++) for (int b = 0; b < 3; b++) begin
      s[a][b] = 0;
      for (int i = -1; i <= 1; i++) for (int j = -1; j <= 1; j++)
        s[a][b] += (2 - (i < 0 ? -i : i)) * (2 - (j < 0 ? -j : j)) * w[a + 1 + i][b + 1 + j];
    end
    gx = (s[0][2] + 2 * s[1][2] + s[2][2]) - (s[0][0] + 2 * s[1][0] + s[2][0]);
    gy = (s[2][0] + 2 * s[2][1] + s[2][2]) - (s[0][0] + 2 * s[0][1] + s[0][2]);
    gx = (gx < 0 ? -gx : gx) / 64;
    gy = (gy < 0 ? -gy : gy) / 64;
    for (int k = 0; k < 5; k++) begin hv[k] = w[2][k]; vv[k] = w[k][2]; end
    yy = w[2][2] + (lam(gx) * (w[2][2] - eplpf(hv)) + lam(gy) * (w[2][2] - eplpf(vv))) / 5;
    return cl(yy);
  endfunction

  // ---------------- stimulus: input in step with the display raster ----------------
  initial begin
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    for (int t = 0; t < 2 * TOT; t++) begin
      automatic int h = t % HT, v = (t / HT) % VT, f = t / TOT;
      int r, g, b;
      if (h < HA && v < VA) begin
        rgb(f, h, v, r, g, b);
        in_valid = 1; in_x = 12'(h); in_y = 12'(v); in_r = 8'(r); in_g = 8'(g); in_b = 8'(b);
      end else in_valid = 0;
      @(posedge clk); #1;
    end
    in_valid = 0;
  end

  // ---------------- display check ----------------
  int dframe = 0, dx = 0, dy = 0, nde = 0;
  logic vs_q = 0;
  initial begin
    @(posedge rst_n);
    forever begin
      @(posedge clk); #2;
      if (out_vsync && !vs_q) begin
        if (dframe >= 1) begin
          checks++;
          if (nde != HA * VA) begin failures++; $display("FAIL de count %0d", nde); end
        end
        dframe++; dx = 0; dy = 0; nde = 0;
        if (dframe == 3) break;
      end
      vs_q = out_vsync;
      if (out_de && dframe >= 0) begin
        nde++;
        if (dframe >= 1) begin
          automatic int f = dframe - 1, yy, uu, vv, ys, r0, g0, b0, r1, g1, b1;
          automatic int xv = (dx >= VW) ? dx - VW : dx - DF;
          automatic int deep = (xv >= OX0 + 32 && xv < OX1 - 32 && dy >= OY0 + 64 && dy < OY1);
          automatic int far = (dy < OY0 - 48) || (dx >= VW && (xv < OX0 - 48 || xv >= OX1 + 48));
          automatic int is_o, is_s;
          yuv(f, dx, dy, yy, uu, vv);
          ys = sharp(f, dy, dx);
          torgb(yy, uu, vv, r0, g0, b0);
          torgb(ys, uu, vv, r1, g1, b1);
          is_o = (out_r == 8'(r0) && out_g == 8'(g0) && out_b == 8'(b0));
          is_s = (out_r == 8'(r1) && out_g == 8'(g1) && out_b == 8'(b1));
          checks++;
          if (!(is_o || is_s) || (deep && !is_s) || (far && !is_o)) begin
            failures++;
            if (failures < 12)
              $display("FAIL frame %0d (%0d,%0d) got %0d,%0d,%0d orig %0d,%0d,%0d sharp %0d,%0d,%0d deep %0d far %0d",
                       dframe, dx, dy, out_r, out_g, out_b, r0, g0, b0, r1, g1, b1, deep, far);
          end
          if (is_s && !is_o) begin
            n_sharp++;
            if (dx < VW) n_left_fg++;
          end
          if (is_o && !is_s) n_plain++;
        end
        if (dx == HA - 1) begin dx = 0; dy++; end else dx++;
      end
    end
    checks += 12;
    if (n_analysis < 2)         begin failures++; $display("FAIL analyses %0d", n_analysis); end
    if (st_homog_blocks == 0)   begin failures++; $display("FAIL no homogeneous block"); end
    if (st_bidir_fails == 0)    begin failures++; $display("FAIL no block failed the reverse check"); end
    if (st_replaced == 0)       begin failures++; $display("FAIL no unreliable entry replaced"); end
    if (n_sharp == 0)           begin failures++; $display("FAIL nothing sharpened"); end
    if (n_plain == 0)           begin failures++; $display("FAIL nothing passed unsharpened"); end
    if (n_left_fg == 0)         begin failures++; $display("FAIL left view never sharpened"); end
    if (an_clocks == 0 || an_clocks > (VT - VA) * HT) begin
      failures++; $display("FAIL analysis took %0d clocks, blanking is %0d", an_clocks, (VT - VA) * HT);
    end
    if (st_de_overruns != 0)    begin failures++; $display("FAIL estimator overruns"); end
    if (st_pf != 8'(128 + DF))  begin failures++; $display("FAIL p_F %0d", st_pf); end
    if (!(st_delta > 8'(128 + DB) && st_delta <= 8'(128 + DF))) begin failures++; $display("FAIL delta %0d", st_delta); end
    if (st_mb_cycles > 88)      begin failures++; $display("FAIL %0d clocks per block", st_mb_cycles); end
    $display("reverse-check failures %0d, analysis %0d clocks", st_bidir_fails, an_clocks);
    $display("analyses %0d homog %0d replaced %0d merges %0d sharpened %0d (left %0d) plain %0d delta %0d pF %0d object %0d blocks, %0d clocks/block",
             n_analysis, st_homog_blocks, st_replaced, st_merges, n_sharp, n_left_fg, n_plain,
             st_delta, st_pf, st_obj_size, st_mb_cycles);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
