// tb_disparity_estimator: line buffer plus disparity estimator on one
// 32-line slice of a 512-pixel stereo line (two 256-pixel views, 16 matching
// blocks). The left view is the right view moved by 8 pixels (planted
// full-resolution disparity 8, DV code 136); two blocks are flat.
// Checks: every written entry against a hierarchical search done in the
// testbench on its own down-sampled copies of the views (level 2 over
// [-32,32] with ties to the smaller |d|, level 1 around 2*d2), the code of
// textured blocks in the middle against 136, the unreliable flag (flat block
// or failed reverse check, the reverse search also modelled here), the
// homogeneous and reverse-check counts, the clocks per block (source design: 88; budget 412) and the
// clocks for the slice.
module tb_disparity_estimator;
  import dase_pkg::*;
  localparam int VW = 256, SL = 32, NP = 16, W1 = VW / 2, W2 = VW / 4, NMB = VW / 16;
  localparam int D = 8;
  logic clk = 0, rst_n = 0;
  logic in_valid = 0;
  logic [11:0] in_x = 0, in_y = 0;
  pix_t in_pix = 0;
  logic slice_done, slice_bank;
  logic [7:0] slice_idx;
  logic rd_en, rd_bank, rd_view, rd_level, rd_valid;
  logic [3:0] rd_row;
  logic signed [12:0] rd_col;
  pix_t rd_data [NP];
  logic wr_en, busy, slice_finished;
  logic [7:0] wr_row, wr_col, finished_idx;
  dv_entry_t wr_data;
  logic [9:0] mb_cycles;
  logic [15:0] overruns, homog_blocks, bidir_fails;
  int checks = 0, failures = 0, nrev = 0;

  int img [SL][2 * VW];
  int l1 [2][SL/2][W1];
  int l2 [2][SL/4][W2];
  dv_entry_t got [NMB];
  int nwr = 0, maxcyc = 0;

  line_buffer #(.VW(VW), .VLINES(SL), .SL(SL), .NP(NP)) u_lb (
    .clk, .rst_n, .in_valid, .in_x, .in_y, .in_pix, .slice_done, .slice_bank, .slice_idx,
    .rd_en, .rd_bank, .rd_view, .rd_level, .rd_row, .rd_col, .rd_valid, .rd_data);
  disparity_estimator #(.VW(VW), .NP(NP)) dut (.*);

  always #5 clk = ~clk;
  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) if (rst_n && wr_en) begin
    got[wr_col] <= wr_data;
    nwr <= nwr + 1;
    if (int'(mb_cycles) > maxcyc) maxcyc = int'(mb_cycles);
  end

  function automatic int sad2(input int b, input int d);
    automatic int s = 0;
    for (int r = 0; r < 8; r++) for (int i = 0; i < 8; i++) begin
      automatic int df = l2[1][r][b + i] - l2[0][r][b + d + i];
      s += df < 0 ? -df : df;
    end
    return s;
  endfunction

  // reverse SAD: left block at b + d against the right view at b + e
  function automatic int rsad1(input int b, input int d, input int e);
    automatic int s = 0;
    for (int r = 0; r < 8; r++) for (int i = 0; i < 8; i++) begin
      automatic int df = l1[0][r + 4][b + d + i] - l1[1][r + 4][b + e + i];
      s += df < 0 ? -df : df;
    end
    return s;
  endfunction
  function automatic int sad1(input int b, input int d);
    automatic int s = 0;
    for (int r = 0; r < 8; r++) for (int i = 0; i < 8; i++) begin
      automatic int df = l1[1][r + 4][b + i] - l1[0][r + 4][b + d + i];
      s += df < 0 ? -df : df;
    end
    return s;
  endfunction

  initial begin
    int t0, t1;
    // scene: right view textured, blocks 5 and 6 flat; left = right moved by D
    for (int y = 0; y < SL; y++)
      for (int x = 0; x < VW; x++) begin
        automatic int k = x / 16;
        img[y][VW + x] = (k == 5 || k == 6) ? 120 : $urandom_range(0, 255);
      end
    for (int y = 0; y < SL; y++)
      for (int x = 0; x < VW; x++)
        img[y][x] = (x - D >= 0) ? img[y][VW + x - D] : $urandom_range(0, 255);
    for (int v = 0; v < 2; v++) begin
      for (int r = 0; r < SL / 2; r++) for (int c = 0; c < W1; c++)
        l1[v][r][c] = (img[2*r][v*VW + 2*c] + img[2*r][v*VW + 2*c + 1] +
                       img[2*r + 1][v*VW + 2*c] + img[2*r + 1][v*VW + 2*c + 1] + 2) / 4;
      for (int r = 0; r < SL / 4; r++) for (int c = 0; c < W2; c++) begin
        automatic int s = 0;
        for (int i = 0; i < 4; i++) for (int j = 0; j < 4; j++) s += img[4*r + i][v*VW + 4*c + j];
        l2[v][r][c] = (s + 8) / 16;
      end
    end
    repeat (2) @(posedge clk); rst_n = 1; @(posedge clk); #1;
    for (int y = 0; y < SL; y++)
      for (int x = 0; x < 2 * VW; x++) begin
        in_valid = 1; in_x = 12'(x); in_y = 12'(y); in_pix = 8'(img[y][x]);
        @(posedge clk); #1;
      end
    in_valid = 0;
    t0 = $time;
    while (!slice_finished) begin @(posedge clk); #1; end
    t1 = $time;
    @(posedge clk); #1;
    checks++;
    if (nwr != NMB || finished_idx != 0) begin failures++; $display("FAIL writes %0d", nwr); end
    for (int k = 0; k < NMB; k++) begin
      automatic int b2 = 4 * k - 2, best = 1 << 30, d2 = 0, c, b1 = 8 * k, d1 = 0, any = 0;
      automatic int mx = 0, mn = 255, code, rel;
      if (b2 < 0) b2 = 0;
      if (b2 > W2 - 8) b2 = W2 - 8;
      for (int kk = 0; kk < 65; kk++) begin
        automatic int d = (kk % 2 == 1) ? -((kk + 1) / 2) : kk / 2;
        if (b2 + d >= 0 && b2 + d + 8 <= W2) begin
          automatic int s = sad2(b2, d);
          if (s < best) begin best = s; d2 = d; end
        end
      end
      c = 2 * d2; best = 0;
      for (int kk = 0; kk < 3; kk++) begin
        automatic int d = c + ((kk == 0) ? 0 : ((kk == 1) ? -1 : 1));
        if (b1 + d >= 0 && b1 + d + 8 <= W1) begin
          automatic int s = sad1(b1, d);
          if (!any || s < best) begin best = s; d1 = d; any = 1; end
        end
      end
      rel = 0;
      if (any) begin
        automatic int rb = 0, rbest = 0, rany = 0;
        for (int kk = 0; kk < 3; kk++) begin
          automatic int e = (kk == 0) ? 0 : ((kk == 1) ? -1 : 1);
          if (b1 + e >= 0 && b1 + e + 8 <= W1) begin
            automatic int s = rsad1(b1, d1, e);
            if (!rany || s < rbest) begin rbest = s; rb = e; rany = 1; end
          end
        end
        rel = rany && rb == 0;
      end
      if (!any) d1 = 0;
      if (!rel) nrev++;
      code = 2 * d1 + 128;
      for (int r = 4; r < 12; r++) for (int i = 0; i < 8; i++) begin
        if (l1[1][r][b1 + i] > mx) mx = l1[1][r][b1 + i];
        if (l1[1][r][b1 + i] < mn) mn = l1[1][r][b1 + i];
      end
      checks++;
      if (got[k].code != 8'(code) || got[k].unrel != ((mx - mn) < 8 || !rel)) begin
        failures++;
        $display("FAIL k%0d code %0d exp %0d unrel %0d", k, got[k].code, code, got[k].unrel);
      end
      if (k >= 2 && k < NMB - 2 && k != 5 && k != 6) begin
        checks++;
        if (got[k].code != 8'(128 + D)) begin failures++; $display("FAIL k%0d planted: %0d", k, got[k].code); end
      end
    end
    checks += 4;
    if (!got[5].unrel || !got[6].unrel) begin failures++; $display("FAIL flat blocks not flagged"); end
    checks++;
    if (bidir_fails != 16'(nrev)) begin failures++; $display("FAIL reverse-check count %0d exp %0d", bidir_fails, nrev); end
    if (homog_blocks != 2) begin failures++; $display("FAIL homog count %0d", homog_blocks); end
    if (maxcyc > 88) begin failures++; $display("FAIL %0d clocks per block, over 88", maxcyc); end
    if ((t1 - t0) / 10 > NMB * 100) begin failures++; $display("FAIL slice took %0d clocks", (t1 - t0) / 10); end
    $display("reverse-check failures %0d", nrev);
    $display("clocks per block %0d, slice %0d", maxcyc, (t1 - t0) / 10);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
