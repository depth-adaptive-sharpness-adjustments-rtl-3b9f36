// tb_labeling_table: random foreground patterns on an 8x12 block map (DV
// codes above or below delta). The kept object is compared with a flood-fill
// labeling in the testbench (4-connectivity, largest component, ties to the
// component met first in raster order); object size and the number of
// provisional labels are checked, and merges must occur. After latch, the
// per-pixel query is checked at random pixels of both views, including the
// 8-pixel exterior band and the left view's shift.
module tb_labeling_table;
  import dase_pkg::*;
  localparam int ROWS = 8, COLS = 12, VW = COLS * 16, BH = 32, BWID = 16, BAND = 8;
  logic clk = 0, rst_n = 0, start = 0, busy, done, latch = 0, q_fg;
  logic [7:0] delta = 8'd150, rd_row, rd_col;
  dv_entry_t rd_data;
  logic [10:0] num_labels;
  logic [11:0] obj_size, q_x = 0, q_y = 0;
  logic [15:0] merges;
  logic signed [9:0] shift = 0;
  int map [ROWS][COLS];
  int lab [ROWS][COLS];
  int keep [ROWS][COLS];
  int checks = 0, failures = 0, total_merges = 0;

  labeling_table #(.ROWS(ROWS), .COLS(COLS), .VW(VW), .BH(BH), .BWID(BWID), .BAND(BAND)) dut (.*);
  assign rd_data = {1'b0, 8'(map[rd_row][rd_col])};

  always #5 clk = ~clk;
  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int isfg(input int r, input int c);
    return (r >= 0 && r < ROWS && c >= 0 && c < COLS) ? (map[r][c] >= 150) : 0;
  endfunction

  initial begin
    repeat (2) @(posedge clk); rst_n = 1; @(posedge clk); #1;
    for (int t = 0; t < 25; t++) begin
      int qr [ROWS * COLS];
      int qc [ROWS * COLS];
      automatic int ncomp = 0, best = 0, bestc = 0, nnew = 0;
      int sz [ROWS * COLS + 1];
      automatic int p = (t < 5) ? 70 : 45;
      for (int r = 0; r < ROWS; r++) for (int c = 0; c < COLS; c++) begin
        map[r][c] = ($urandom_range(0, 99) < p) ? $urandom_range(150, 255) : $urandom_range(0, 149);
        lab[r][c] = 0;
      end
      if (t == 24) for (int r = 0; r < ROWS; r++) for (int c = 0; c < COLS; c++) map[r][c] = 10;
      // flood fill
      for (int r = 0; r < ROWS; r++) for (int c = 0; c < COLS; c++)
        if (isfg(r, c) && lab[r][c] == 0) begin
          automatic int head = 0, tail = 0;
          ncomp++; sz[ncomp] = 0;
          lab[r][c] = ncomp; qr[tail] = r; qc[tail] = c; tail++;
          while (head < tail) begin
            automatic int cr = qr[head], cc = qc[head];
            head++; sz[ncomp]++;
            for (int k = 0; k < 4; k++) begin
              automatic int nr = cr + ((k == 0) ? -1 : (k == 1) ? 1 : 0);
              automatic int nc = cc + ((k == 2) ? -1 : (k == 3) ? 1 : 0);
              if (isfg(nr, nc) && lab[nr][nc] == 0) begin
                lab[nr][nc] = ncomp; qr[tail] = nr; qc[tail] = nc; tail++;
              end
            end
          end
          if (sz[ncomp] > best) begin best = sz[ncomp]; bestc = ncomp; end
        end
      for (int r = 0; r < ROWS; r++) for (int c = 0; c < COLS; c++) begin
        keep[r][c] = (bestc != 0 && lab[r][c] == bestc);
        if (isfg(r, c) && !isfg(r, c - 1) && !isfg(r - 1, c)) nnew++;
      end
      start = 1; @(posedge clk); #1; start = 0;
      while (!done) begin @(posedge clk); #1; end
      total_merges += merges;
      checks++;
      if (obj_size != 12'(best) || num_labels != 11'(nnew)) begin
        failures++; $display("FAIL t%0d size %0d exp %0d labels %0d exp %0d", t, obj_size, best, num_labels, nnew);
      end
      shift = 10'($urandom_range(0, 40) - 20);
      latch = 1; @(posedge clk); #1; latch = 0;
      for (int i = 0; i < 400; i++) begin
        automatic int x = $urandom_range(0, 2 * VW - 1), y = $urandom_range(0, ROWS * BH - 1);
        automatic int xv = (x < VW) ? x - int'(shift) : x - VW, e = 0;
        for (int dy = -BAND; dy <= BAND; dy += BAND)
          for (int dx = -BAND; dx <= BAND; dx += BAND) begin
            automatic int px = xv + dx, py = y + dy;
            if (px >= 0 && px < VW && py >= 0 && py < ROWS * BH && keep[py / BH][px / BWID]) e = 1;
          end
        q_x = 12'(x); q_y = 12'(y); #1;
        checks++;
        if (q_fg != 1'(e)) begin
          failures++;
          if (failures < 10) $display("FAIL t%0d query %0d,%0d got %0d exp %0d", t, x, y, q_fg, e);
        end
      end
    end
    checks++;
    if (total_merges == 0) begin failures++; $display("FAIL no label merge exercised"); end
    $display("merges %0d", total_merges);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
