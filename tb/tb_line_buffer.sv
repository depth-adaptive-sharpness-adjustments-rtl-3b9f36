// tb_line_buffer: writes a 64-pixel-wide (two 32-pixel views), 40-line frame
// of pseudo-random pixels into the line buffer and checks: slice_done after
// line 31 (bank 0, slice 0) and after the last line 39 (bank 1, slice 1);
// every level-1 pixel (rounded 2x2 mean) and level-2 pixel (rounded 4x4
// mean) of both views through the 16-pixel read port, with one-clock read
// latency; zero fill for columns outside the line.
module tb_line_buffer;
  import dase_pkg::*;
  localparam int VW = 32, VL = 40, SL = 32, NP = 16;
  logic clk = 0, rst_n = 0;
  logic in_valid = 0;
  logic [11:0] in_x = 0, in_y = 0;
  pix_t in_pix = 0;
  logic slice_done, slice_bank;
  logic [7:0] slice_idx;
  logic rd_en = 0, rd_bank = 0, rd_view = 0, rd_level = 0, rd_valid;
  logic [3:0] rd_row = 0;
  logic signed [12:0] rd_col = 0;
  pix_t rd_data [NP];
  int checks = 0, failures = 0;
  int done_cnt = 0;
  int img [VL][2 * VW];

  line_buffer #(.VW(VW), .VLINES(VL), .SL(SL), .NP(NP)) dut (.*);

  always #5 clk = ~clk;
  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) if (slice_done) begin
    checks++;
    if (slice_bank != 1'(done_cnt) || slice_idx != 8'(done_cnt)) begin
      failures++; $display("FAIL slice_done bank %0d idx %0d", slice_bank, slice_idx);
    end
    done_cnt++;
  end

  function automatic int ref_px(input int view, input int lvl, input int r, input int c, input int slice);
    automatic int f = (lvl == 0) ? 2 : 4, s = 0;
    for (int i = 0; i < f; i++)
      for (int j = 0; j < f; j++)
        s += img[slice * SL + r * f + i][view * VW + c * f + j];
    return (lvl == 0) ? (s + 2) / 4 : (s + 8) / 16;
  endfunction

  task automatic check_slice(input int bank, input int slice, input int nrows1);
    for (int view = 0; view < 2; view++)
      for (int lvl = 0; lvl < 2; lvl++) begin
        automatic int w = (lvl == 0) ? VW / 2 : VW / 4;
        automatic int nr = (lvl == 0) ? nrows1 : nrows1 / 2;
        for (int r = 0; r < nr; r++)
          for (int c0 = -NP; c0 < w; c0 += 8) begin
            rd_en = 1; rd_bank = 1'(bank); rd_view = 1'(view); rd_level = 1'(lvl);
            rd_row = 4'(r); rd_col = 13'(c0);
            @(posedge clk); #1; rd_en = 0;
            for (int i = 0; i < NP; i++) begin
              automatic int c = c0 + i;
              automatic int e = (c >= 0 && c < w) ? ref_px(view, lvl, r, c, slice) : 0;
              checks++;
              if (!rd_valid || rd_data[i] != 8'(e)) begin
                failures++;
                if (failures < 10) $display("FAIL v%0d l%0d r%0d c%0d got %0d exp %0d", view, lvl, r, c, rd_data[i], e);
              end
            end
          end
      end
  endtask

  task automatic drive_lines(input int y0, input int y1);
    for (int y = y0; y < y1; y++)
      for (int x = 0; x < 2 * VW; x++) begin
        in_valid = 1; in_x = 12'(x); in_y = 12'(y); in_pix = 8'(img[y][x]);
        @(posedge clk); #1;
      end
    in_valid = 0;
  endtask

  initial begin
    for (int y = 0; y < VL; y++)
      for (int x = 0; x < 2 * VW; x++) img[y][x] = $urandom_range(0, 255);
    repeat (2) @(posedge clk); rst_n = 1; @(posedge clk); #1;
    drive_lines(0, 32);
    @(posedge clk); #1;
    checks++; if (done_cnt != 1) begin failures++; $display("FAIL no slice_done 0"); end
    check_slice(0, 0, 16);
    drive_lines(32, VL);
    @(posedge clk); #1;
    checks++; if (done_cnt != 2) begin failures++; $display("FAIL no slice_done 1"); end
    check_slice(1, 1, 4);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
