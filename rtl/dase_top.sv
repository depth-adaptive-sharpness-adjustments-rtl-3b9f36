// dase_top: depth-adaptive sharpness enhancement for side-by-side stereo video.
//
// The left and right views of each frame (left in columns 0..HA/2-1, right
// in HA/2..HA-1) are analysed for depth while the frame is written to an
// external frame store; during the next frame the stored frame is read back
// and only its dominant foreground object is sharpened.
//
// Analysis path (one frame):
//   rgb2yuv -> frame store write port, and Y -> line_buffer (level-1/level-2
//   slices) -> disparity_estimator (homogeneity check, level-2 and level-1
//   block search, bi-directional check) -> dv_table; after the last slice: closing_median_filter ->
//   histogram_analyzer (delta, p_F) -> labeling_table (largest object).
// Display path (next frame):
//   video_timing_generator fetch positions -> frame store read port and the
//   labeling_table foreground query -> sharpening_filter (sharpened Y where
//   foreground, original Y elsewhere, chroma from the store) -> yuv2rgb.
// The left view's mask is the right view's mask moved by the dominant
// foreground disparity (p_F - 128), as in the source design.
//
// Frame store ports (the external memory controller is not part of this RTL):
// fs_wr_* writes {Y,U,V} at bank*HA*VA + y*HA + x; fs_rd_en/fs_rd_addr request
// a read whose data must be on fs_rd_data in the next clock. Banks alternate
// per input frame (frame double buffering, as in the source design); the
// display reads the bank whose analysis finished last and shows fg = 0 until
// one has. One clock drives everything (the source design runs the core at
// 200 MHz and the converters and display at 148.35 MHz; a single clock and
// a free-running display raster are this design's simplifications).
// Output: RGB with de/hsync/vsync, 2*HT + 6 clocks behind the fetch raster.
// The input stream must follow the display raster's frame rate; pixels come
// one per clock with their coordinates.
module dase_top
  import dase_pkg::*;
#(
  parameter int unsigned HA = H_ACT,
  parameter int unsigned VA = V_ACT,
  parameter int unsigned HT = H_TOT,
  parameter int unsigned VT = V_TOT
) (
  input  logic        clk,
  input  logic        rst_n,
  // source video
  input  logic        in_valid,
  input  logic [11:0] in_x,
  input  logic [11:0] in_y,
  input  pix_t        in_r,
  input  pix_t        in_g,
  input  pix_t        in_b,
  // external frame store
  output logic        fs_wr_en,
  output logic [22:0] fs_wr_addr,
  output logic [23:0] fs_wr_data,      // {Y, U, V}
  output logic        fs_rd_en,
  output logic [22:0] fs_rd_addr,
  input  logic [23:0] fs_rd_data,
  // display
  output logic        out_de,
  output logic        out_hsync,
  output logic        out_vsync,
  output pix_t        out_r,
  output pix_t        out_g,
  output pix_t        out_b,
  // status
  output logic        analysis_done,   // pulse: a frame's foreground is ready
  output logic [7:0]  st_delta,
  output logic [7:0]  st_pf,
  output logic [11:0] st_obj_size,
  output logic [15:0] st_de_overruns,
  output logic [15:0] st_homog_blocks,
  output logic [15:0] st_bidir_fails,
  output logic [15:0] st_replaced,
  output logic [15:0] st_merges,
  output logic [9:0]  st_mb_cycles
);

  localparam int unsigned VW   = HA / 2;
  localparam int unsigned ROWS = (VA + SLICE_LINES - 1) / SLICE_LINES;
  localparam int unsigned COLS = VW / MB_SIZE;
  localparam int unsigned FSZ  = HA * VA;

  // ---------------- input conversion and frame store write ----------------
  logic        yuv_valid;
  pix_t        yy, uu, vv;
  logic [11:0] x_q, y_q;
  logic        wbank, ana_bank;

  rgb2yuv u_rgb2yuv (
    .clk, .rst_n, .in_valid, .in_r, .in_g, .in_b,
    .out_valid(yuv_valid), .out_y(yy), .out_u(uu), .out_v(vv));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      x_q <= '0; y_q <= '0; wbank <= 1'b0; ana_bank <= 1'b0;
    end else begin
      if (in_valid) begin x_q <= in_x; y_q <= in_y; end
      if (yuv_valid && x_q == 12'(HA - 1) && y_q == 12'(VA - 1)) begin
        ana_bank <= wbank;
        wbank    <= ~wbank;
      end
    end
  end

  assign fs_wr_en   = yuv_valid;
  assign fs_wr_addr = 23'(wbank ? FSZ : 0) + 23'(y_q) * 23'(HA) + 23'(x_q);
  assign fs_wr_data = {yy, uu, vv};

  // ---------------- line buffer and disparity estimation ----------------
  logic        sl_done, sl_bank;
  logic [7:0]  sl_idx;
  logic        lb_rd_en, lb_rd_bank, lb_rd_view, lb_rd_level, lb_rd_valid;
  logic [3:0]  lb_rd_row;
  logic signed [12:0] lb_rd_col;
  pix_t        lb_rd_data [RD_PAR];

  line_buffer #(.VW(VW), .VLINES(VA)) u_line_buffer (
    .clk, .rst_n, .in_valid(yuv_valid), .in_x(x_q), .in_y(y_q), .in_pix(yy),
    .slice_done(sl_done), .slice_bank(sl_bank), .slice_idx(sl_idx),
    .rd_en(lb_rd_en), .rd_bank(lb_rd_bank), .rd_view(lb_rd_view),
    .rd_level(lb_rd_level), .rd_row(lb_rd_row), .rd_col(lb_rd_col),
    .rd_valid(lb_rd_valid), .rd_data(lb_rd_data));

  logic        de_wr_en, de_busy, de_fin;
  logic [7:0]  de_wr_row, de_wr_col, de_fin_idx;
  dv_entry_t   de_wr_data;

  disparity_estimator #(.VW(VW)) u_disparity_estimator (
    .clk, .rst_n, .slice_done(sl_done), .slice_bank(sl_bank), .slice_idx(sl_idx),
    .rd_en(lb_rd_en), .rd_bank(lb_rd_bank), .rd_view(lb_rd_view),
    .rd_level(lb_rd_level), .rd_row(lb_rd_row), .rd_col(lb_rd_col),
    .rd_valid(lb_rd_valid), .rd_data(lb_rd_data),
    .wr_en(de_wr_en), .wr_row(de_wr_row), .wr_col(de_wr_col), .wr_data(de_wr_data),
    .busy(de_busy), .slice_finished(de_fin), .finished_idx(de_fin_idx),
    .mb_cycles(st_mb_cycles), .overruns(st_de_overruns), .homog_blocks(st_homog_blocks),
    .bidir_fails(st_bidir_fails));

  // ---------------- disparity vector table and its clients ----------------
  logic        cm_start, cm_done, cm_busy, cm_win_plane, cm_wr_en, cm_wr_plane;
  logic [7:0]  cm_win_row, cm_win_col, cm_wr_row, cm_wr_col;
  dv_entry_t   cm_wr_data, tbl_win [9], tbl_rd;
  logic        hi_start, hi_done, hi_busy;
  logic [7:0]  hi_row, hi_col, d_s, d_e, split0, p_b, p_f, delta;
  logic        lt_start, lt_done, lt_busy;
  logic [7:0]  lt_row, lt_col;
  logic [10:0] lt_nlab;

  dv_table #(.ROWS(ROWS), .COLS(COLS)) u_dv_table (
    .clk,
    .wr_en   (cm_busy ? cm_wr_en    : de_wr_en),
    .wr_plane(cm_busy ? cm_wr_plane : 1'b0),
    .wr_row  (cm_busy ? cm_wr_row   : de_wr_row),
    .wr_col  (cm_busy ? cm_wr_col   : de_wr_col),
    .wr_data (cm_busy ? cm_wr_data  : de_wr_data),
    .win_plane(cm_win_plane), .win_row(cm_win_row), .win_col(cm_win_col), .win(tbl_win),
    .rd_plane(1'b0),
    .rd_row(lt_busy ? lt_row : hi_row), .rd_col(lt_busy ? lt_col : hi_col),
    .rd_data(tbl_rd));

  closing_median_filter #(.ROWS(ROWS), .COLS(COLS)) u_closing_median_filter (
    .clk, .rst_n, .start(cm_start), .done(cm_done), .busy(cm_busy),
    .win_plane(cm_win_plane), .win_row(cm_win_row), .win_col(cm_win_col), .win(tbl_win),
    .wr_en(cm_wr_en), .wr_plane(cm_wr_plane), .wr_row(cm_wr_row), .wr_col(cm_wr_col),
    .wr_data(cm_wr_data), .replaced(st_replaced));

  histogram_analyzer #(.ROWS(ROWS), .COLS(COLS)) u_histogram_analyzer (
    .clk, .rst_n, .start(hi_start), .busy(hi_busy), .done(hi_done),
    .rd_row(hi_row), .rd_col(hi_col), .rd_data(tbl_rd),
    .d_s, .d_e, .split0, .p_b, .p_f, .delta);

  // frame-level sequencing of the analysis
  logic        have_ready, ready_bank;
  logic signed [9:0] ready_shift;

  assign cm_start = de_fin && (de_fin_idx == 8'(ROWS - 1));
  assign hi_start = cm_done;
  assign lt_start = hi_done;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      have_ready <= 1'b0; ready_bank <= 1'b0; ready_shift <= '0; analysis_done <= 1'b0;
    end else begin
      analysis_done <= lt_done;
      if (lt_done) begin
        have_ready  <= 1'b1;
        ready_bank  <= ana_bank;
        ready_shift <= 10'(int'(p_f) - 128);
      end
    end
  end

  // ---------------- display path ----------------
  logic        f_en, f_start, c_act, vt_de, vt_hs, vt_vs;
  logic [11:0] f_x, f_y, c_x, c_y, d_x, d_y;
  logic        disp_bank, disp_ok, q_fg, fg_q;

  video_timing_generator #(.HA(HA), .VA(VA), .HT(HT), .VT(VT),
                           .OFF_C(2 * HT + 4), .OFF_D(2 * HT + 6)) u_vtg (
    .clk, .rst_n, .f_en, .f_start, .f_x, .f_y, .c_act, .c_x, .c_y,
    .de(vt_de), .hsync(vt_hs), .vsync(vt_vs), .d_x, .d_y);

  labeling_table #(.ROWS(ROWS), .COLS(COLS), .VW(VW)) u_labeling_table (
    .clk, .rst_n, .start(lt_start), .delta(delta), .busy(lt_busy), .done(lt_done),
    .rd_row(lt_row), .rd_col(lt_col), .rd_data(tbl_rd),
    .num_labels(lt_nlab), .obj_size(st_obj_size), .merges(st_merges),
    .latch(f_start && have_ready), .shift(ready_shift),
    .q_x(f_x), .q_y(f_y), .q_fg(q_fg));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      disp_bank <= 1'b0; disp_ok <= 1'b0; fg_q <= 1'b0;
    end else begin
      if (f_start) begin
        disp_bank <= ready_bank;
        disp_ok   <= have_ready;
      end
      fg_q <= q_fg && (f_start ? have_ready : disp_ok);
    end
  end

  assign fs_rd_en   = f_en;
  assign fs_rd_addr = 23'((f_start ? ready_bank : disp_bank) ? FSZ : 0) +
                      23'(f_y) * 23'(HA) + 23'(f_x);

  logic        sf_act, sf_fg;
  pix_t        sf_y, sf_sharp, sf_orig, sf_u, sf_v;
  logic [2:0]  sf_lh, sf_lv;

  sharpening_filter #(.HT(HT), .VW(VW)) u_sharpening_filter (
    .clk, .rst_n,
    .s_y(fs_rd_data[23:16]), .s_u(fs_rd_data[15:8]), .s_v(fs_rd_data[7:0]), .s_fg(fg_q),
    .c_x, .c_y, .c_act,
    .o_act(sf_act), .o_y(sf_y), .o_sharp(sf_sharp), .o_orig(sf_orig),
    .o_u(sf_u), .o_v(sf_v), .o_fg(sf_fg), .o_lam_h(sf_lh), .o_lam_v(sf_lv));

  logic rgb_valid;
  yuv2rgb u_yuv2rgb (
    .clk, .rst_n, .in_valid(sf_act), .in_y(sf_y), .in_u(sf_u), .in_v(sf_v),
    .out_valid(rgb_valid), .out_r, .out_g, .out_b);

  assign out_de    = vt_de;
  assign out_hsync = vt_hs;
  assign out_vsync = vt_vs;
  assign st_delta  = delta;
  assign st_pf     = p_f;

endmodule
