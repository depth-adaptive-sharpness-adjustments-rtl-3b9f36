// line_buffer: slice store of the left and right views at level 1 (1/2) and
// level 2 (1/4) resolution, feeding the disparity estimator.
//
// The incoming luminance stream (one pixel per clock, raster order, left view
// in columns 0..VW-1 and right view in VW..2VW-1) is down-sampled on the fly:
// a level-1 pixel is the rounded mean of a 2x2 full-resolution group, a
// level-2 pixel the rounded mean of a 4x4 group. Running sums are kept in one
// accumulator per output column. A slice of SLICE_LINES (32) input lines thus
// becomes 16 level-1 lines and 8 level-2 lines per view; as in the source
// design only these 16 (level-1) lines are kept, because no level-0 search is
// run. Two banks are used in ping-pong: when the last pixel of a slice (or of
// the frame) is written, slice_done pulses with the bank just filled and
// writing moves to the other bank.
//
// Read port: rd_en with bank, view (0 left, 1 right), level (0 = level 1,
// 1 = level 2), row and a signed start column. One cycle later rd_valid and
// RD_PAR (16) consecutive pixels starting at that column; pixels outside the
// line read as 0. The 16-pixel parallel read follows the source design; the
// banking, rounding and the zero fill are this design's choices. In a partial
// last slice the lines not written keep the previous slice's data.
module line_buffer
  import dase_pkg::*;
#(
  parameter int unsigned VW     = H_ACT / 2,
  parameter int unsigned VLINES = V_ACT,
  parameter int unsigned SL     = SLICE_LINES,
  parameter int unsigned NP     = RD_PAR
) (
  input  logic        clk,
  input  logic        rst_n,
  // write side: luminance stream
  input  logic        in_valid,
  input  logic [11:0] in_x,          // 0 .. 2*VW-1
  input  logic [11:0] in_y,          // 0 .. VLINES-1
  input  pix_t        in_pix,
  output logic        slice_done,    // pulse: a slice is complete
  output logic        slice_bank,    // bank that holds it
  output logic [7:0]  slice_idx,     // its index in the frame
  // read side
  input  logic        rd_en,
  input  logic        rd_bank,
  input  logic        rd_view,
  input  logic        rd_level,
  input  logic [3:0]  rd_row,
  input  logic signed [12:0] rd_col,
  output logic        rd_valid,
  output pix_t        rd_data [NP]
);

  localparam int unsigned W1 = VW / 2;
  localparam int unsigned W2 = VW / 4;
  localparam int unsigned R1 = SL / 2;
  localparam int unsigned R2 = SL / 4;

  pix_t        lvl1 [2][2][R1][W1];
  pix_t        lvl2 [2][2][R2][W2];
  logic [9:0]  acc1 [2][W1];
  logic [11:0] acc2 [2][W2];
  logic        wbank;

  logic        view;
  logic [11:0] xv;
  logic [11:0] rs;
  logic [11:0] c1, c2;
  logic        last_px;

  always_comb begin
    view    = (in_x >= 12'(VW));
    xv      = view ? in_x - 12'(VW) : in_x;
    rs      = in_y % 12'(SL);
    c1      = xv >> 1;
    c2      = xv >> 2;
    last_px = (in_x == 12'(2 * VW - 1)) &&
              ((rs == 12'(SL - 1)) || (in_y == 12'(VLINES - 1)));
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wbank      <= 1'b0;
      slice_done <= 1'b0;
      slice_bank <= 1'b0;
      slice_idx  <= '0;
    end else begin
      slice_done <= 1'b0;
      if (in_valid && last_px) begin
        slice_done <= 1'b1;
        slice_bank <= wbank;
        slice_idx  <= 8'(in_y / 12'(SL));
        wbank      <= ~wbank;
      end
    end
  end

  // Down-sampling accumulators and slice memories (no reset needed: every
  // entry is written before it is read within a slice).
  always_ff @(posedge clk) begin
    if (in_valid) begin
      if (rs[0] == 1'b0 && xv[0] == 1'b0) acc1[view][c1] <= {2'b0, in_pix};
      else                                acc1[view][c1] <= acc1[view][c1] + {2'b0, in_pix};
      if (rs[1:0] == 2'b00 && xv[1:0] == 2'b00) acc2[view][c2] <= {4'b0, in_pix};
      else                                      acc2[view][c2] <= acc2[view][c2] + {4'b0, in_pix};
      if (rs[0] == 1'b1 && xv[0] == 1'b1)
        lvl1[wbank][view][rs >> 1][c1] <= 8'((acc1[view][c1] + {2'b0, in_pix} + 10'd2) >> 2);
      if (rs[1:0] == 2'b11 && xv[1:0] == 2'b11)
        lvl2[wbank][view][rs >> 2][c2] <= 8'((acc2[view][c2] + {4'b0, in_pix} + 12'd8) >> 4);
    end
  end

  // 16-pixel parallel read, one cycle latency
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rd_valid <= 1'b0;
      for (int i = 0; i < NP; i++) rd_data[i] <= '0;
    end else begin
      rd_valid <= rd_en;
      if (rd_en) begin
        for (int i = 0; i < NP; i++) begin
          automatic logic signed [13:0] c = 14'(rd_col) + 14'(i);
          if (!rd_level)
            rd_data[i] <= (c >= 0 && c < 14'(W1)) ?
                          lvl1[rd_bank][rd_view][int'(rd_row) % R1][c[11:0]] : '0;
          else
            rd_data[i] <= (c >= 0 && c < 14'(W2)) ?
                          lvl2[rd_bank][rd_view][int'(rd_row) % R2][c[11:0]] : '0;
        end
      end
    end
  end

endmodule
