// de_level1: middle-level (level 1, 1/2 resolution) disparity refinement.
//
// The 8x8 right-view block at column base is matched against the left view at
// the three disparities 2*d2 - 1, 2*d2, 2*d2 + 1 around the doubled level-2
// result, as in the source design (search range [-1,+1]). start loads base
// and centre (= 2*d2) and clears three SAD accumulators. The eight block rows
// arrive first (r_valid, words starting at base - 1, so pixels 1..8 are the
// block; the word is shared with bidirectional_check, which also needs the
// pixel either side), then eight window rows
// (l_valid), each one word starting at column base + centre - 1. Each window
// row adds its SAD to all three candidates in the cycle it arrives. One cycle
// after the eighth window row, done pulses with best_d. Candidates whose block
// would leave the line are skipped, ties go to the centre; if none is inside
// the line, best_d = 0 and any_valid is low (this design's choices).
module de_level1
  import dase_pkg::*;
#(
  parameter int unsigned W  = H_ACT / 4,   // level-1 line width of one view
  parameter int unsigned NP = RD_PAR
) (
  input  logic clk,
  input  logic rst_n,
  input  logic start,
  input  logic signed [12:0] base,
  input  logic signed [7:0]  centre,
  input  logic r_valid,
  input  pix_t r_pix [NP],
  input  logic l_valid,
  input  pix_t l_pix [NP],
  output logic done,
  output logic signed [7:0] best_d,
  output logic any_valid
);

  pix_t        rblk [8][8];
  logic [13:0] sad  [3];
  logic [2:0]  r_cnt, l_row;
  logic signed [12:0] base_q;
  logic signed [7:0]  ctr_q;

  logic [13:0] row_sad [3];
  always_comb begin
    for (int c = 0; c < 3; c++) begin
      row_sad[c] = '0;
      for (int i = 0; i < 8; i++) begin
        automatic pix_t a = rblk[l_row][i];
        automatic pix_t b = l_pix[c + i];
        row_sad[c] = row_sad[c] + 14'((a > b) ? a - b : b - a);
      end
    end
  end

  // candidate order: centre, -1, +1
  logic signed [7:0] am_d;
  logic              am_any;
  always_comb begin
    automatic logic [13:0] best = '1;
    am_d = '0; am_any = 1'b0;
    for (int k = 0; k < 3; k++) begin
      automatic int off = (k == 0) ? 0 : ((k == 1) ? -1 : 1);
      automatic int d   = int'(ctr_q) + off;
      automatic int pos = int'(base_q) + d;
      if (pos >= 0 && pos + 8 <= int'(W)) begin
        if (!am_any || sad[off + 1] < best) begin
          am_any = 1'b1;
          best   = sad[off + 1];
          am_d   = 8'(d);
        end
      end
    end
  end

  logic fin;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      r_cnt <= '0; l_row <= '0; base_q <= '0; ctr_q <= '0; fin <= 1'b0;
      done <= 1'b0; best_d <= '0; any_valid <= 1'b0;
      for (int c = 0; c < 3; c++) sad[c] <= '0;
    end else begin
      done <= 1'b0;
      fin  <= 1'b0;
      if (start) begin
        base_q <= base; ctr_q <= centre;
        r_cnt <= '0; l_row <= '0;
        for (int c = 0; c < 3; c++) sad[c] <= '0;
      end else begin
        if (r_valid) begin
          for (int i = 0; i < 8; i++) rblk[r_cnt][i] <= r_pix[i + 1];
          r_cnt <= r_cnt + 3'd1;
        end
        if (l_valid) begin
          for (int c = 0; c < 3; c++) sad[c] <= sad[c] + row_sad[c];
          l_row <= l_row + 3'd1;
          if (l_row == 3'd7) fin <= 1'b1;
        end
        if (fin) begin
          done      <= 1'b1;
          best_d    <= am_any ? am_d : 8'sd0;
          any_valid <= am_any;
        end
      end
    end
  end

endmodule
