// de_level2: coarsest-level (level 2, 1/4 resolution) disparity search.
//
// An 8x8 block of the right view is matched against the left view over the
// full search range d in [-SR, SR] (SR = 32) by the sum of absolute
// differences, as in the source design. start loads the block's left column
// (base) and clears the 2*SR+1 SAD accumulators. The eight block rows arrive
// first (r_valid, one RD_PAR-pixel word per row, first 8 pixels used); then
// the left-view window, row by row, as NW = ceil((2*SR+8)/RD_PAR) words per row
// starting at column base-SR (72 useful pixels of 80: the "72x8 from the left,
// 8x8 from the right" read of the source design). When a window row is
// complete, the SAD of that row is added for all candidates in one cycle.
// After the eighth row, done pulses with the best d; candidates whose block
// would leave the line are skipped, ties go to the smaller |d| (this design's
// choice). done pulses 3 clocks after the last window word.
module de_level2
  import dase_pkg::*;
#(
  parameter int unsigned SR = SR2,
  parameter int unsigned W  = H_ACT / 8,   // level-2 line width of one view
  parameter int unsigned NP = RD_PAR
) (
  input  logic clk,
  input  logic rst_n,
  input  logic start,
  input  logic signed [12:0] base,
  input  logic r_valid,
  input  pix_t r_pix [NP],
  input  logic l_valid,
  input  pix_t l_pix [NP],
  output logic done,
  output logic signed [7:0] best_d,
  output logic [13:0] best_sad,
  output logic any_valid
);

  localparam int unsigned NC = 2 * SR + 1;
  localparam int unsigned NW = (2 * SR + 8 + NP - 1) / NP;

  pix_t        rblk [8][8];
  pix_t        lwin [NW * NP];
  logic [13:0] sad  [NC];
  logic [2:0]  r_cnt, l_row;
  logic [3:0]  w_cnt;
  logic        row_ready, fin;
  logic signed [12:0] base_q;

  // SAD of one full window row for every candidate
  logic [13:0] row_sad [NC];
  always_comb begin
    for (int c = 0; c < NC; c++) begin
      row_sad[c] = '0;
      for (int i = 0; i < 8; i++) begin
        automatic pix_t a = rblk[l_row][i];
        automatic pix_t b = lwin[c + i];
        row_sad[c] = row_sad[c] + 14'((a > b) ? a - b : b - a);
      end
    end
  end

  // Arg-min over candidates visited in the order 0, -1, +1, -2, +2, ...
  logic signed [7:0] am_d;
  logic [13:0]       am_sad;
  logic              am_any;
  always_comb begin
    am_d = '0; am_sad = '1; am_any = 1'b0;
    for (int k = 0; k < NC; k++) begin
      automatic int d   = (k % 2 == 1) ? -((k + 1) / 2) : (k / 2);
      automatic int pos = int'(base_q) + d;
      if (pos >= 0 && pos + 8 <= int'(W)) begin
        if (!am_any || sad[d + int'(SR)] < am_sad) begin
          am_any = 1'b1;
          am_sad = sad[d + int'(SR)];
          am_d   = 8'(d);
        end
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      r_cnt <= '0; l_row <= '0; w_cnt <= '0; row_ready <= 1'b0; fin <= 1'b0;
      done <= 1'b0; best_d <= '0; best_sad <= '0; any_valid <= 1'b0; base_q <= '0;
      for (int c = 0; c < NC; c++) sad[c] <= '0;
    end else begin
      done <= 1'b0;
      fin  <= 1'b0;
      if (start) begin
        base_q <= base;
        r_cnt  <= '0; l_row <= '0; w_cnt <= '0; row_ready <= 1'b0;
        for (int c = 0; c < NC; c++) sad[c] <= '0;
      end else begin
        if (r_valid) begin
          for (int i = 0; i < 8; i++) rblk[r_cnt][i] <= r_pix[i];
          r_cnt <= r_cnt + 3'd1;
        end
        row_ready <= 1'b0;
        if (l_valid) begin
          for (int i = 0; i < NP; i++) lwin[w_cnt * NP + i] <= l_pix[i];
          if (w_cnt == 4'(NW - 1)) begin
            w_cnt     <= '0;
            row_ready <= 1'b1;
          end else begin
            w_cnt <= w_cnt + 4'd1;
          end
        end
        if (row_ready) begin
          for (int c = 0; c < NC; c++) sad[c] <= sad[c] + row_sad[c];
          l_row <= l_row + 3'd1;
          if (l_row == 3'd7) fin <= 1'b1;
        end
        if (fin) begin
          done      <= 1'b1;
          best_d    <= am_d;
          best_sad  <= am_sad;
          any_valid <= am_any;
        end
      end
    end
  end

endmodule
