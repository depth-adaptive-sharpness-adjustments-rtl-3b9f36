// bidirectional_check: reverse-direction test of a level-1 disparity.
//
// After the forward search has matched the right-view block at column x to
// the left-view block at x + d, the source design searches back from that
// left-view block into the right view and accepts d only if the reverse
// search returns -d. This module does that reverse search at level 1 (1/2
// resolution) over the three right-view positions x - 1, x, x + 1, which is
// this design's own restriction: it needs no extra reads, because it listens
// to the same words the level-1 refinement (de_level1) receives. Right-view
// rows arrive as words starting at column base - 1 (10 pixels used), left-view
// rows as words starting at base + centre - 1 (10 pixels used). For each of
// the three forward candidates c (d = centre - 1 + c) and each reverse offset
// e it accumulates SAD(left block at x + d, right block at x + e), nine sums
// in all. When the forward result arrives (fwd_done, fwd_d), the reverse best
// for that candidate is chosen with ties to e = 0, then -1, then +1; the
// disparity is reliable if that best is e = 0, i.e. the reverse disparity is
// exactly -d. Right-view positions off the line are skipped.
//
// Interface: start (with base, centre) clears the sums; r_valid/r_pix and
// l_valid/l_pix are the level-1 read streams; fwd_done/fwd_d/fwd_any come from
// de_level1. Timing: done pulses one cycle after fwd_done with reliable and
// rev_d (the reverse disparity found). Without a valid forward result,
// reliable is low.
module bidirectional_check
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
  input  logic fwd_done,
  input  logic signed [7:0] fwd_d,
  input  logic fwd_any,
  output logic done,
  output logic reliable,
  output logic signed [7:0] rev_d
);

  pix_t        rwin [8][10];   // right rows, columns base-1 .. base+8
  logic [13:0] rsad [3][3];    // [forward candidate][reverse offset + 1]
  logic [2:0]  r_cnt, l_row;
  logic signed [12:0] base_q;
  logic signed [7:0]  ctr_q;

  logic [13:0] row_sad [3][3];
  always_comb begin
    for (int c = 0; c < 3; c++)
      for (int e = 0; e < 3; e++) begin
        row_sad[c][e] = '0;
        for (int i = 0; i < 8; i++) begin
          automatic pix_t a = l_pix[c + i];
          automatic pix_t b = rwin[l_row][e + i];
          row_sad[c][e] = row_sad[c][e] + 14'((a > b) ? a - b : b - a);
        end
      end
  end

  // reverse best for the forward candidate chosen; order e = 0, -1, +1
  logic       ok_c;
  logic signed [1:0] be;
  always_comb begin
    automatic int c = int'(fwd_d) - int'(ctr_q) + 1;
    automatic logic [13:0] best = '1;
    automatic logic any = 1'b0;
    be = '0;
    if (c < 0 || c > 2) c = 1;
    for (int k = 0; k < 3; k++) begin
      automatic int e   = (k == 0) ? 0 : ((k == 1) ? -1 : 1);
      automatic int pos = int'(base_q) + e;
      if (pos >= 0 && pos + 8 <= int'(W)) begin
        if (!any || rsad[c][e + 1] < best) begin
          any  = 1'b1;
          best = rsad[c][e + 1];
          be   = 2'(e);
        end
      end
    end
    ok_c = any && (be == 2'sd0);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      r_cnt <= '0; l_row <= '0; base_q <= '0; ctr_q <= '0;
      done <= 1'b0; reliable <= 1'b0; rev_d <= '0;
      for (int c = 0; c < 3; c++)
        for (int e = 0; e < 3; e++) rsad[c][e] <= '0;
    end else begin
      done <= 1'b0;
      if (start) begin
        base_q <= base; ctr_q <= centre;
        r_cnt <= '0; l_row <= '0;
        for (int c = 0; c < 3; c++)
          for (int e = 0; e < 3; e++) rsad[c][e] <= '0;
      end else begin
        if (r_valid) begin
          for (int i = 0; i < 10; i++) rwin[r_cnt][i] <= r_pix[i];
          r_cnt <= r_cnt + 3'd1;
        end
        if (l_valid) begin
          for (int c = 0; c < 3; c++)
            for (int e = 0; e < 3; e++) rsad[c][e] <= rsad[c][e] + row_sad[c][e];
          l_row <= l_row + 3'd1;
        end
        if (fwd_done) begin
          done     <= 1'b1;
          reliable <= fwd_any && ok_c;
          rev_d    <= 8'(-int'(fwd_d) + int'(be));
        end
      end
    end
  end

endmodule
