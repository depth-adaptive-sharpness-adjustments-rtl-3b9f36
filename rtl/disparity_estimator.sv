// disparity_estimator: runs the block-matching disparity search over every
// matching block of a slice and writes one disparity-table entry per block.
//
// When the line buffer reports a full slice, the 60 matching blocks (16x16
// full-resolution, 8x8 at level 1) of the right view are processed one after
// another. For block k the sequence follows the waveform of the source design:
//   1. homogeneity check: 8 reads of the level-1 right block (rows 4..11 of
//      the 16 level-1 rows, i.e. the block is centred vertically in the
//      32-line slice; columns 8k..8k+7);
//   2. level-2 search: 8 reads of the 8x8 level-2 right block (columns
//      clamp(4k-2) .. +7, all 8 level-2 rows), then 8 x 5 reads of the
//      left-view window, then the arg-min;
//   3. level-1 search around 2*d2: 8 right-block reads (words from column
//      8k-1) and 8 left reads; the bi-directional check listens to the same
//      words and reports one clock after the level-1 result;
//   4. write: code = clamp(2*d1 + 128, 0, 255) (the full-resolution
//      disparity, as level 0 is not searched in hardware),
//      unrel = homogeneous or failed the bi-directional check.
// One line-buffer read is issued per clock; the returned words are routed by a
// tag delayed one cycle. A block takes 82 clocks (the source design
// reports 88). A slice that arrives while one is being processed waits (one
// slice deep); a further one is dropped and counted in overruns.
// Disparity sign: a right-view block at column x matches the left view at
// x + d. Block placement, the level-2 block position and the code are this
// design's choices; the search ranges and block sizes follow the source.
module disparity_estimator
  import dase_pkg::*;
#(
  parameter int unsigned VW = H_ACT / 2,
  parameter int unsigned SR = SR2,
  parameter int unsigned NP = RD_PAR
) (
  input  logic        clk,
  input  logic        rst_n,
  // from line buffer
  input  logic        slice_done,
  input  logic        slice_bank,
  input  logic [7:0]  slice_idx,
  output logic        rd_en,
  output logic        rd_bank,
  output logic        rd_view,
  output logic        rd_level,
  output logic [3:0]  rd_row,
  output logic signed [12:0] rd_col,
  input  logic        rd_valid,
  input  pix_t        rd_data [NP],
  // to disparity vector table
  output logic        wr_en,
  output logic [7:0]  wr_row,
  output logic [7:0]  wr_col,
  output dv_entry_t   wr_data,
  // status
  output logic        busy,
  output logic        slice_finished,   // pulse after the last block of a slice
  output logic [7:0]  finished_idx,
  output logic [9:0]  mb_cycles,        // clocks used by the last block
  output logic [15:0] overruns,
  output logic [15:0] homog_blocks,
  output logic [15:0] bidir_fails       // blocks that failed the reverse check
);

  localparam int unsigned NMB = VW / MB_SIZE;
  localparam int unsigned W1  = VW / 2;
  localparam int unsigned W2  = VW / 4;
  localparam int unsigned NW  = (2 * SR + 8 + NP - 1) / NP;

  typedef enum logic [3:0] {
    S_IDLE, S_START, S_HOG, S_R2, S_L2, S_W2, S_L1S, S_R1, S_L1, S_W1, S_WR
  } state_t;
  typedef enum logic [2:0] { T_NONE, T_HOG, T_R2, T_L2, T_R1, T_L1 } tag_t;

  state_t state;
  tag_t   tag_q;
  logic [6:0] cnt;
  logic [7:0] k;
  logic       cur_bank, pend, pend_bank;
  logic [7:0] cur_idx, pend_idx;
  logic [9:0] cyc;

  logic signed [12:0] base1, base2;
  always_comb begin
    automatic int b2 = 4 * int'(k) - 2;
    if (b2 < 0) b2 = 0;
    if (b2 > int'(W2) - 8) b2 = int'(W2) - 8;
    base2 = 13'(b2);
    base1 = 13'(8 * int'(k));
  end

  // sub-blocks
  logic hog_start, hog_done, hog_flag;
  pix_t hog_range;
  logic l2_start, l2_done, l2_any;
  logic signed [7:0] l2_d;
  logic [13:0] l2_sad;
  logic l1_start, l1_done, l1_any;
  logic signed [7:0] l1_d;
  logic hog_flag_q;
  logic bd_done, bd_rel;
  logic signed [7:0] bd_rev;

  homogeneous_check #(.NP(NP)) u_hog (
    .clk, .rst_n, .start(hog_start),
    .in_valid(rd_valid && tag_q == T_HOG), .in_last(cnt == 7'd0 && state == S_R2),
    .in_pix(rd_data), .done(hog_done), .homog(hog_flag), .range_o(hog_range));

  de_level2 #(.SR(SR), .W(W2), .NP(NP)) u_l2 (
    .clk, .rst_n, .start(l2_start), .base(base2),
    .r_valid(rd_valid && tag_q == T_R2), .r_pix(rd_data),
    .l_valid(rd_valid && tag_q == T_L2), .l_pix(rd_data),
    .done(l2_done), .best_d(l2_d), .best_sad(l2_sad), .any_valid(l2_any));

  de_level1 #(.W(W1), .NP(NP)) u_l1 (
    .clk, .rst_n, .start(l1_start), .base(base1), .centre(8'(2 * l2_d)),
    .r_valid(rd_valid && tag_q == T_R1), .r_pix(rd_data),
    .l_valid(rd_valid && tag_q == T_L1), .l_pix(rd_data),
    .done(l1_done), .best_d(l1_d), .any_valid(l1_any));

  bidirectional_check #(.W(W1), .NP(NP)) u_bd (
    .clk, .rst_n, .start(l1_start), .base(base1), .centre(8'(2 * l2_d)),
    .r_valid(rd_valid && tag_q == T_R1), .r_pix(rd_data),
    .l_valid(rd_valid && tag_q == T_L1), .l_pix(rd_data),
    .fwd_done(l1_done), .fwd_d(l1_d), .fwd_any(l1_any),
    .done(bd_done), .reliable(bd_rel), .rev_d(bd_rev));

  assign hog_start = (state == S_START);
  assign l2_start  = (state == S_START);
  assign l1_start  = (state == S_L1S);
  assign busy      = (state != S_IDLE);

  // read request decode
  tag_t tag_d;
  always_comb begin
    rd_en = 1'b0; rd_view = 1'b1; rd_level = 1'b0; rd_row = '0; rd_col = '0;
    rd_bank = cur_bank; tag_d = T_NONE;
    unique case (state)
      S_HOG: begin
        rd_en = 1'b1; rd_view = 1'b1; rd_level = 1'b0;
        rd_row = 4'(cnt + 7'd4); rd_col = base1; tag_d = T_HOG;
      end
      S_R2: begin
        rd_en = 1'b1; rd_view = 1'b1; rd_level = 1'b1;
        rd_row = 4'(cnt); rd_col = base2; tag_d = T_R2;
      end
      S_L2: begin
        rd_en = 1'b1; rd_view = 1'b0; rd_level = 1'b1;
        rd_row = 4'(cnt / 7'(NW));
        rd_col = base2 - 13'(SR) + 13'(NP * (cnt % 7'(NW)));
        tag_d = T_L2;
      end
      S_R1: begin
        rd_en = 1'b1; rd_view = 1'b1; rd_level = 1'b0;
        rd_row = 4'(cnt + 7'd4); rd_col = base1 - 13'sd1; tag_d = T_R1;
      end
      S_L1: begin
        rd_en = 1'b1; rd_view = 1'b0; rd_level = 1'b0;
        rd_row = 4'(cnt + 7'd4); rd_col = base1 + 13'(2 * l2_d) - 13'sd1;
        tag_d = T_L1;
      end
      default: ;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= S_IDLE; tag_q <= T_NONE; cnt <= '0; k <= '0;
      cur_bank <= 1'b0; cur_idx <= '0; pend <= 1'b0; pend_bank <= 1'b0; pend_idx <= '0;
      wr_en <= 1'b0; wr_row <= '0; wr_col <= '0; wr_data <= '0;
      slice_finished <= 1'b0; finished_idx <= '0; mb_cycles <= '0; cyc <= '0;
      overruns <= '0; homog_blocks <= '0; hog_flag_q <= 1'b0; bidir_fails <= '0;
    end else begin
      tag_q          <= tag_d;
      wr_en          <= 1'b0;
      slice_finished <= 1'b0;
      cyc            <= cyc + 10'd1;
      if (hog_done) hog_flag_q <= hog_flag;

      if (slice_done) begin
        if (pend) overruns <= overruns + 16'd1;
        pend      <= 1'b1;
        pend_bank <= slice_bank;
        pend_idx  <= slice_idx;
      end

      unique case (state)
        S_IDLE: if (pend && !slice_done) begin
          pend     <= 1'b0;
          cur_bank <= pend_bank;
          cur_idx  <= pend_idx;
          k        <= '0;
          state    <= S_START;
        end
        S_START: begin
          cnt   <= '0;
          cyc   <= 10'd1;
          state <= S_HOG;
        end
        S_HOG: if (cnt == 7'd7) begin cnt <= '0; state <= S_R2; end
               else cnt <= cnt + 7'd1;
        S_R2:  if (cnt == 7'd7) begin cnt <= '0; state <= S_L2; end
               else cnt <= cnt + 7'd1;
        S_L2:  if (cnt == 7'(8 * NW - 1)) begin cnt <= '0; state <= S_W2; end
               else cnt <= cnt + 7'd1;
        S_W2:  if (l2_done) state <= S_L1S;
        S_L1S: state <= S_R1;
        S_R1:  if (cnt == 7'd7) begin cnt <= '0; state <= S_L1; end
               else cnt <= cnt + 7'd1;
        S_L1:  if (cnt == 7'd7) begin cnt <= '0; state <= S_W1; end
               else cnt <= cnt + 7'd1;
        S_W1:  if (bd_done) state <= S_WR;
        S_WR: begin
          automatic int code = 2 * int'(l1_d) + 128;
          if (code < 0)   code = 0;
          if (code > 255) code = 255;
          wr_en         <= 1'b1;
          wr_row        <= cur_idx;
          wr_col        <= k;
          wr_data.code  <= 8'(code);
          wr_data.unrel <= hog_flag_q || !bd_rel;
          if (hog_flag_q) homog_blocks <= homog_blocks + 16'd1;
          if (!bd_rel)    bidir_fails  <= bidir_fails + 16'd1;
          mb_cycles     <= cyc;
          if (k == 8'(NMB - 1)) begin
            slice_finished <= 1'b1;
            finished_idx   <= cur_idx;
            state          <= S_IDLE;
          end else begin
            k     <= k + 8'd1;
            state <= S_START;
          end
        end
        default: state <= S_IDLE;
      endcase
    end
  end

endmodule
