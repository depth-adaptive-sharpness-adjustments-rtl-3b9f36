// labeling_table: keeps the dominant foreground object of the block
// disparity map and answers per-pixel "is this foreground?" queries.
//
// After start, with threshold delta from the histogram analyzer, a block is
// foreground if its DV code >= delta. Connected-component labeling, the
// classic two-pass method with an equivalence (parent) table:
//   P1   raster scan, 4-connectivity: a foreground block takes the label of
//        its left or upper neighbour, or a new label; when both differ, the
//        two roots are found (one parent step per clock) and the larger root
//        is linked under the smaller one, so parent[l] <= l always holds;
//   RES  parent[l] = parent[parent[l]] for l = 1..n flattens every chain;
//   CNT  block count per root;  MAX  the largest object;
//   P2   block mask = block belongs to the largest object.
// done pulses at the end (about 3*ROWS*COLS + labels clocks).
// latch copies the mask and the left-view shift into the display copy, so the
// mask read during a displayed frame does not change under it.
// Query (combinational): a pixel at line column q_x (left view in 0..VW-1,
// right view in VW..2VW-1) and line q_y is foreground if any block within
// BAND (8) pixels of it, horizontally and vertically, is in the mask: this is
// the 8-pixel exterior band of the source design. The mask is built for the
// right view; for the left view it is moved by the disparity shift, as the
// source design does instead of segmenting the left view again.
// Labeling, largest object, band and the shifted mask follow the source
// design; the label table size, 4-connectivity, the band taken at block
// granularity and one shift for the whole object are this design's choices.
module labeling_table
  import dase_pkg::*;
#(
  parameter int unsigned ROWS = (V_ACT + SLICE_LINES - 1) / SLICE_LINES,
  parameter int unsigned COLS = H_ACT / 2 / MB_SIZE,
  parameter int unsigned VW   = H_ACT / 2,
  parameter int unsigned BH   = SLICE_LINES,   // block height in lines
  parameter int unsigned BWID = MB_SIZE,       // block width in pixels
  parameter int unsigned BAND = BAND_PX
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        start,
  input  logic [7:0]  delta,
  output logic        busy,
  output logic        done,
  output logic [7:0]  rd_row,
  output logic [7:0]  rd_col,
  input  dv_entry_t   rd_data,
  output logic [10:0] num_labels,
  output logic [11:0] obj_size,
  output logic [15:0] merges,
  // display copy and pixel query
  input  logic        latch,
  input  logic signed [9:0] shift,   // left-view shift in pixels
  input  logic [11:0] q_x,
  input  logic [11:0] q_y,
  output logic        q_fg
);

  localparam int unsigned NB   = ROWS * COLS;
  localparam int unsigned LMAX = NB / 2 + 2;
  localparam int unsigned LW   = $clog2(LMAX);

  typedef enum logic [2:0] { S_IDLE, S_P1, S_FIND, S_RES, S_CNT, S_MAX, S_P2 } st_t;
  st_t state;

  logic [LW-1:0] lab  [ROWS][COLS];
  logic [LW-1:0] par  [LMAX];
  logic [11:0]   cnt  [LMAX];
  logic          mask [ROWS][COLS];
  logic          dmask[ROWS][COLS];
  logic signed [9:0] dshift;

  logic [7:0]    r, c;
  logic [LW-1:0] nl, l, ra, rb, best_l;
  logic [11:0]   best_n;

  assign rd_row = r;
  assign rd_col = c;
  assign busy   = (state != S_IDLE);
  assign num_labels = 11'(nl);

  logic          fg;
  logic [LW-1:0] left_l, up_l;
  always_comb begin
    fg     = (rd_data.code >= delta);
    left_l = (c > 0) ? lab[r][c - 8'd1] : '0;
    up_l   = (r > 0) ? lab[r - 8'd1][c] : '0;
  end

  // advance raster position; returns 1 at the last entry
  function automatic logic last_rc(input logic [7:0] rr, input logic [7:0] cc);
    return (rr == 8'(ROWS - 1)) && (cc == 8'(COLS - 1));
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= S_IDLE; done <= 1'b0; r <= '0; c <= '0; nl <= '0; l <= '0;
      ra <= '0; rb <= '0; best_l <= '0; best_n <= '0; obj_size <= '0; merges <= '0;
      dshift <= '0;
      for (int i = 0; i < int'(LMAX); i++) begin par[i] <= '0; cnt[i] <= '0; end
      for (int i = 0; i < int'(ROWS); i++)
        for (int j = 0; j < int'(COLS); j++) begin
          lab[i][j] <= '0; mask[i][j] <= 1'b0; dmask[i][j] <= 1'b0;
        end
    end else begin
      done <= 1'b0;
      if (latch) begin
        dmask  <= mask;
        dshift <= shift;
      end
      unique case (state)
        S_IDLE: if (start) begin
          r <= '0; c <= '0; nl <= '0; merges <= '0;
          for (int i = 0; i < int'(LMAX); i++) cnt[i] <= '0;
          state <= S_P1;
        end
        S_P1: begin
          automatic logic adv = 1'b1;
          if (!fg) lab[r][c] <= '0;
          else if (left_l == '0 && up_l == '0) begin
            lab[r][c]   <= nl + 1'b1;
            par[nl + 1'b1] <= nl + 1'b1;
            nl <= nl + 1'b1;
          end else if (left_l == '0) lab[r][c] <= up_l;
          else if (up_l == '0 || up_l == left_l) lab[r][c] <= left_l;
          else begin
            ra <= left_l; rb <= up_l; adv = 1'b0; state <= S_FIND;
          end
          if (adv) begin
            if (last_rc(r, c)) begin l <= 1; state <= S_RES; end
            else if (c == 8'(COLS - 1)) begin c <= '0; r <= r + 8'd1; end
            else c <= c + 8'd1;
          end
        end
        S_FIND: begin
          if (par[ra] != ra) ra <= par[ra];
          if (par[rb] != rb) rb <= par[rb];
          if (par[ra] == ra && par[rb] == rb) begin
            automatic logic [LW-1:0] lo = (ra < rb) ? ra : rb;
            automatic logic [LW-1:0] hi = (ra < rb) ? rb : ra;
            if (lo != hi) begin par[hi] <= lo; merges <= merges + 16'd1; end
            lab[r][c] <= lo;
            if (last_rc(r, c)) begin l <= 1; state <= S_RES; end
            else begin
              state <= S_P1;
              if (c == 8'(COLS - 1)) begin c <= '0; r <= r + 8'd1; end
              else c <= c + 8'd1;
            end
          end
        end
        S_RES: begin
          if (l > nl) begin r <= '0; c <= '0; state <= S_CNT; end
          else begin
            par[l] <= par[par[l]];
            l <= l + 1'b1;
          end
        end
        S_CNT: begin
          if (lab[r][c] != '0) cnt[par[lab[r][c]]] <= cnt[par[lab[r][c]]] + 12'd1;
          if (last_rc(r, c)) begin
            l <= 1; best_l <= '0; best_n <= '0; state <= S_MAX;
          end else if (c == 8'(COLS - 1)) begin c <= '0; r <= r + 8'd1; end
          else c <= c + 8'd1;
        end
        S_MAX: begin
          if (l > nl) begin r <= '0; c <= '0; obj_size <= best_n; state <= S_P2; end
          else begin
            if (cnt[l] > best_n) begin best_n <= cnt[l]; best_l <= l; end
            l <= l + 1'b1;
          end
        end
        S_P2: begin
          mask[r][c] <= (lab[r][c] != '0) && (best_l != '0) && (par[lab[r][c]] == best_l);
          if (last_rc(r, c)) begin done <= 1'b1; state <= S_IDLE; end
          else if (c == 8'(COLS - 1)) begin c <= '0; r <= r + 8'd1; end
          else c <= c + 8'd1;
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  // pixel query with the exterior band
  always_comb begin
    automatic int xv = int'(q_x);
    automatic logic lv = (q_x < 12'(VW));
    if (!lv) xv = xv - int'(VW);
    else     xv = xv - int'(dshift);
    q_fg = 1'b0;
    for (int dy = -1; dy <= 1; dy++) begin
      for (int dx = -1; dx <= 1; dx++) begin
        automatic int px = xv + dx * int'(BAND);
        automatic int py = int'(q_y) + dy * int'(BAND);
        if (px >= 0 && px < int'(VW) && py >= 0 && py < int'(ROWS * BH))
          if (dmask[py / int'(BH)][px / int'(BWID)]) q_fg = 1'b1;
      end
    end
  end

endmodule
