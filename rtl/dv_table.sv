// dv_table: the block disparity map ("disparity vector table"), the hub that
// the estimator, the closing/median filter, the histogram analyzer and the
// labeling stage share.
//
// ROWS x COLS entries ({unreliable flag, 8-bit DV code}), one per matching
// block, in two planes so that each filter pass can read one plane while it
// writes the other. The estimator writes plane 0; the filter passes alternate
// and leave their result in plane 0 again.
// Ports: one synchronous write port; a 3x3 window read port (combinational,
// entries beyond the map edge replicate the nearest edge entry); a single
// entry read port (combinational). The source design names this table only;
// its organisation is this design's choice. Registers are used so the 3x3
// window can be read in one clock.
module dv_table
  import dase_pkg::*;
#(
  parameter int unsigned ROWS = (V_ACT + SLICE_LINES - 1) / SLICE_LINES,
  parameter int unsigned COLS = H_ACT / 2 / MB_SIZE
) (
  input  logic       clk,
  input  logic       wr_en,
  input  logic       wr_plane,
  input  logic [7:0] wr_row,
  input  logic [7:0] wr_col,
  input  dv_entry_t  wr_data,
  input  logic       win_plane,
  input  logic [7:0] win_row,
  input  logic [7:0] win_col,
  output dv_entry_t  win [9],        // row-major, win[4] is the centre
  input  logic       rd_plane,
  input  logic [7:0] rd_row,
  input  logic [7:0] rd_col,
  output dv_entry_t  rd_data
);

  dv_entry_t mem [2][ROWS][COLS];

  always_ff @(posedge clk) begin
    if (wr_en && wr_row < 8'(ROWS) && wr_col < 8'(COLS))
      mem[wr_plane][wr_row][wr_col] <= wr_data;
  end

  always_comb begin
    for (int dr = -1; dr <= 1; dr++) begin
      for (int dc = -1; dc <= 1; dc++) begin
        automatic int r = int'(win_row) + dr;
        automatic int c = int'(win_col) + dc;
        if (r < 0) r = 0;
        if (r > int'(ROWS) - 1) r = int'(ROWS) - 1;
        if (c < 0) c = 0;
        if (c > int'(COLS) - 1) c = int'(COLS) - 1;
        win[(dr + 1) * 3 + (dc + 1)] = mem[win_plane][r][c];
      end
    end
    rd_data = mem[rd_plane][(rd_row < 8'(ROWS)) ? rd_row : 8'(ROWS - 1)]
                           [(rd_col < 8'(COLS)) ? rd_col : 8'(COLS - 1)];
  end

endmodule
