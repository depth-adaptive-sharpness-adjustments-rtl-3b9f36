// closing_median_filter: outlier reduction on the block disparity map.
//
// Four raster passes over the ROWS x COLS map held in dv_table, one entry per
// clock, each reading a 3x3 window (edges replicated) from one plane and
// writing the result to the other:
//   pass 0 (plane 0 -> 1): an entry flagged unreliable is replaced by the
//          median of its 8 neighbours (lower median, 4th smallest); the flag
//          is cleared. Other entries are copied.
//   pass 1 (1 -> 0): grey-level dilation, 3x3 maximum;
//   pass 2 (0 -> 1): grey-level erosion, 3x3 minimum (passes 1+2 = closing);
//   pass 3 (1 -> 0): 3x3 median (5th smallest of 9).
// The unreliable flag of every written entry is therefore 0, so wr_data.unrel
// is a constant output bit; it stays in the port so the filter writes whole
// dv_table entries. start begins the passes; done pulses one clock after the last write, with
// the result in plane 0. Run time: 4 * ROWS * COLS + 1 clocks.
// The replacement by the neighbours' median, the closing and the median
// filter on a 3x3 block basis follow the source design; the pass order,
// the lower median for 8 values and the replicated edges are this design's.
module closing_median_filter
  import dase_pkg::*;
#(
  parameter int unsigned ROWS = (V_ACT + SLICE_LINES - 1) / SLICE_LINES,
  parameter int unsigned COLS = H_ACT / 2 / MB_SIZE
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       start,
  output logic       done,
  output logic       busy,
  output logic       win_plane,
  output logic [7:0] win_row,
  output logic [7:0] win_col,
  input  dv_entry_t  win [9],
  output logic       wr_en,
  output logic       wr_plane,
  output logic [7:0] wr_row,
  output logic [7:0] wr_col,
  output dv_entry_t  wr_data,
  output logic [15:0] replaced        // entries replaced in pass 0
);

  logic [1:0] pass;
  logic [7:0] r, c;

  // k-th smallest (0-based) of n values; ties broken by index
  function automatic logic [7:0] kth(input logic [7:0] v [9], input int n, input int kk);
    logic [7:0] res = v[0];
    for (int i = 0; i < n; i++) begin
      automatic int rank = 0;
      for (int j = 0; j < n; j++)
        if (v[j] < v[i] || (v[j] == v[i] && j < i)) rank++;
      if (rank == kk) res = v[i];
    end
    return res;
  endfunction

  logic [7:0] codes [9];
  logic [7:0] nb    [9];
  logic [7:0] mx, mn;
  dv_entry_t  res;

  always_comb begin
    for (int i = 0; i < 9; i++) codes[i] = win[i].code;
    for (int i = 0; i < 8; i++) nb[i] = (i < 4) ? win[i].code : win[i + 1].code;
    nb[8] = '0;
    mx = codes[0];
    mn = codes[0];
    for (int i = 1; i < 9; i++) begin
      if (codes[i] > mx) mx = codes[i];
      if (codes[i] < mn) mn = codes[i];
    end
    res = '0;
    unique case (pass)
      2'd0: res.code = win[4].unrel ? kth(nb, 8, 3) : win[4].code;
      2'd1: res.code = mx;
      2'd2: res.code = mn;
      default: res.code = kth(codes, 9, 4);
    endcase
  end

  assign win_plane = pass[0];
  assign win_row   = r;
  assign win_col   = c;
  assign wr_en     = busy;
  assign wr_plane  = ~pass[0];
  assign wr_row    = r;
  assign wr_col    = c;
  assign wr_data   = res;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy <= 1'b0; done <= 1'b0; pass <= '0; r <= '0; c <= '0; replaced <= '0;
    end else begin
      done <= 1'b0;
      if (!busy) begin
        if (start) begin
          busy <= 1'b1; pass <= '0; r <= '0; c <= '0; replaced <= '0;
        end
      end else begin
        if (pass == 2'd0 && win[4].unrel) replaced <= replaced + 16'd1;
        if (c == 8'(COLS - 1)) begin
          c <= '0;
          if (r == 8'(ROWS - 1)) begin
            r <= '0;
            if (pass == 2'd3) begin
              busy <= 1'b0;
              done <= 1'b1;
            end
            pass <= pass + 2'd1;
          end else begin
            r <= r + 8'd1;
          end
        end else begin
          c <= c + 8'd1;
        end
      end
    end
  end

endmodule
