// tb_closing_median_filter: runs the four passes on a dv_table of 7x10
// entries holding random codes, some flagged unreliable, and compares plane 0
// afterwards with a testbench model: neighbour median for flagged entries,
// 3x3 max, 3x3 min, 3x3 median, edges replicated. Also checks the run time
// (4*ROWS*COLS + 1 clocks) and the count of replaced entries.
module tb_closing_median_filter;
  import dase_pkg::*;
  localparam int ROWS = 7, COLS = 10;
  logic clk = 0, rst_n = 0, start = 0, done, busy;
  logic win_plane, wr_en, wr_plane, tb_wr = 0;
  logic [7:0] win_row, win_col, wr_row, wr_col, tb_row = 0, tb_col = 0;
  dv_entry_t win [9], wr_data, tb_data = '0, rd_data;
  logic [15:0] replaced;
  int checks = 0, failures = 0;
  int m [ROWS][COLS];
  int fl [ROWS][COLS];

  dv_table #(.ROWS(ROWS), .COLS(COLS)) u_tab (
    .clk, .wr_en(busy ? wr_en : tb_wr), .wr_plane(busy ? wr_plane : 1'b0),
    .wr_row(busy ? wr_row : tb_row), .wr_col(busy ? wr_col : tb_col),
    .wr_data(busy ? wr_data : tb_data),
    .win_plane, .win_row, .win_col, .win,
    .rd_plane(1'b0), .rd_row(tb_row), .rd_col(tb_col), .rd_data);
  closing_median_filter #(.ROWS(ROWS), .COLS(COLS)) dut (.*);

  always #5 clk = ~clk;
  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int at(input int r, input int c);
    r = r < 0 ? 0 : (r >= ROWS ? ROWS - 1 : r);
    c = c < 0 ? 0 : (c >= COLS ? COLS - 1 : c);
    return m[r][c];
  endfunction
  function automatic int kth(input int v [9], input int n, input int k);
    int s [9];
    s = v;
    for (int i = 0; i < n; i++) for (int j = i + 1; j < n; j++)
      if (s[j] < s[i]) begin automatic int t = s[i]; s[i] = s[j]; s[j] = t; end
    return s[k];
  endfunction
  task automatic pass(input int op);
    int o [ROWS][COLS];
    for (int r = 0; r < ROWS; r++) for (int c = 0; c < COLS; c++) begin
      int v [9];
      int n [9];
      for (int i = 0; i < 9; i++) v[i] = at(r + i / 3 - 1, c + i % 3 - 1);
      for (int i = 0; i < 9; i++) n[i] = (i < 4) ? v[i] : ((i < 8) ? v[i + 1] : 0);
      case (op)
        0: o[r][c] = fl[r][c] ? kth(n, 8, 3) : m[r][c];
        1: o[r][c] = kth(v, 9, 8);
        2: o[r][c] = kth(v, 9, 0);
        default: o[r][c] = kth(v, 9, 4);
      endcase
    end
    m = o;
  endtask

  initial begin
    int nfl = 0, t0, cyc;
    repeat (2) @(posedge clk); rst_n = 1; @(posedge clk); #1;
    for (int r = 0; r < ROWS; r++) for (int c = 0; c < COLS; c++) begin
      m[r][c] = $urandom_range(0, 255);
      fl[r][c] = ($urandom_range(0, 4) == 0);
      nfl += fl[r][c];
      tb_wr = 1; tb_row = 8'(r); tb_col = 8'(c); tb_data = {1'(fl[r][c]), 8'(m[r][c])};
      @(posedge clk); #1;
    end
    tb_wr = 0;
    for (int op = 0; op < 4; op++) pass(op);
    start = 1; @(posedge clk); #1; start = 0;
    cyc = 1;
    while (!done && cyc < 10000) begin @(posedge clk); #1; cyc++; end
    checks += 2;
    if (cyc != 4 * ROWS * COLS + 1) begin failures++; $display("FAIL %0d clocks", cyc); end
    if (replaced != 16'(nfl)) begin failures++; $display("FAIL replaced %0d exp %0d", replaced, nfl); end
    for (int r = 0; r < ROWS; r++) for (int c = 0; c < COLS; c++) begin
      tb_row = 8'(r); tb_col = 8'(c); #1;
      checks++;
      if (rd_data.code != 8'(m[r][c]) || rd_data.unrel) begin
        failures++; $display("FAIL %0d,%0d got %0d exp %0d", r, c, rd_data.code, m[r][c]);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
