// tb_dv_table: fills both planes of a 6x9 table with random entries and
// checks the single-entry read port and the 3x3 window port, with edge
// replication, at every position of both planes.
module tb_dv_table;
  import dase_pkg::*;
  localparam int ROWS = 6, COLS = 9;
  logic clk = 0;
  logic wr_en = 0, wr_plane = 0, win_plane = 0, rd_plane = 0;
  logic [7:0] wr_row = 0, wr_col = 0, win_row = 0, win_col = 0, rd_row = 0, rd_col = 0;
  dv_entry_t wr_data = '0, win [9], rd_data;
  dv_entry_t model [2][ROWS][COLS];
  int checks = 0, failures = 0;

  dv_table #(.ROWS(ROWS), .COLS(COLS)) dut (.*);

  always #5 clk = ~clk;
  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int clampi(input int v, input int hi);
    return v < 0 ? 0 : (v > hi ? hi : v);
  endfunction

  initial begin
    @(posedge clk); #1;
    for (int p = 0; p < 2; p++)
      for (int r = 0; r < ROWS; r++)
        for (int c = 0; c < COLS; c++) begin
          model[p][r][c] = 9'($urandom_range(0, 511));
          wr_en = 1; wr_plane = 1'(p); wr_row = 8'(r); wr_col = 8'(c); wr_data = model[p][r][c];
          @(posedge clk); #1;
        end
    wr_en = 0;
    // out-of-range write is ignored
    wr_en = 1; wr_plane = 0; wr_row = 8'(ROWS); wr_col = 0; wr_data = 9'h1ff; @(posedge clk); #1; wr_en = 0;
    for (int p = 0; p < 2; p++)
      for (int r = 0; r < ROWS; r++)
        for (int c = 0; c < COLS; c++) begin
          win_plane = 1'(p); win_row = 8'(r); win_col = 8'(c);
          rd_plane = 1'(p); rd_row = 8'(r); rd_col = 8'(c);
          #1;
          checks++;
          if (rd_data != model[p][r][c]) begin failures++; $display("FAIL rd %0d %0d %0d", p, r, c); end
          for (int i = 0; i < 9; i++) begin
            automatic int rr = clampi(r + i / 3 - 1, ROWS - 1), cc = clampi(c + i % 3 - 1, COLS - 1);
            checks++;
            if (win[i] != model[p][rr][cc]) begin failures++; $display("FAIL win %0d %0d %0d i%0d", p, r, c, i); end
          end
        end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
