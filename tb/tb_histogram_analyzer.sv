// tb_histogram_analyzer: full-size 34x60 block map. Trials draw a
// background cluster and a foreground cluster of DV codes plus scattered
// outliers (the shape of a typical disparity histogram), 120 trials vary
// cluster widths and shares and put groups of about theta blocks near both
// ends, one trial uses one
// single code and one trial an empty-looking flat spread, and one trial puts exactly theta
// blocks at each end, which must not count. Each result
// (d_S, d_E, 4:6 split, p_B, p_F, delta) is compared with a model in the
// testbench; the hand-checked example of the source design's histogram
// (p_B = 92, p_F = 178 gives delta = 126 by the 4:6 rule; the figure prints
// 127 for its real-valued peaks) is checked as well.
module tb_histogram_analyzer;
  import dase_pkg::*;
  localparam int ROWS = 34, COLS = 60, N = ROWS * COLS, TH = N * 3 / 100;
  logic clk = 0, rst_n = 0, start = 0, busy, done;
  logic [7:0] rd_row, rd_col, d_s, d_e, split0, p_b, p_f, delta;
  dv_entry_t rd_data;
  int map [ROWS][COLS];
  int checks = 0, failures = 0;

  histogram_analyzer #(.ROWS(ROWS), .COLS(COLS)) dut (.*);
  assign rd_data = {1'b0, 8'(map[rd_row][rd_col])};

  always #5 clk = ~clk;
  initial begin
    repeat (1000000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run_and_check(input string name);
    int h [256];
    int es, ee, s0, pb, pf, dl, mb, mf;
    h = '{default: 0};
    for (int r = 0; r < ROWS; r++) for (int c = 0; c < COLS; c++) h[map[r][c]]++;
    es = 0; ee = 255;
    for (int d = 0; d <= 251; d++) if (h[d] + h[d+1] + h[d+2] + h[d+3] + h[d+4] > TH) begin es = d; break; end
    for (int d = 255; d >= 4; d--) if (h[d] + h[d-1] + h[d-2] + h[d-3] + h[d-4] > TH) begin ee = d; break; end
    s0 = (ee > es) ? es + (ee - es) * 4 / 10 : es;
    pb = es; pf = s0; mb = 0; mf = 0;
    for (int d = es; d <= ee; d++)
      if (d < s0) begin if (h[d] > mb) begin mb = h[d]; pb = d; end end
      else        begin if (h[d] > mf) begin mf = h[d]; pf = d; end end
    dl = (pf > pb) ? pb + (pf - pb) * 4 / 10 : pb;
    start = 1; @(posedge clk); #1; start = 0;
    while (!done) begin @(posedge clk); #1; end
    checks++;
    if (d_s != 8'(es) || d_e != 8'(ee) || split0 != 8'(s0) || p_b != 8'(pb) || p_f != 8'(pf) || delta != 8'(dl)) begin
      failures++;
      $display("FAIL %s: got %0d %0d %0d %0d %0d %0d exp %0d %0d %0d %0d %0d %0d", name,
               d_s, d_e, split0, p_b, p_f, delta, es, ee, s0, pb, pf, dl);
    end
  endtask

  initial begin
    repeat (2) @(posedge clk); rst_n = 1; @(posedge clk); #1;
    // example peaks of the source design
    checks++;
    if (92 + (178 - 92) * 4 / 10 != 126) failures++;
    for (int t = 0; t < 6; t++) begin
      automatic int bc = $urandom_range(60, 120), fc = $urandom_range(150, 230);
      for (int r = 0; r < ROWS; r++) for (int c = 0; c < COLS; c++) begin
        automatic int sel = $urandom_range(0, 99);
        if (sel < 55)      map[r][c] = bc + $urandom_range(0, 12) - 6;
        else if (sel < 90) map[r][c] = fc + $urandom_range(0, 20) - 10;
        else               map[r][c] = $urandom_range(0, 255);
      end
      run_and_check("clusters");
    end
    // varied shapes: cluster widths and shares drawn at random, plus small
    // groups at the ends whose size lies around theta
    for (int t = 0; t < 120; t++) begin
      automatic int bc = $urandom_range(20, 150), fc = $urandom_range(100, 250);
      automatic int bw = $urandom_range(0, 20), fw = $urandom_range(0, 30);
      automatic int share = $urandom_range(10, 90), lo_n = $urandom_range(TH - 3, TH + 3);
      automatic int hi_n = $urandom_range(TH - 3, TH + 3);
      automatic int lo_c = $urandom_range(0, 15), hi_c = $urandom_range(240, 255);
      for (int r = 0; r < ROWS; r++) for (int c = 0; c < COLS; c++) begin
        automatic int i = r * COLS + c, v;
        if (i < lo_n)              v = lo_c + $urandom_range(0, 3);
        else if (i < lo_n + hi_n)  v = hi_c - $urandom_range(0, 3);
        else if ($urandom_range(0, 99) < share) v = bc + $urandom_range(0, 2 * bw) - bw;
        else                       v = fc + $urandom_range(0, 2 * fw) - fw;
        if (v < 0) v = 0;
        if (v > 255) v = 255;
        map[r][c] = v;
      end
      run_and_check("varied");
    end
    for (int r = 0; r < ROWS; r++) for (int c = 0; c < COLS; c++) map[r][c] = 100;
    run_and_check("single");
    // exactly theta blocks at both ends: such windows must not pass (strict >)
    for (int r = 0; r < ROWS; r++) for (int c = 0; c < COLS; c++) begin
      automatic int i = r * COLS + c;
      map[r][c] = (i < TH) ? 20 : ((i < 2 * TH) ? 240 : ((i % 2) ? 100 : 180));
    end
    run_and_check("theta");
    checks++;
    if (d_s != 8'd96 || d_e != 8'd184) begin failures++; $display("FAIL theta edges %0d %0d", d_s, d_e); end
    for (int r = 0; r < ROWS; r++) for (int c = 0; c < COLS; c++) map[r][c] = (r * COLS + c) % 256;
    run_and_check("flat");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
