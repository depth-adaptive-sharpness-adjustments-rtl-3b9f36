// tb_de_level1: level-1 refinement. For random 480-pixel, 8-line left views
// and right blocks copied at a known disparity 2*d2 + e (e in -1..1), checks
// best_d against a 3-candidate SAD search in the testbench (order centre,
// -1, +1 on ties), the planted disparity, the cut of candidates at both line
// ends, the no-valid-candidate fallback (best_d = 0, any_valid low) and the
// done pulse one clock after the eighth window row.
module tb_de_level1;
  import dase_pkg::*;
  localparam int W = 480, NP = 16;
  logic clk = 0, rst_n = 0, start = 0, r_valid = 0, l_valid = 0, done, any_valid;
  logic signed [12:0] base = 0;
  logic signed [7:0]  centre = 0, best_d;
  pix_t r_pix [NP], l_pix [NP];
  int checks = 0, failures = 0;
  int L [8][W];
  int R [8][8];

  de_level1 #(.W(W), .NP(NP)) dut (.*);

  always #5 clk = ~clk;
  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int lpx(input int r, input int c);
    return (c >= 0 && c < W) ? L[r][c] : 0;
  endfunction

  initial begin
    repeat (2) @(posedge clk); rst_n = 1; @(posedge clk); #1;
    for (int t = 0; t < 60; t++) begin
      automatic int b = (t % 5 == 0) ? 0 : ((t % 5 == 1) ? W - 8 : 8 * $urandom_range(8, W / 8 - 9));
      automatic int ctr = 2 * ($urandom_range(0, 64) - 32);
      automatic int e = $urandom_range(0, 2) - 1, dp = ctr + e;
      automatic int best = 1 << 30, bd = 0, any = 0, lat = 0;
      if (t == 7) begin b = 0; ctr = -40; end        // all candidates outside the line
      for (int r = 0; r < 8; r++) for (int c = 0; c < W; c++) L[r][c] = $urandom_range(0, 255);
      for (int r = 0; r < 8; r++) for (int i = 0; i < 8; i++) R[r][i] = lpx(r, b + dp + i);
      for (int k = 0; k < 3; k++) begin
        automatic int off = (k == 0) ? 0 : ((k == 1) ? -1 : 1), d = ctr + off;
        if (b + d >= 0 && b + d + 8 <= W) begin
          automatic int s = 0;
          for (int r = 0; r < 8; r++) for (int i = 0; i < 8; i++) begin
            automatic int df = R[r][i] - L[r][b + d + i];
            s += (df < 0) ? -df : df;
          end
          if (!any || s < best) begin best = s; bd = d; any = 1; end
        end
      end
      base = 13'(b); centre = 8'(ctr); start = 1; @(posedge clk); #1; start = 0;
      for (int r = 0; r < 8; r++) begin
        for (int i = 0; i < NP; i++) r_pix[i] = (i >= 1 && i < 9) ? 8'(R[r][i - 1]) : 8'h55;
        r_valid = 1; @(posedge clk); #1;
      end
      r_valid = 0;
      for (int r = 0; r < 8; r++) begin
        for (int i = 0; i < NP; i++) l_pix[i] = 8'(lpx(r, b + ctr - 1 + i));
        l_valid = 1; @(posedge clk); #1;
      end
      l_valid = 0;
      while (!done && lat < 10) begin @(posedge clk); #1; lat++; end
      checks += 3;
      if (lat != 1) begin failures++; $display("FAIL latency %0d", lat); end
      if (best_d != 8'(any ? bd : 0) || any_valid != 1'(any)) begin
        failures++; $display("FAIL t%0d b%0d got %0d exp %0d any %0d", t, b, best_d, bd, any);
      end
      if (any && (b + dp >= 0) && (b + dp + 8 <= W) && best_d != 8'(dp)) begin
        failures++; $display("FAIL planted %0d got %0d", dp, best_d);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
