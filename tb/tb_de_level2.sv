// tb_de_level2: level-2 full search. A random 240-pixel-wide, 8-line left
// view is generated; the right-view block is copied from it at a known
// disparity (plus small noise) for blocks in the middle and at both line
// ends, where candidates are cut. The result is compared with an exhaustive
// SAD search in the testbench, with ties to the smaller |d|, and with the
// planted disparity; the latency from the last window word to done is
// checked to be 3 clocks.
module tb_de_level2;
  import dase_pkg::*;
  localparam int W = 240, SR = 32, NP = 16, NW = 5;
  logic clk = 0, rst_n = 0, start = 0, r_valid = 0, l_valid = 0, done, any_valid;
  logic signed [12:0] base = 0;
  pix_t r_pix [NP], l_pix [NP];
  logic signed [7:0] best_d;
  logic [13:0] best_sad;
  int checks = 0, failures = 0;
  int L [8][W];
  int R [8][8];

  de_level2 #(.SR(SR), .W(W), .NP(NP)) dut (.*);

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
    for (int t = 0; t < 40; t++) begin
      automatic int b = (t % 4 == 0) ? 0 : ((t % 4 == 1) ? W - 8 : $urandom_range(0, W - 8));
      automatic int dp, best = 1 << 30, bd = 0, lat = 0;
      for (int r = 0; r < 8; r++) for (int c = 0; c < W; c++) L[r][c] = $urandom_range(0, 255);
      // planted disparity within the line
      do dp = $urandom_range(0, 2 * SR) - SR; while (b + dp < 0 || b + dp + 8 > W);
      for (int r = 0; r < 8; r++) for (int i = 0; i < 8; i++)
        begin
          automatic int nz = L[r][b + dp + i] + $urandom_range(0, 3);
          R[r][i] = (nz > 255) ? 255 : nz;
        end
      for (int k = 0; k < 2 * SR + 1; k++) begin
        automatic int d = (k % 2 == 1) ? -((k + 1) / 2) : k / 2;
        if (b + d >= 0 && b + d + 8 <= W) begin
          automatic int s = 0;
          for (int r = 0; r < 8; r++) for (int i = 0; i < 8; i++) begin
            automatic int df = R[r][i] - L[r][b + d + i];
            s += (df < 0) ? -df : df;
          end
          if (s < best) begin best = s; bd = d; end
        end
      end
      base = 13'(b); start = 1; @(posedge clk); #1; start = 0;
      for (int r = 0; r < 8; r++) begin
        for (int i = 0; i < NP; i++) r_pix[i] = (i < 8) ? 8'(R[r][i]) : 8'hAA;
        r_valid = 1; @(posedge clk); #1;
      end
      r_valid = 0;
      for (int r = 0; r < 8; r++)
        for (int w = 0; w < NW; w++) begin
          for (int i = 0; i < NP; i++) l_pix[i] = 8'(lpx(r, b - SR + w * NP + i));
          l_valid = 1; @(posedge clk); #1;
        end
      l_valid = 0;
      while (!done && lat < 10) begin @(posedge clk); #1; lat++; end
      checks += 4;
      if (lat != 2) begin failures++; $display("FAIL latency %0d", lat + 1); end
      if (best_d != 8'(bd) || best_sad != 14'(best)) begin
        failures++; $display("FAIL t%0d b%0d d %0d exp %0d sad %0d exp %0d", t, b, best_d, bd, best_sad, best);
      end
      if (best_d != 8'(dp)) begin failures++; $display("FAIL planted %0d got %0d", dp, best_d); end
      if (!any_valid) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
