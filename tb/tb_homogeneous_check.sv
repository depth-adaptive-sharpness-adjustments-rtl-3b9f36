// tb_homogeneous_check: feeds 300 random 8x8 blocks (flat, near-flat and
// textured) row by row and checks range = max - min and the homogeneous flag
// (range below 8), one clock after the last row.
module tb_homogeneous_check;
  import dase_pkg::*;
  logic clk = 0, rst_n = 0, start = 0, in_valid = 0, in_last = 0, done, homog;
  pix_t in_pix [16];
  pix_t range_o;
  int checks = 0, failures = 0, nflat = 0;

  homogeneous_check dut (.*);

  always #5 clk = ~clk;
  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(posedge clk); rst_n = 1; @(posedge clk); #1;
    for (int t = 0; t < 300; t++) begin
      automatic int base = $urandom_range(0, 200);
      automatic int spread = (t % 3 == 0) ? 3 : ((t % 3 == 1) ? 10 : 55);
      automatic int mx = -1, mn = 999;
      start = 1; @(posedge clk); #1; start = 0;
      for (int r = 0; r < 8; r++) begin
        for (int i = 0; i < 16; i++) begin
          automatic int p = base + $urandom_range(0, spread);
          in_pix[i] = 8'(p);
          if (i < 8) begin
            if (p > mx) mx = p;
            if (p < mn) mn = p;
          end
        end
        in_valid = 1; in_last = (r == 7);
        @(posedge clk); #1;
      end
      in_valid = 0; in_last = 0;
      checks++;
      if (!done || range_o != 8'(mx - mn) || homog != ((mx - mn) < 8)) begin
        failures++;
        $display("FAIL t%0d range %0d exp %0d homog %0d", t, range_o, mx - mn, homog);
      end
      if (homog) nflat++;
    end
    checks++;
    if (nflat == 0 || nflat == 300) begin failures++; $display("FAIL flag never varied"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
