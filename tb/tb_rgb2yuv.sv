// tb_rgb2yuv: checks the RGB to YUV converter against hand-worked colours
// (white, black, pure red) and against an integer model of full-range BT.601
// for 2000 random pixels, including the one-clock latency.
module tb_rgb2yuv;
  import dase_pkg::*;
  logic clk = 0, rst_n = 0, in_valid = 0, out_valid;
  pix_t r, g, b, y, u, v;
  int checks = 0, failures = 0;

  rgb2yuv dut (.clk, .rst_n, .in_valid, .in_r(r), .in_g(g), .in_b(b),
               .out_valid, .out_y(y), .out_u(u), .out_v(v));

  always #5 clk = ~clk;
  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int cl(input int a); return a < 0 ? 0 : (a > 255 ? 255 : a); endfunction
  function automatic int fdiv256(input int a); // floor division by 256
    return (a >= 0) ? a / 256 : -((-a + 255) / 256);
  endfunction

  task automatic apply(input int rr, input int gg, input int bb,
                       input int ey, input int eu, input int ev);
    r = 8'(rr); g = 8'(gg); b = 8'(bb); in_valid = 1;
    @(posedge clk); #1;
    in_valid = 0;
    checks++;
    if (!out_valid || y != 8'(ey) || u != 8'(eu) || v != 8'(ev)) begin
      failures++;
      $display("FAIL rgb=%0d,%0d,%0d got %0d,%0d,%0d exp %0d,%0d,%0d",
               rr, gg, bb, y, u, v, ey, eu, ev);
    end
  endtask

  initial begin
    repeat (2) @(posedge clk); rst_n = 1; @(posedge clk); #1;
    apply(255, 255, 255, 255, 128, 128);
    apply(0, 0, 0, 0, 128, 128);
    apply(255, 0, 0, 77, 85, 255);
    for (int i = 0; i < 2000; i++) begin
      automatic int rr = $urandom_range(0, 255), gg = $urandom_range(0, 255), bb = $urandom_range(0, 255);
      apply(rr, gg, bb,
            cl(fdiv256(77 * rr + 150 * gg + 29 * bb + 128)),
            cl(fdiv256(-43 * rr - 85 * gg + 128 * bb + 128) + 128),
            cl(fdiv256(128 * rr - 107 * gg - 21 * bb + 128) + 128));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
