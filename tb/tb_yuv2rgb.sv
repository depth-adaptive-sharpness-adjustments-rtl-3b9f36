// tb_yuv2rgb: checks the YUV to RGB converter against hand-worked values
// (neutral grey, saturating chroma) and an integer model for 2000 random
// pixels, including the one-clock latency.
module tb_yuv2rgb;
  import dase_pkg::*;
  logic clk = 0, rst_n = 0, in_valid = 0, out_valid;
  pix_t y, u, v, r, g, b;
  int checks = 0, failures = 0;

  yuv2rgb dut (.clk, .rst_n, .in_valid, .in_y(y), .in_u(u), .in_v(v),
               .out_valid, .out_r(r), .out_g(g), .out_b(b));

  always #5 clk = ~clk;
  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int cl(input int a); return a < 0 ? 0 : (a > 255 ? 255 : a); endfunction
  function automatic int fdiv256(input int a);
    return (a >= 0) ? a / 256 : -((-a + 255) / 256);
  endfunction

  task automatic apply(input int yy, input int uu, input int vv,
                       input int er, input int eg, input int eb);
    y = 8'(yy); u = 8'(uu); v = 8'(vv); in_valid = 1;
    @(posedge clk); #1;
    in_valid = 0;
    checks++;
    if (!out_valid || r != 8'(er) || g != 8'(eg) || b != 8'(eb)) begin
      failures++;
      $display("FAIL yuv=%0d,%0d,%0d got %0d,%0d,%0d exp %0d,%0d,%0d",
               yy, uu, vv, r, g, b, er, eg, eb);
    end
  endtask

  initial begin
    repeat (2) @(posedge clk); rst_n = 1; @(posedge clk); #1;
    apply(100, 128, 128, 100, 100, 100);
    apply(128, 128, 255, 255, 37, 128);     // R: 128+178=306 -> 255; G: 128-91 = 37
    apply(128, 0, 128, 128, 172, 0);        // G: 128+44; B: 128-227 -> 0
    for (int i = 0; i < 2000; i++) begin
      automatic int yy = $urandom_range(0, 255), uu = $urandom_range(0, 255), vv = $urandom_range(0, 255);
      apply(yy, uu, vv,
            cl(yy + fdiv256(359 * (vv - 128) + 128)),
            cl(yy + fdiv256(-88 * (uu - 128) - 183 * (vv - 128) + 128)),
            cl(yy + fdiv256(454 * (uu - 128) + 128)));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
