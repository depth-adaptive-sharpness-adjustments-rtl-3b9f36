// tb_video_timing_generator: runs a small raster (40 active of 52 clocks per
// line, 10 active of 16 lines, offsets 2*52+4 and 2*52+6) for two frames and
// checks every clock: fetch enable, coordinates and the repeated last line,
// frame-start pulse, that the centre and display coordinates equal the fetch
// position delayed by their offsets, de, and the hsync / vsync windows
// (pulse widths and counts per frame).
module tb_video_timing_generator;
  import dase_pkg::*;
  localparam int HA = 40, VA = 10, HT = 52, VT = 16, HFP = 4, HSW = 3, VFP = 1, VSW = 2;
  localparam int OC = 2 * HT + 4, OD = 2 * HT + 6, TOT = HT * VT;
  logic clk = 0, rst_n = 0;
  logic f_en, f_start, c_act, de, hsync, vsync;
  logic [11:0] f_x, f_y, c_x, c_y, d_x, d_y;
  int checks = 0, failures = 0, nhs = 0, nvs_lines = 0, nstart = 0;

  video_timing_generator #(.HA(HA), .VA(VA), .HT(HT), .VT(VT), .HFP(HFP), .HSW(HSW),
                           .VFP(VFP), .VSW(VSW), .OFF_C(OC), .OFF_D(OD)) dut (.*);

  always #5 clk = ~clk;
  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(posedge clk); #1; rst_n = 1;
    for (int t = 0; t < 2 * TOT; t++) begin
      automatic int fh = t % HT, fv = (t / HT) % VT;
      automatic int cp = (t - OC + 4 * TOT) % TOT, dp = (t - OD + 4 * TOT) % TOT;
      automatic int ch = cp % HT, cv = cp / HT, dh = dp % HT, dv = dp / HT;
      checks++;
      if (f_en != (fh < HA && fv < VA + 2) || f_x != 12'(fh) || f_y != 12'(fv < VA ? fv : VA - 1) ||
          f_start != (fh == 0 && fv == 0) ||
          c_x != 12'(ch) || c_y != 12'(cv) || c_act != (ch < HA && cv < VA) ||
          d_x != 12'(dh) || d_y != 12'(dv) || de != (dh < HA && dv < VA) ||
          hsync != (dh >= HA + HFP && dh < HA + HFP + HSW) ||
          vsync != (dv >= VA + VFP && dv < VA + VFP + VSW)) begin
        failures++;
        if (failures < 10) $display("FAIL t%0d f %0d,%0d c %0d,%0d d %0d,%0d", t, f_x, f_y, c_x, c_y, d_x, d_y);
      end
      nhs += hsync;
      nstart += f_start;
      if (vsync && d_x == 0) nvs_lines++;
      @(posedge clk); #1;
    end
    checks += 3;
    if (nhs != 2 * VT * HSW) begin failures++; $display("FAIL hsync clocks %0d", nhs); end
    if (nvs_lines != 2 * VSW) begin failures++; $display("FAIL vsync lines %0d", nvs_lines); end
    if (nstart != 2) begin failures++; $display("FAIL frame starts %0d", nstart); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
