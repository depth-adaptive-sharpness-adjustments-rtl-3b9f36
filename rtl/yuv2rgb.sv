// yuv2rgb: YUV 4:4:4 to RGB 4:4:4 converter at the output of the design.
//
// One pixel per clock, one register stage: out_* follows in_* by one cycle.
// The source design only names the converter; the coefficients are this
// design's choice, the inverse of full-range ITU-R BT.601 in 8-bit fixed point:
//   R = Y + ((359 (V-128) + 128) >> 8)
//   G = Y + ((-88 (U-128) - 183 (V-128) + 128) >> 8)
//   B = Y + ((454 (U-128) + 128) >> 8)
// with arithmetic shifts and results clamped to 0..255.
module yuv2rgb
  import dase_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  logic       in_valid,
  input  pix_t       in_y, in_u, in_v,
  output logic       out_valid,
  output pix_t       out_r, out_g, out_b
);

  function automatic pix_t clamp8(input logic signed [19:0] v);
    if (v < 0)        return 8'd0;
    else if (v > 255) return 8'd255;
    else              return v[7:0];
  endfunction

  logic signed [19:0] y, u, v, r_s, g_s, b_s;

  always_comb begin
    y   = {12'd0, in_y};
    u   = {12'd0, in_u} - 20'sd128;
    v   = {12'd0, in_v} - 20'sd128;
    r_s = y + ((359 * v + 128) >>> 8);
    g_s = y + ((-88 * u - 183 * v + 128) >>> 8);
    b_s = y + ((454 * u + 128) >>> 8);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      out_r     <= '0;
      out_g     <= '0;
      out_b     <= '0;
    end else begin
      out_valid <= in_valid;
      out_r     <= clamp8(r_s);
      out_g     <= clamp8(g_s);
      out_b     <= clamp8(b_s);
    end
  end

endmodule
