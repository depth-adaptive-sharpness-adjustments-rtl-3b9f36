// rgb2yuv: RGB 4:4:4 to YUV 4:4:4 colour converter at the input of the design.
//
// One pixel per clock, one register stage: out_* is valid one cycle after
// in_*. The source design only names this converter; the coefficients are this
// design's choice, full-range ITU-R BT.601 in 8-bit fixed point:
//   Y = (77 R + 150 G + 29 B + 128) >> 8
//   U = ((-43 R - 85 G + 128 B + 128) >> 8) + 128
//   V = ((128 R - 107 G - 21 B + 128) >> 8) + 128
// with results clamped to 0..255.
module rgb2yuv
  import dase_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  logic       in_valid,
  input  pix_t       in_r, in_g, in_b,
  output logic       out_valid,
  output pix_t       out_y, out_u, out_v
);

  function automatic pix_t clamp8(input logic signed [19:0] v);
    if (v < 0)        return 8'd0;
    else if (v > 255) return 8'd255;
    else              return v[7:0];
  endfunction

  logic signed [19:0] r, g, b, y_s, u_s, v_s;

  always_comb begin
    r   = {12'd0, in_r};
    g   = {12'd0, in_g};
    b   = {12'd0, in_b};
    y_s = (77 * r + 150 * g + 29 * b + 128) >>> 8;
    u_s = ((-43 * r - 85 * g + 128 * b + 128) >>> 8) + 128;
    v_s = ((128 * r - 107 * g - 21 * b + 128) >>> 8) + 128;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      out_y     <= '0;
      out_u     <= '0;
      out_v     <= '0;
    end else begin
      out_valid <= in_valid;
      out_y     <= clamp8(y_s);
      out_u     <= clamp8(u_s);
      out_v     <= clamp8(v_s);
    end
  end

endmodule
