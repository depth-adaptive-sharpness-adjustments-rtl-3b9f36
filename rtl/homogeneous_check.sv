// homogeneous_check: flags a matching block whose texture is too flat for a
// trustworthy block match.
//
// The source design names a "homogeneous region checking" stage that runs
// before each block search, but does not say how it decides. This design
// takes the simplest measure: the block's luminance range. Rows of the block
// arrive as RD_PAR-pixel words (only the first BW pixels count); start clears
// the running maximum and minimum, in_last marks the last row. One cycle after
// the last row, done pulses with homog = (max - min < TH). A flagged block's
// disparity is later replaced by the median of its neighbours.
module homogeneous_check
  import dase_pkg::*;
#(
  parameter int unsigned BW = 8,
  parameter int unsigned NP = RD_PAR,
  parameter int unsigned TH = HOM_TH
) (
  input  logic clk,
  input  logic rst_n,
  input  logic start,
  input  logic in_valid,
  input  logic in_last,
  input  pix_t in_pix [NP],
  output logic done,
  output logic homog,
  output pix_t range_o
);

  pix_t mx, mn, row_mx, row_mn;

  always_comb begin
    row_mx = in_pix[0];
    row_mn = in_pix[0];
    for (int i = 1; i < BW; i++) begin
      if (in_pix[i] > row_mx) row_mx = in_pix[i];
      if (in_pix[i] < row_mn) row_mn = in_pix[i];
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      mx <= '0; mn <= '1; done <= 1'b0; homog <= 1'b0; range_o <= '0;
    end else begin
      done <= 1'b0;
      if (start) begin
        mx <= '0;
        mn <= '1;
      end else if (in_valid) begin
        automatic pix_t nmx = (row_mx > mx) ? row_mx : mx;
        automatic pix_t nmn = (row_mn < mn) ? row_mn : mn;
        mx <= nmx;
        mn <= nmn;
        if (in_last) begin
          done    <= 1'b1;
          range_o <= nmx - nmn;
          homog   <= (int'(nmx - nmn) < int'(TH));
        end
      end
    end
  end

endmodule
