// histogram_analyzer: finds the foreground/background disparity threshold
// from the histogram of the block disparity map.
//
// Steps, one bin or one map entry per clock, as the source design describes:
//   1. build the 256-bin histogram H of the DV codes (ROWS*COLS clocks);
//   2. d_S: first d from the left with H(d)+...+H(d+4) > theta, where theta is
//      3 % of the number of blocks; d_E: first d from the right with
//      H(d)+...+H(d-4) > theta;
//   3. split [d_S, d_E] at 4:6, s0 = d_S + 4(d_E - d_S)/10: the left part is
//      the background group, the right part the foreground group;
//   4. p_B, p_F: the highest bin of each group (first one on ties);
//   5. delta = p_B + 4(p_F - p_B)/10, the new split at the same 4:6 ratio.
// Blocks with code >= delta are foreground. If no window passes theta, d_S
// falls back to 0 and d_E to 255 (this design's choice), and "delta is placed
// 4:6 between the peaks" is read from the figure of the source design, whose
// example (p_B about 92, p_F about 178, delta = 127) agrees with it.
// start begins; done pulses when delta is valid. Run time about
// ROWS*COLS + 3*256 clocks at most.
module histogram_analyzer
  import dase_pkg::*;
#(
  parameter int unsigned ROWS = (V_ACT + SLICE_LINES - 1) / SLICE_LINES,
  parameter int unsigned COLS = H_ACT / 2 / MB_SIZE
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       start,
  output logic       busy,
  output logic       done,
  output logic [7:0] rd_row,
  output logic [7:0] rd_col,
  input  dv_entry_t  rd_data,
  output logic [7:0] d_s,
  output logic [7:0] d_e,
  output logic [7:0] split0,
  output logic [7:0] p_b,
  output logic [7:0] p_f,
  output logic [7:0] delta
);

  localparam int unsigned NBLK  = ROWS * COLS;
  localparam int unsigned THETA = NBLK * THETA_PCT / 100;

  typedef enum logic [2:0] { S_IDLE, S_CLR, S_HIST, S_FS, S_FE, S_SPLIT, S_PEAK, S_DELTA } st_t;
  st_t state;

  logic [15:0] hist [256];
  logic [8:0]  d;
  logic [7:0]  r, c;
  logic [15:0] maxb, maxf;
  logic        found;

  // 5-bin window sums
  logic [18:0] sum_up, sum_dn;
  always_comb begin
    sum_up = '0;
    sum_dn = '0;
    for (int kk = 0; kk < 5; kk++) begin
      automatic int iu = int'(d) + kk;
      automatic int id = int'(d) - kk;
      if (iu <= 255) sum_up = sum_up + 19'(hist[iu[7:0]]);
      if (id >= 0)   sum_dn = sum_dn + 19'(hist[id[7:0]]);
    end
  end

  assign rd_row = r;
  assign rd_col = c;
  assign busy   = (state != S_IDLE);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= S_IDLE; done <= 1'b0; d <= '0; r <= '0; c <= '0;
      d_s <= '0; d_e <= 8'hff; split0 <= '0; p_b <= '0; p_f <= '0; delta <= 8'd128;
      maxb <= '0; maxf <= '0; found <= 1'b0;
      for (int i = 0; i < 256; i++) hist[i] <= '0;
    end else begin
      done <= 1'b0;
      unique case (state)
        S_IDLE: if (start) state <= S_CLR;
        S_CLR: begin
          for (int i = 0; i < 256; i++) hist[i] <= '0;
          r <= '0; c <= '0;
          state <= S_HIST;
        end
        S_HIST: begin
          hist[rd_data.code] <= hist[rd_data.code] + 16'd1;
          if (c == 8'(COLS - 1)) begin
            c <= '0;
            if (r == 8'(ROWS - 1)) begin
              d <= '0; found <= 1'b0; state <= S_FS;
            end else r <= r + 8'd1;
          end else c <= c + 8'd1;
        end
        S_FS: begin
          if (sum_up > 19'(THETA)) begin
            d_s <= d[7:0]; d <= 9'd255; state <= S_FE;
          end else if (d == 9'd251) begin
            d_s <= 8'd0; d <= 9'd255; state <= S_FE;
          end else d <= d + 9'd1;
        end
        S_FE: begin
          if (sum_dn > 19'(THETA)) begin
            d_e <= d[7:0]; state <= S_SPLIT;
          end else if (d == 9'd4) begin
            d_e <= 8'd255; state <= S_SPLIT;
          end else d <= d - 9'd1;
        end
        S_SPLIT: begin
          automatic int s = int'(d_s);
          if (d_e > d_s) s = int'(d_s) + (int'(d_e - d_s) * int'(SPLIT_NUM)) / int'(SPLIT_DEN);
          split0 <= 8'(s);
          p_b <= d_s; p_f <= 8'(s);
          maxb <= '0; maxf <= '0;
          d <= {1'b0, d_s};
          state <= S_PEAK;
        end
        S_PEAK: begin
          if (d[7:0] < split0) begin
            if (hist[d[7:0]] > maxb) begin maxb <= hist[d[7:0]]; p_b <= d[7:0]; end
          end else begin
            if (hist[d[7:0]] > maxf) begin maxf <= hist[d[7:0]]; p_f <= d[7:0]; end
          end
          if (d[7:0] >= d_e) state <= S_DELTA;
          else d <= d + 9'd1;
        end
        S_DELTA: begin
          automatic int t = int'(p_b);
          if (p_f > p_b) t = int'(p_b) + (int'(p_f - p_b) * int'(SPLIT_NUM)) / int'(SPLIT_DEN);
          delta <= 8'(t);
          done  <= 1'b1;
          state <= S_IDLE;
        end
        default: state <= S_IDLE;
      endcase
    end
  end

endmodule
