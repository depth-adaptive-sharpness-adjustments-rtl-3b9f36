// tb_bidirectional_check: self-checking testbench for bidirectional_check.
//
// Each trial builds a level-1 right view and left view (8 rows, W pixels),
// either random texture with the left view a shifted copy of the right (a
// consistent match, expected reliable) or with independent noise added (the
// reverse search can land elsewhere). It streams the 8 right rows as words
// from base - 1 and the 8 left rows as words from base + centre - 1, exactly
// as the disparity estimator does, then gives a forward result d from the
// set centre - 1 .. centre + 1. The expected outcome comes from a reverse SAD
// search written here: positions base - 1, base, base + 1 of the right view
// (those inside the line), ties to base, then base - 1, then base + 1;
// reliable when the best is base. Checks reliable, rev_d, the one-cycle
// latency after fwd_done, and that both outcomes occurred. Watchdog: 200000
// cycles.
module tb_bidirectional_check;
  import dase_pkg::*;
  localparam int W = 120, NP = 16;

  logic clk = 0, rst_n = 0, start = 0, r_valid = 0, l_valid = 0;
  logic fwd_done = 0, fwd_any = 0, done, reliable;
  logic signed [12:0] base = 0;
  logic signed [7:0] centre = 0, fwd_d = 0, rev_d;
  pix_t r_pix [NP], l_pix [NP];
  int checks = 0, failures = 0, n_rel = 0, n_unrel = 0;

  bidirectional_check #(.W(W), .NP(NP)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int R [8][W], L [8][W];
  function automatic int px(input int v, input int r, input int x);
    if (x < 0 || x >= W) return 0;
    return v ? R[r][x] : L[r][x];
  endfunction

  initial begin
    for (int i = 0; i < NP; i++) begin r_pix[i] = 0; l_pix[i] = 0; end
    repeat (3) @(posedge clk); rst_n = 1; @(posedge clk); #1;
    for (int t = 0; t < 400; t++) begin
      automatic int b = 8 * $urandom_range(0, W / 8 - 1);
      automatic int dtrue = int'($urandom_range(0, 12)) - 6;
      automatic int ctr = dtrue + int'($urandom_range(0, 2)) - 1;
      automatic int d = ctr + int'($urandom_range(0, 2)) - 1;
      automatic int noisy = (t % 3 == 0);
      automatic int best = 0, be = 0, any = 0, got_lat = -1;
      if (b + d < 0 || b + d + 8 > W) d = ctr;
      for (int r = 0; r < 8; r++) for (int x = 0; x < W; x++) R[r][x] = $urandom_range(0, 255);
      for (int r = 0; r < 8; r++) for (int x = 0; x < W; x++) begin
        automatic int v = (x - dtrue >= 0 && x - dtrue < W) ? R[r][x - dtrue] : 100;
        if (noisy) v = $urandom_range(0, 255);
        L[r][x] = v;
      end
      // reference reverse search
      for (int k = 0; k < 3; k++) begin
        automatic int e = (k == 0) ? 0 : ((k == 1) ? -1 : 1);
        if (b + e >= 0 && b + e + 8 <= W) begin
          automatic int s = 0;
          for (int r = 0; r < 8; r++) for (int i = 0; i < 8; i++) begin
            automatic int df = px(0, r, b + d + i) - px(1, r, b + e + i);
            s += df < 0 ? -df : df;
          end
          if (!any || s < best) begin best = s; be = e; any = 1; end
        end
      end
      base = 13'(b); centre = 8'(ctr); start = 1; @(posedge clk); #1; start = 0;
      for (int r = 0; r < 8; r++) begin
        for (int i = 0; i < NP; i++) r_pix[i] = 8'(px(1, r, b - 1 + i));
        r_valid = 1; @(posedge clk); #1;
      end
      r_valid = 0;
      for (int r = 0; r < 8; r++) begin
        for (int i = 0; i < NP; i++) l_pix[i] = 8'(px(0, r, b + ctr - 1 + i));
        l_valid = 1; @(posedge clk); #1;
      end
      l_valid = 0;
      fwd_d = 8'(d); fwd_any = 1; fwd_done = 1; @(posedge clk); #1; fwd_done = 0;
      checks++;
      if (!done) begin failures++; $display("FAIL t%0d no done one cycle after fwd_done", t); end
      checks++;
      if (reliable != (any && be == 0) || int'(rev_d) != -d + be) begin
        failures++;
        $display("FAIL t%0d b%0d d%0d: reliable %0d rev %0d, exp %0d rev %0d", t, b, d,
                 reliable, rev_d, any && be == 0, -d + be);
      end
      if (reliable) n_rel++; else n_unrel++;
      @(posedge clk); #1;
      checks++;
      if (done) begin failures++; $display("FAIL t%0d done longer than one cycle", t); end
    end
    // no valid forward result: never reliable
    start = 1; @(posedge clk); #1; start = 0;
    fwd_any = 0; fwd_d = 0; fwd_done = 1; @(posedge clk); #1; fwd_done = 0;
    checks++;
    if (reliable) begin failures++; $display("FAIL reliable without forward result"); end
    checks++;
    if (n_rel == 0 || n_unrel == 0) begin failures++; $display("FAIL outcomes rel %0d unrel %0d", n_rel, n_unrel); end
    $display("reliable %0d unreliable %0d", n_rel, n_unrel);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
