// tb_dbge_corr_stage: a 1.5 bit stage at weight 2^4 with one calibrated stage
// below it (NLOW = 1), over a back end whose codes for one digit span only
// 0..13 (so each boundary shows a 3-code gap in the raw sample). The
// testbench drives the digit, the lower stage's decision (random, 0..2) and
// its two constant corrections, and the lower raw and corrected samples. It
// keeps its own min/max, tags and histogram per boundary for the first
// window, computes the super-bin estimate, and checks every clock: the raw CAT, the
// corrections c_b = g_b - 1 LSB + cor(tag0) - cor(tag1), the corrected output
// y_in + d*2^(K+F) minus the corrections, and that cor_en = 0 leaves the
// sample uncorrected.
module tb_dbge_corr_stage;
  localparam int F = 6, K = 4, WIN = 3000, S = 2;
  localparam int ONE = 1 << F;
  localparam int CL0 = 5 * ONE + 3, CL1 = 9 * ONE + 17;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  logic train_en, cor_en, valid;
  logic [1:0] d;
  logic [1:0] d_low [1];
  logic signed [21:0] c_low [2];
  logic [13:0] x_in, x_out;
  logic signed [21:0] y_in, y_out, c_lo, c_hi;
  logic [1:0] est_valid;
  logic update;

  dbge_corr_stage #(.K(K), .NDEC(2), .NLOW(1), .W(14), .F(F), .WIN(WIN), .SPREAD(S)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    #10000000 failures++; $display("watchdog"); $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  int mn [2], mx [2], t1 [2], t0 [2];
  bit s1 [2], s0 [2];
  int h1 [2][int];
  int h0 [2][int];
  int cnt, c_exp [2], g_exp [2], nupd;
  bit have;

  function automatic int ratio(int n, int dd);
    if (dd == 0 || n >= dd) return ONE;
    return (n * ONE) / dd;
  endfunction

  function automatic int lowcor(int t);
    return (t >= 1 ? CL0 : 0) + (t >= 2 ? CL1 : 0);
  endfunction

  initial begin
    train_en = 1; cor_en = 1; valid = 0; d = 0; x_in = 0; y_in = 0; d_low[0] = 0;
    c_low[0] = 22'(CL0); c_low[1] = 22'(CL1);
    cnt = 0; have = 0; nupd = 0;
    for (int b = 0; b < 2; b++) begin s1[b] = 0; s0[b] = 0; mn[b] = 0; mx[b] = 0; t1[b] = 0; t0[b] = 0; end
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < WIN + 200; n++) begin
      int r, xo, yexp, cl, ch;
      @(negedge clk);
      valid    = 1;
      cor_en   = (n % 7 != 3);
      d        = 2'($urandom_range(0, 2));
      d_low[0] = 2'($urandom_range(0, 2));
      r        = $urandom_range(0, 13);
      x_in     = 14'(r + 8);
      y_in     = 22'((r + 8) * ONE + 3);
      xo       = r + 8 + int'(d) * 16;
      if (cnt < WIN) begin
        for (int b = 0; b < 2; b++) begin
          if (d == 2'(b + 1)) begin
            if (!s1[b] || xo < mn[b]) begin mn[b] = xo; t1[b] = d_low[0]; end
            s1[b] = 1;
            if (h1[b].exists(xo)) h1[b][xo]++; else h1[b][xo] = 1;
          end
          if (d == 2'(b)) begin
            if (!s0[b] || xo > mx[b]) begin mx[b] = xo; t0[b] = d_low[0]; end
            s0[b] = 1;
            if (h0[b].exists(xo)) h0[b][xo]++; else h0[b][xo] = 1;
          end
        end
        cnt++;
        if (cnt == WIN) for (int b = 0; b < 2; b++) begin
          int hn1, hf1, hn0, hf0;
          hn1 = 0; hf1 = 0; hn0 = 0; hf0 = 0;
          for (int c = 0; c < S; c++) begin
            if (h1[b].exists(mn[b] + c))     hn1 += h1[b][mn[b] + c];
            if (h1[b].exists(mn[b] + S + c)) hf1 += h1[b][mn[b] + S + c];
            if (h0[b].exists(mx[b] - c))     hn0 += h0[b][mx[b] - c];
            if (h0[b].exists(mx[b] - S - c)) hf0 += h0[b][mx[b] - S - c];
          end
          g_exp[b] = (mn[b] * ONE + S * (ONE - ratio(hn1, hf1))) - (mx[b] * ONE - S * (ONE - ratio(hn0, hf0)));
          c_exp[b] = g_exp[b] - ONE + lowcor(t0[b]) - lowcor(t1[b]);
        end
      end
      #1;
      checks++;
      if (int'(x_out) != xo) begin failures++; $display("raw cat %0d vs %0d", x_out, xo); end
      cl = have ? c_exp[0] : 0;
      ch = have ? c_exp[1] : 0;
      checks++;
      if (int'(c_lo) != cl || int'(c_hi) != ch) begin failures++; $display("c %0d/%0d exp %0d/%0d", c_lo, c_hi, cl, ch); end
      yexp = int'(y_in) + int'(d) * 16 * ONE;
      if (cor_en && d >= 1) yexp -= cl;
      if (cor_en && d == 2) yexp -= ch;
      checks++;
      if (int'(y_out) != yexp) begin failures++; $display("y %0d exp %0d", y_out, yexp); end
      @(posedge clk); #1;
      if (update) begin nupd++; have = 1; end
    end
    checks++;
    if (!have || est_valid != 2'b11) begin failures++; $display("no estimate"); end
    checks++;
    // the back end spans 14 of 16 codes: the gap is about 3 codes at each boundary
    if (g_exp[0] < 2 * ONE || g_exp[0] > 4 * ONE || g_exp[1] < 2 * ONE || g_exp[1] > 4 * ONE) begin
      failures++; $display("reference gap %0d %0d", g_exp[0], g_exp[1]);
    end
    $display("gaps %0d %0d /64, corrections %0d %0d /64", g_exp[0], g_exp[1], c_exp[0], c_exp[1]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
