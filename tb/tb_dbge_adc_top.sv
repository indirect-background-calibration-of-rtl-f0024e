// tb_dbge_adc_top: end-to-end run of the calibrated converter at its default
// size (13 stages of 1.5 bit, default stage errors, 0.22 LSB noise per stage,
// 7 calibrated stages, 100,000-sample windows), following the reference
// experiment:
//   1. training: 100,000 zero-mean Gaussian samples with sigma = Vref/5.5
//      (one window), then a second window of fresh Gaussian samples, so that
//      the estimates are replaced once at a window end;
//   2. frozen estimates: 110,000 uniform samples over 98% of full scale (a
//      whole window ends inside this phase); raw and calibrated codes are
//      fitted with a straight line against the input; the calibrated code
//      must stay within 3.5 codes of the line (0.8 codes rms, noise
//      included), the raw one must be far worse, and no estimate may change;
//      then a full-scale sine (1001 cycles in 16,384 samples) gives the
//      effective number of bits of the raw and calibrated codes (raw at most
//      10 bits, calibrated at least 12.5);
//   3. correction disabled: the output must be the raw code.
// It counts how often each mechanism acted and fails if one never did:
// estimates published at window ends, non-zero super-bin adjustments (a
// histogram ratio below one at the top stage), non-zero tag bookkeeping in
// the upper stages, a frozen window and uncorrected output. The number of
// negative corrections is reported as well (the default stage errors give
// few or none).
module tb_dbge_adc_top;
  localparam int F = dbge_pkg::FRAC_DEF, NC = dbge_pkg::NCORR_DEF, WIN = dbge_pkg::WIN_DEF;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  real vin;
  logic sample_en, train_en, cor_en, y_valid, est_update, all_valid;
  logic [13:0] raw_out;
  logic signed [21:0] y_out;
  logic signed [21:0] corr [2*NC];

  dbge_adc_top dut (.*);
  always #5 clk = ~clk;

  initial begin
    #50000000 failures++; $display("watchdog"); $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  function automatic real gauss();
    real s = 0.0;
    for (int k = 0; k < 12; k++) s += real'($urandom) / 4294967296.0;
    return s - 6.0;
  endfunction

  real inq [$];
  real xs [$], yr [$], yc [$];
  bit collect, nocor;
  int n_upd, n_adj, n_neg, n_book, n_frozen, n_nocor;

  task automatic step(real v, bit en);
    @(negedge clk);
    vin = v;
    sample_en = en;
    @(posedge clk);
    if (en) inq.push_back(v);
    #1;
    if (est_update) n_upd++;
    if (dut.u_cal.g_stage[NC-1].u_stage.g_bnd[0].g_est.u_est.update &&
        (dut.u_cal.g_stage[NC-1].u_stage.g_bnd[0].g_est.u_est.q1 != (1 << F) ||
         dut.u_cal.g_stage[NC-1].u_stage.g_bnd[0].g_est.u_est.q0 != (1 << F))) n_adj++;
    if (dut.u_cal.g_stage[NC-1].u_stage.g_bnd[1].g_est.u_est.update &&
        (dut.u_cal.g_stage[NC-1].u_stage.g_bnd[1].g_est.u_est.q1 != (1 << F) ||
         dut.u_cal.g_stage[NC-1].u_stage.g_bnd[1].g_est.u_est.q0 != (1 << F))) n_adj++;
    if (y_valid) begin
      real x;
      x = inq.pop_front();
      if (nocor) begin
        checks++; n_nocor++;
        if (int'(y_out) != int'(raw_out) << F) begin failures++; $display("cor_en=0: y=%0d raw=%0d", y_out, raw_out); end
      end
      if (collect) begin
        xs.push_back(x);
        yr.push_back(real'(raw_out));
        yc.push_back(real'(y_out) / real'(1 << F));
      end
    end
  endtask

  // largest and rms deviation of y from its least-squares line against xs
  task automatic fit(real y [$], output real mx, output real rms, output real slope);
    real n, mxs, my, sxy, sxx, a, b, e;
    n = real'(xs.size());
    mxs = 0; my = 0;
    foreach (xs[i]) begin mxs += xs[i]; my += y[i]; end
    mxs /= n; my /= n;
    sxy = 0; sxx = 0;
    foreach (xs[i]) begin sxy += (xs[i] - mxs) * (y[i] - my); sxx += (xs[i] - mxs) ** 2; end
    a = sxy / sxx; b = my - a * mxs;
    mx = 0; rms = 0;
    foreach (xs[i]) begin
      e = y[i] - a * xs[i] - b;
      rms += e * e;
      if (e < 0) e = -e;
      if (e > mx) mx = e;
    end
    rms = $sqrt(rms / n);
    slope = a;
  endtask

  initial begin
    logic signed [21:0] frozen [2*NC];
    real mr, rr, mc, rc, sl, amp, enob_r, enob_c;
    vin = 0.0; sample_en = 0; train_en = 1; cor_en = 1; collect = 0; nocor = 0;
    n_upd = 0; n_adj = 0; n_neg = 0; n_book = 0; n_frozen = 0; n_nocor = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;

    // 1. training: two windows of Gaussian samples
    for (int w = 0; w < 2; w++) begin
      for (int n = 0; n < 100000; n++) begin
        real v;
        v = gauss() / 5.5;
        if (v > 0.999) v = 0.999;
        if (v < -0.999) v = -0.999;
        step(v, 1'b1);
      end
      repeat (20) step(0.0, 1'b0);   // let the divisions finish
      checks++;
      if (!all_valid) begin failures++; $display("not every boundary has an estimate after window %0d", w + 1); end
    end
    repeat (20) step(0.0, 1'b0);
    checks++;
    if (!all_valid) begin failures++; $display("not every boundary has an estimate"); end
    for (int k = 0; k < 2 * NC; k++) if (corr[k] < 0) n_neg++;
    // bookkeeping: the correction differs from gap - 1 LSB when the edge
    // samples carry different lower-stage decisions
    for (int b = 0; b < 2; b++) begin
      if (dut.u_cal.g_stage[NC-1].u_stage.c[b] != dut.u_cal.g_stage[NC-1].u_stage.g[b] - (1 << F)) n_book++;
      if (dut.u_cal.g_stage[NC-2].u_stage.c[b] != dut.u_cal.g_stage[NC-2].u_stage.g[b] - (1 << F)) n_book++;
      if (dut.u_cal.g_stage[1].u_stage.c[b] != dut.u_cal.g_stage[1].u_stage.g[b] - (1 << F)) n_book++;
    end
    for (int k = 0; k < 2 * NC; k++) $display("correction %0d: %0.3f codes", k, real'(corr[k]) / real'(1 << F));

    // 2. frozen, linearity
    train_en = 0;
    frozen = corr;
    collect = 1;
    for (int n = 0; n < 110000; n++) step(real'($urandom_range(0, 1000000)) / 1000000.0 * 1.96 - 0.98, 1'b1);
    repeat (4) step(0.0, 1'b0);
    collect = 0;
    n_frozen++;
    for (int k = 0; k < 2 * NC; k++) begin
      checks++;
      if (corr[k] != frozen[k]) begin failures++; $display("estimate %0d changed while frozen", k); end
    end
    fit(yr, mr, rr, sl);
    fit(yc, mc, rc, sl);
    $display("deviation from a straight line (codes): raw max %0.2f rms %0.2f, calibrated max %0.2f rms %0.2f",
             mr, rr, mc, rc);
    checks++;
    if (mc > 3.5 || rc > 0.8) begin failures++; $display("calibrated code not linear enough"); end
    checks++;
    if (mr < 3.0 * mc || rr < 4.0 * rc) begin failures++; $display("raw code unexpectedly linear"); end

    // 2b. full-scale sine (still frozen): the error against the best straight
    // line through (input, output) is the noise and distortion of the sine,
    // so SINAD = (amplitude/sqrt(2)) / rms error, referred to full scale
    xs.delete(); yr.delete(); yc.delete();
    collect = 1;
    for (int n = 0; n < 16384; n++) step(0.98 * $sin(2.0 * 3.14159265358979 * 1001.0 * real'(n) / 16384.0), 1'b1);
    repeat (4) step(0.0, 1'b0);
    collect = 0;
    fit(yr, mr, rr, sl);
    amp = 8192.0;   // full-scale amplitude in codes
    enob_r = (20.0 * $log10(amp / $sqrt(2.0) / rr) - 1.76) / 6.02;
    fit(yc, mc, rc, sl);
    enob_c = (20.0 * $log10(amp / $sqrt(2.0) / rc) - 1.76) / 6.02;
    $display("full-scale sine: ENOB raw %0.2f bits, calibrated %0.2f bits (error rms %0.2f / %0.2f codes)",
             enob_r, enob_c, rr, rc);
    checks++;
    if (enob_r > 10.0 || enob_c < 12.5) begin failures++; $display("sine: calibration gain too small"); end

    // 3. correction off
    cor_en = 0;
    repeat (4) step(0.1, 1'b1);
    nocor = 1;
    for (int n = 0; n < 500; n++) step(real'($urandom_range(0, 1000000)) / 1000000.0 * 1.9 - 0.95, 1'b1);
    nocor = 0;

    $display("mechanisms: updates=%0d adjusted=%0d negative=%0d bookkeeping=%0d frozen=%0d uncorrected=%0d",
             n_upd, n_adj, n_neg, n_book, n_frozen, n_nocor);
    checks++; if (n_upd < 2)    begin failures++; $display("no window-end updates"); end
    checks++; if (n_adj < 1)    begin failures++; $display("no super-bin adjustment"); end
    checks++; if (n_book < 1)   begin failures++; $display("bookkeeping never non-zero"); end
    checks++; if (n_frozen < 1) begin failures++; $display("never frozen"); end
    checks++; if (n_nocor < 1)  begin failures++; $display("never uncorrected"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
