// tb_dbge_calibrator: an 8-stage 1.5 bit/stage converter, modelled in the
// testbench (its own residue equations, not the adc_stage model), with
// capacitor mismatch and low op-amp gain in the three most significant stages,
// which are calibrated. Phases:
//   1. training on a uniform full-scale input for four windows;
//   2. frozen estimates (train_en = 0): a fresh uniform input is converted and
//      both codes are compared with a straight-line fit to the input; the
//      calibrated code must be linear to about one code while the raw one
//      is not, and the estimates must not change;
//   3. cor_en = 0: the output must equal the raw code;
//   4. drift: the mismatch and gain of two calibrated stages change; with the
//      old estimates the calibrated code must be clearly non-linear, and after
//      three more training windows it must be linear again with changed
//      estimates.
// The spread is 1 code: the lowest calibrated stage (k = 5) has its nearest
// lower-stage boundary only about 2^(k-3) = 4 codes from its edges.
// Throughout, raw_out must equal sum(d_i*2^i) of the decisions and every
// output must come 2 clocks after its input.
module tb_dbge_calibrator;
  localparam int N = 8, NC = 3, WIN = 4000, F = 6;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  logic train_en, cor_en, dec_valid, y_valid, est_update, all_valid;
  dbge_pkg::dec_t dec [N];
  logic [N:0] raw_out;
  logic signed [N+F+2:0] y_out;
  logic signed [N+F+2:0] corr [2*NC];

  dbge_calibrator #(.NSTAGES(N), .NCORR(NC), .NDEC(2), .F(F), .WIN(WIN), .SPREAD(1)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    #50000000 failures++; $display("watchdog"); $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  // converter model: per-stage mismatch and gain (index 0 = last stage)
  real mm [N] = '{0.0, 0.0, 0.0, 0.0, 0.0, 0.02, -0.03, 0.04};
  real ga [N] = '{1e9, 1e9, 1e9, 1e9, 1e9, 80.0, 1e9, 150.0};

  function automatic void convert(real vin, output dbge_pkg::dec_t dd [N]);
    real v = vin;
    for (int i = N - 1; i >= 0; i--) begin
      int di;
      real r;
      di = (v > 0.25) ? 2 : (v > -0.25) ? 1 : 0;
      dd[i] = 2'(di);
      r = 1.0 + mm[i];
      v = ((1.0 + r) * v - r * (real'(di) - 1.0)) / (1.0 + (1.0 + r) / ga[i]);
    end
  endfunction

  // expected raw codes in flight (2-cycle latency)
  int pipe_raw [2];
  bit pipe_v [2];
  real pipe_vin [2];
  int nupd;

  // line-fit accumulators for phase 2
  real sx, sxx, sy_r, sxy_r, sy_c, sxy_c;
  real xs [$], yr [$], yc [$];
  bit collect, nocor;

  task automatic step(real vin, bit v);
    dbge_pkg::dec_t dd [N];
    int raw;
    @(negedge clk);
    convert(vin, dd);
    raw = 0;
    for (int i = 0; i < N; i++) raw += int'(dd[i]) << i;
    dec = dd;
    dec_valid = v;
    pipe_raw[0] = raw; pipe_v[0] = v; pipe_vin[0] = vin;
    @(posedge clk); #1;
    if (est_update) nupd++;
    // output of the sample presented in the previous cycle: it was taken at
    // the last edge but one, so it appears two cycles after it was presented
    checks++;
    if (y_valid !== pipe_v[1]) begin failures++; $display("y_valid latency"); end
    if (pipe_v[1] && y_valid) begin
      checks++;
      if (int'(raw_out) != pipe_raw[1]) begin failures++; $display("raw_out %0d exp %0d", raw_out, pipe_raw[1]); end
      if (nocor) begin
        checks++;
        if (int'(y_out) != pipe_raw[1] << F) begin failures++; $display("cor_en=0 but y=%0d raw=%0d", y_out, pipe_raw[1]); end
      end
      if (collect) begin
        xs.push_back(pipe_vin[1]);
        yr.push_back(real'(raw_out));
        yc.push_back(real'(y_out) / real'(1 << F));
      end
    end
    pipe_raw[1] = pipe_raw[0]; pipe_v[1] = pipe_v[0]; pipe_vin[1] = pipe_vin[0];
  endtask

  function automatic real maxdev(real y [$]);
    real n, mx_, my, sxy, sxx2, a, b, m;
    n = real'(xs.size());
    mx_ = 0; my = 0;
    foreach (xs[i]) begin mx_ += xs[i]; my += y[i]; end
    mx_ /= n; my /= n;
    sxy = 0; sxx2 = 0;
    foreach (xs[i]) begin sxy += (xs[i] - mx_) * (y[i] - my); sxx2 += (xs[i] - mx_) ** 2; end
    a = sxy / sxx2; b = my - a * mx_;
    m = 0;
    foreach (xs[i]) if ((y[i] - a * xs[i] - b) ** 2 > m * m) m = (y[i] - a * xs[i] - b) < 0 ? -(y[i] - a * xs[i] - b) : (y[i] - a * xs[i] - b);
    return m;
  endfunction

  function automatic real uni();
    return real'($urandom_range(0, 1000000)) / 1000000.0 * 1.96 - 0.98;
  endfunction

  initial begin
    logic signed [N+F+2:0] corr_frozen [2*NC];
    real dr, dc;
    train_en = 1; cor_en = 1; dec_valid = 0; nupd = 0; collect = 0; nocor = 0;
    for (int i = 0; i < N; i++) dec[i] = '0;
    for (int k = 0; k < 2; k++) begin pipe_v[k] = 0; pipe_raw[k] = 0; pipe_vin[k] = 0.0; end
    repeat (3) @(posedge clk);
    rst_n = 1;
    // 1. training
    for (int n = 0; n < 4 * WIN + 20; n++) step(uni(), 1'b1);
    checks++;
    if (!all_valid) begin failures++; $display("estimates missing after training"); end
    // 2. frozen, measure linearity
    train_en = 0;
    corr_frozen = corr;
    collect = 1;
    for (int n = 0; n < WIN + 20; n++) step(uni(), ($urandom_range(0, 9) != 0));
    collect = 0;
    for (int k = 0; k < 2 * NC; k++) begin
      checks++;
      if (corr[k] != corr_frozen[k]) begin failures++; $display("estimate changed while frozen"); end
    end
    dr = maxdev(yr);
    dc = maxdev(yc);
    $display("max deviation from a straight line: raw %0.2f codes, calibrated %0.2f codes", dr, dc);
    checks++;
    if (dc > 1.5) begin failures++; $display("calibrated code not linear"); end
    checks++;
    if (dr < 3.0 * dc) begin failures++; $display("raw code unexpectedly linear"); end
    // 3. correction off
    cor_en = 0;
    step(uni(), 1'b1); step(uni(), 1'b1);
    nocor = 1;
    for (int n = 0; n < 200; n++) step(uni(), 1'b1);
    nocor = 0;
    checks++;
    if (nupd < 4) begin failures++; $display("too few estimate updates: %0d", nupd); end
    // 4. drift
    cor_en = 1;
    mm[7] = -0.02; ga[5] = 60.0; mm[6] = -0.01;
    xs.delete(); yr.delete(); yc.delete();
    collect = 1;
    for (int n = 0; n < WIN; n++) step(uni(), 1'b1);
    collect = 0;
    dc = maxdev(yc);
    $display("after drift, old estimates: calibrated %0.2f codes", dc);
    checks++;
    if (dc < 3.0) begin failures++; $display("drift did not show"); end
    train_en = 1;
    for (int n = 0; n < 3 * WIN + 20; n++) step(uni(), 1'b1);
    train_en = 0;
    xs.delete(); yr.delete(); yc.delete();
    collect = 1;
    for (int n = 0; n < WIN; n++) step(uni(), 1'b1);
    collect = 0;
    dc = maxdev(yc);
    $display("after drift, retrained: calibrated %0.2f codes", dc);
    checks++;
    if (dc > 1.5) begin failures++; $display("calibration did not follow the drift"); end
    checks++;
    if (corr[2 * NC - 1] == corr_frozen[2 * NC - 1]) begin failures++; $display("top estimate did not change"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
