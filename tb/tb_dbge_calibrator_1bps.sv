// tb_dbge_calibrator_1bps: the calibrator in its 1 bit/stage form (NDEC = 1).
// An 8-stage 1 bit/stage converter is modelled in the testbench: each stage
// compares its input with 0 and passes on G*(v -/+ Vref/2). The three most
// significant stages have a gain G below 2 (1.90, 1.93, 1.95), so each of
// their decision boundaries leaves a run of missing codes; the back end is
// ideal (G = 2). After four training windows on a uniform input the
// estimates are frozen and a fresh uniform input is converted; the calibrated
// code must lie within 1.5 codes of a straight line while the raw code is far
// off, every correction must be positive (a radix below 2 can only open
// gaps), raw_out must be the binary sum of the decisions, and the output must
// follow its input by 2 clocks.
module tb_dbge_calibrator_1bps;
  localparam int N = 8, NC = 3, WIN = 4000, F = 6;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  logic train_en, cor_en, dec_valid, y_valid, est_update, all_valid;
  dbge_pkg::dec_t dec [N];
  logic [N-1:0] raw_out;
  logic signed [N+F+1:0] y_out;
  logic signed [N+F+1:0] corr [2*NC];

  dbge_calibrator #(.NSTAGES(N), .NCORR(NC), .NDEC(1), .F(F), .WIN(WIN), .SPREAD(2)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    #50000000 failures++; $display("watchdog"); $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  real ga [N] = '{2.0, 2.0, 2.0, 2.0, 2.0, 1.95, 1.93, 1.90};

  function automatic void convert(real vin, output dbge_pkg::dec_t dd [N]);
    real v = vin;
    for (int i = N - 1; i >= 0; i--) begin
      dd[i] = (v >= 0.0) ? 2'd1 : 2'd0;
      v = ga[i] * (v - ((v >= 0.0) ? 0.5 : -0.5));
    end
  endfunction

  int pipe_raw [2];
  bit pipe_v [2];
  real pipe_vin [2];
  real xs [$], yr [$], yc [$];
  bit collect;

  task automatic step(real vin);
    dbge_pkg::dec_t dd [N];
    int raw;
    @(negedge clk);
    convert(vin, dd);
    raw = 0;
    for (int i = 0; i < N; i++) raw += int'(dd[i]) << i;
    dec = dd;
    dec_valid = 1'b1;
    pipe_raw[0] = raw; pipe_v[0] = 1'b1; pipe_vin[0] = vin;
    @(posedge clk); #1;
    checks++;
    if (y_valid !== pipe_v[1]) begin failures++; $display("y_valid latency"); end
    if (pipe_v[1] && y_valid) begin
      checks++;
      if (int'(raw_out) != pipe_raw[1]) begin failures++; $display("raw_out %0d exp %0d", raw_out, pipe_raw[1]); end
      if (collect) begin
        xs.push_back(pipe_vin[1]);
        yr.push_back(real'(raw_out));
        yc.push_back(real'(y_out) / real'(1 << F));
      end
    end
    pipe_raw[1] = pipe_raw[0]; pipe_v[1] = pipe_v[0]; pipe_vin[1] = pipe_vin[0];
  endtask

  function automatic real maxdev(real y [$]);
    real n, mx_, my, sxy, sxx2, a, b, m, e;
    n = real'(xs.size());
    mx_ = 0; my = 0;
    foreach (xs[i]) begin mx_ += xs[i]; my += y[i]; end
    mx_ /= n; my /= n;
    sxy = 0; sxx2 = 0;
    foreach (xs[i]) begin sxy += (xs[i] - mx_) * (y[i] - my); sxx2 += (xs[i] - mx_) ** 2; end
    a = sxy / sxx2; b = my - a * mx_;
    m = 0;
    foreach (xs[i]) begin
      e = y[i] - a * xs[i] - b;
      if (e < 0) e = -e;
      if (e > m) m = e;
    end
    return m;
  endfunction

  function automatic real uni();
    return real'($urandom_range(0, 1000000)) / 1000000.0 * 1.96 - 0.98;
  endfunction

  initial begin
    real dr, dc;
    train_en = 1; cor_en = 1; dec_valid = 0; collect = 0;
    for (int i = 0; i < N; i++) dec[i] = '0;
    for (int k = 0; k < 2; k++) begin pipe_v[k] = 0; pipe_raw[k] = 0; pipe_vin[k] = 0.0; end
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < 4 * WIN + 20; n++) step(uni());
    checks++;
    if (!all_valid) begin failures++; $display("estimates missing after training"); end
    train_en = 0;
    for (int j = 0; j < NC; j++) begin
      $display("stage %0d: correction %0.3f codes", N - NC + j, real'(corr[2 * j]) / real'(1 << F));
      checks++;
      if (corr[2 * j] <= 0) begin failures++; $display("gap of stage %0d not positive", N - NC + j); end
    end
    collect = 1;
    for (int n = 0; n < WIN; n++) step(uni());
    collect = 0;
    dr = maxdev(yr);
    dc = maxdev(yc);
    $display("max deviation from a straight line: raw %0.2f codes, calibrated %0.2f codes", dr, dc);
    checks++;
    if (dc > 1.5) begin failures++; $display("calibrated code not linear"); end
    checks++;
    if (dr < 3.0 * dc) begin failures++; $display("raw code unexpectedly linear"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
