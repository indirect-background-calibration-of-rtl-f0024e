// tb_dbge_fig6: the single-boundary experiment behind the super-bin estimator.
// A uniform input v over -40..+40 codes is quantized after a shift of
// e1 = 4.25 codes is added to every sample at or above the boundary; a second
// run adds Gaussian noise of 0.5 LSB before quantization. With the boundary
// free of error, min{X1} - max{X0} would be 1 code, so the estimator should
// report e1 + 1 = 5.25 codes. The testbench checks, per window of 40,000
// samples, that
//   * without noise the published estimate is within 0.4 codes of 5.25 and
//     the minimum of X1 is 4, as the plain min/max estimator would find;
//   * with noise the min/max estimate (kept by the testbench) falls short by
//     more than a code, while the published super-bin estimate stays within
//     0.5 codes of 5.25.
module tb_dbge_fig6;
  localparam int F = 6, WIN = 40000, S = 4, NWIN = 4;
  localparam real E1 = 4.25, TRUE_G = E1 + 1.0;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  logic train_en, valid, upper, lower;
  logic [13:0] x;
  logic [1:0] tag, tag1, tag0;
  logic signed [21:0] gap;
  logic gap_valid, update;

  dbge_boundary_est #(.W(14), .F(F), .WIN(WIN), .SPREAD(S)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    #20000000 failures++; $display("watchdog"); $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  function automatic real gauss();
    real s = 0.0;
    for (int k = 0; k < 12; k++) s += real'($urandom) / 4294967296.0;
    return s - 6.0;
  endfunction

  task automatic run(real sigma);
    int mn, mx, cnt, nw;
    real g, eq2;
    cnt = 0; nw = 0; mn = 0; mx = 0;
    while (nw < NWIN) begin
      real v, a;
      int xv;
      @(negedge clk);
      valid = 1;
      v = real'($urandom_range(0, 800000)) / 10000.0 - 40.0;
      upper = (v >= 0.0);
      lower = (v < 0.0);
      a = v + (upper ? E1 : 0.0) + sigma * gauss() + 1000.0;
      xv = $rtoi(a);           // a > 0: truncation is the floor
      x = 14'(xv);
      if (cnt == 0) begin mn = 99999; mx = -1; end
      if (upper && xv < mn) mn = xv;
      if (lower && xv > mx) mx = xv;
      cnt++;
      if (cnt == WIN) begin
        cnt = 0;
        eq2 = real'(mn - mx);
        @(negedge clk); valid = 0;
        wait (update);
        @(posedge clk); #1;
        nw++;
        g = real'(gap) / real'(1 << F);
        $display("sigma %0.2f window %0d: min/max estimate %0.2f, super-bin estimate %0.3f (true %0.2f)",
                 sigma, nw, eq2, g, TRUE_G);
        checks++;
        if (sigma == 0.0) begin
          if (mn != 1004 || g < TRUE_G - 0.4 || g > TRUE_G + 0.4) begin failures++; $display("noise-free estimate off"); end
        end else begin
          if (eq2 > TRUE_G - 1.0 || g < TRUE_G - 0.5 || g > TRUE_G + 0.5) begin failures++; $display("noisy estimate off"); end
        end
      end
    end
  endtask

  initial begin
    train_en = 1; valid = 0; upper = 0; lower = 0; x = 0; tag = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    run(0.0);
    run(0.5);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
