// tb_dbge_boundary_est: one boundary of a converter with a known gap. The
// "analog" value v is uniform over 0..999 with the boundary at 500; samples
// above it are shifted by GAP codes and every sample gets Gaussian noise. The
// testbench keeps its own min/max and a full histogram of each window,
// computes the super-bin estimate from that window's edges and super bins, and
// compares each published estimate (and the tags stored with the two edge
// samples) bit for bit. It also checks that the update comes F+3 clocks
// after the last sample of a window, that the super-bin estimate lies closer to the
// true gap than the plain min/max estimate does when noise is present, and that train_en = 0 freezes
// the estimate.
module tb_dbge_boundary_est;
  localparam int F = 6, WIN = 20000, S = 4, GAP = 37;
  localparam real SIGMA = 1.5;
  localparam int ONE = 1 << F;
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
    #50000000 failures++; $display("watchdog"); $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  function automatic int gnoise();
    real s = 0.0;
    for (int k = 0; k < 12; k++) s += real'($urandom) / 4294967296.0;
    s = (s - 6.0) * SIGMA;
    return (s >= 0.0) ? $rtoi(s + 0.5) : -$rtoi(-s + 0.5);
  endfunction

  // reference model state
  int mn, mx, cnt, t1, t0, et1, et0;
  int h1 [int];
  int h0 [int];
  bit s1, s0;
  int exp_gap, eq2_gap, last_eq2, last_exp;
  bit exp_pending;
  int wait_cyc, nupd, closer, wdone;

  function automatic int ratio(int n, int d);
    if (d == 0 || n >= d) return ONE;
    return (n * ONE) / d;
  endfunction

  initial begin
    train_en = 1; valid = 0; upper = 0; lower = 0; x = 0;
    cnt = 0; s1 = 0; s0 = 0; tag = 0;
    exp_pending = 0; nupd = 0; closer = 0; wdone = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    while (!(wdone == 8 && !exp_pending)) begin
      int v, xv, hn1, hf1, hn0, hf0;
      @(negedge clk);
      // the estimate of the 5th window must not be taken
      train_en = (wdone != 5);
      valid = ($urandom_range(0, 4) != 0);
      v = $urandom_range(0, 999);
      upper = valid && (v >= 500);
      lower = valid && (v < 500);
      xv = v + (v >= 500 ? GAP : 0) + 100 + gnoise();
      x = 14'(xv);
      tag = 2'($urandom);
      if (valid) begin
        if (cnt == 0) begin s1 = 0; s0 = 0; h1.delete(); h0.delete(); end
        if (upper) begin
          if (!s1 || xv < mn) begin mn = xv; t1 = tag; end
          s1 = 1;
          if (h1.exists(xv)) h1[xv]++; else h1[xv] = 1;
        end
        if (lower) begin
          if (!s0 || xv > mx) begin mx = xv; t0 = tag; end
          s0 = 1;
          if (h0.exists(xv)) h0[xv]++; else h0[xv] = 1;
        end
        cnt++;
        if (cnt == WIN) begin
          cnt = 0;
          wdone++;
          eq2_gap = (mn - mx) * ONE;
          hn1 = 0; hf1 = 0; hn0 = 0; hf0 = 0;
          for (int c = 0; c < S; c++) begin
            if (h1.exists(mn + c))     hn1 += h1[mn + c];
            if (h1.exists(mn + S + c)) hf1 += h1[mn + S + c];
            if (h0.exists(mx - c))     hn0 += h0[mx - c];
            if (h0.exists(mx - S - c)) hf0 += h0[mx - S - c];
          end
          exp_gap = (mn * ONE + S * (ONE - ratio(hn1, hf1))) - (mx * ONE - S * (ONE - ratio(hn0, hf0)));
          et1 = t1; et0 = t0;
          exp_pending = 1;
          wait_cyc = 0;
        end
      end
      @(posedge clk); #1;
      if (update) begin
        nupd++;
        checks++;
        if (!exp_pending || wait_cyc != F + 3) begin failures++; $display("update at wrong time (%0d)", wait_cyc); end
        checks++;
        if (int'(gap) != exp_gap || int'(tag1) != et1 || int'(tag0) != et0) begin
          failures++; $display("gap %0d exp %0d", gap, exp_gap);
        end else begin
          checks++;
          // true gap is GAP+1 codes between the last code below and the first above
          if ((exp_gap - (GAP + 1) * ONE) ** 2 < (eq2_gap - (GAP + 1) * ONE) ** 2) closer++;
          else begin failures++; $display("Eq3 %0d not closer than Eq2 %0d", exp_gap, eq2_gap); end
        end
        exp_pending = 0;
      end else if (exp_pending) begin
        wait_cyc++;
        if (wait_cyc > F + 3) begin
          checks++;
          if (train_en) begin failures++; $display("missing update"); end
          exp_pending = 0;
        end
      end
    end
    checks++;
    if (nupd != 7) begin failures++; $display("expected 7 updates (one frozen window), saw %0d", nupd); end
    checks++;
    if (!gap_valid) failures++;
    $display("updates=%0d eq3_closer=%0d final gap=%0d/64", nupd, closer, gap);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
