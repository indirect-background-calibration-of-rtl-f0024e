// tb_dbge_superbin: random samples in a narrow band, so that the running
// minimum and maximum keep moving; the testbench keeps the edges and a full
// histogram of each window and compares, every clock, both super bins of the
// upward edge ([min, min+s), [min+s, min+2s)) and of the downward edge
// ((max-s, max], (max-2s, max-s]) with sums over that histogram, across window
// restarts.
module tb_dbge_superbin;
  localparam int S = 3;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  logic valid, side, restart, seen;
  logic [13:0] x, emin, emax;
  logic [9:0] hn_u, hf_u, hn_d, hf_d;

  dbge_superbin #(.W(14), .CW(10), .SPREAD(S), .DOWN(1'b0)) u_up (
    .clk, .rst_n, .valid, .side, .x, .edge_q(emin), .seen_q(seen), .restart,
    .h_near(hn_u), .h_far(hf_u));
  dbge_superbin #(.W(14), .CW(10), .SPREAD(S), .DOWN(1'b1)) u_dn (
    .clk, .rst_n, .valid, .side, .x, .edge_q(emax), .seen_q(seen), .restart,
    .h_near(hn_d), .h_far(hf_d));
  always #5 clk = ~clk;

  initial begin
    #1000000 failures++; $display("watchdog"); $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  int hist [int];
  int slides;

  initial begin
    int centre;
    valid = 0; side = 0; restart = 0; x = 0; seen = 0; emin = 0; emax = 0;
    centre = 500; slides = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < 8000; n++) begin
      int rn_u, rf_u, rn_d, rf_d;
      @(negedge clk);
      valid   = ($urandom_range(0, 7) != 0);
      side    = ($urandom_range(0, 3) != 0);
      restart = ($urandom_range(0, 299) == 0);
      if (restart && valid) centre = $urandom_range(100, 16000);
      x = 14'(centre + $urandom_range(0, 24) - 12);
      @(posedge clk); #1;
      // reference update after the edge, with the edges before the sample
      if (valid) begin
        if (restart) begin hist.delete(); seen = 0; end
        if (side) begin
          if (seen && (int'(x) < int'(emin) || int'(x) > int'(emax))) slides++;
          if (!seen || x < emin) emin = x;
          if (!seen || x > emax) emax = x;
          seen = 1;
          if (hist.exists(int'(x))) hist[int'(x)]++; else hist[int'(x)] = 1;
        end
      end
      rn_u = 0; rf_u = 0; rn_d = 0; rf_d = 0;
      for (int c = 0; c < S; c++) begin
        if (hist.exists(int'(emin) + c))     rn_u += hist[int'(emin) + c];
        if (hist.exists(int'(emin) + S + c)) rf_u += hist[int'(emin) + S + c];
        if (hist.exists(int'(emax) - c))     rn_d += hist[int'(emax) - c];
        if (hist.exists(int'(emax) - S - c)) rf_d += hist[int'(emax) - S - c];
      end
      if (seen) begin
        checks++;
        if (hn_u != 10'(rn_u) || hf_u != 10'(rf_u) || hn_d != 10'(rn_d) || hf_d != 10'(rf_d)) begin
          failures++;
          if (failures < 10) $display("n=%0d up %0d/%0d vs %0d/%0d dn %0d/%0d vs %0d/%0d", n, hn_u, hf_u, rn_u, rf_u, hn_d, hf_d, rn_d, rf_d);
        end
      end
    end
    checks++;
    if (slides < 20) begin failures++; $display("edges hardly moved"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
