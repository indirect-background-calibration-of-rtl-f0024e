// tb_dbge_minmax: random samples on both sides of a boundary, windows restarted
// at random moments; the min/max registers and the set flags are compared
// every clock with a reference kept in the testbench, together with the tags
// stored with the extreme samples.
module tb_dbge_minmax;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  logic valid, upper, lower, restart;
  logic [13:0] x, e1_min, e0_max;
  logic [5:0] tag, tag1, tag0;
  int r_t1, r_t0;
  logic seen1, seen0;
  int r_min, r_max;
  bit r_s1, r_s0;

  dbge_minmax #(.W(14), .TW(6)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    #1000000 failures++; $display("watchdog"); $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    valid = 0; upper = 0; lower = 0; restart = 0; x = 0; tag = 0; r_t1 = 0; r_t0 = 0;
    r_s1 = 0; r_s0 = 0; r_min = 0; r_max = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < 5000; n++) begin
      int side;
      @(negedge clk);
      valid   = ($urandom_range(0, 9) != 0);
      side    = $urandom_range(0, 2);          // 0: below, 1: above, 2: neither
      lower   = (side == 0);
      upper   = (side == 1);
      x       = upper ? 14'($urandom_range(8000, 9000)) : 14'($urandom_range(7000, 8100));
      restart = ($urandom_range(0, 199) == 0);
      tag     = 6'($urandom);
      // reference
      if (valid) begin
        if (restart) begin r_s1 = 0; r_s0 = 0; end
        if (upper && (!r_s1 || x < r_min)) begin r_min = x; r_t1 = tag; end
        if (lower && (!r_s0 || x > r_max)) begin r_max = x; r_t0 = tag; end
        if (upper) r_s1 = 1;
        if (lower) r_s0 = 1;
      end
      @(posedge clk); #1;
      checks++;
      if (seen1 !== r_s1 || seen0 !== r_s0) begin failures++; $display("flags n=%0d", n); end
      if (r_s1) begin checks++; if (e1_min != 14'(r_min) || tag1 != 6'(r_t1)) begin failures++; $display("min %0d vs %0d", e1_min, r_min); end end
      if (r_s0) begin checks++; if (e0_max != 14'(r_max) || tag0 != 6'(r_t0)) begin failures++; $display("max %0d vs %0d", e0_max, r_max); end end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
