// tb_adc_pipeline: an ideal noiseless 13-stage pipeline must return
// floor((vin+1)*2^13) within one code (the redundant digits are summed with
// weights 2^i), and the pipeline with stage errors must stay within a few
// tens of codes of it, deviating from it (it has missing-code gaps). Decisions must
// appear one clock after a sample is taken, flagged by dec_valid.
module tb_adc_pipeline;
  localparam int N = 13;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  real vin;
  logic sample_en;
  dbge_pkg::dec_t dec_i [N], dec_t [N];
  logic dv_i, dv_t;

  adc_pipeline #(.NSTAGES(N), .NOISE_LSB(0.0), .USE_TABLE(1'b0)) u_ideal (
    .clk, .rst_n, .vin, .sample_en, .dec(dec_i), .dec_valid(dv_i));
  adc_pipeline #(.NSTAGES(N), .NOISE_LSB(0.22), .USE_TABLE(1'b1)) u_tab (
    .clk, .rst_n, .vin, .sample_en, .dec(dec_t), .dec_valid(dv_t));
  always #5 clk = ~clk;

  initial begin
    #1000000 failures++; $display("watchdog"); $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  function automatic int code(dbge_pkg::dec_t dd [N]);
    int c = 0;
    for (int i = 0; i < N; i++) c += int'(dd[i]) << i;
    return c;
  endfunction

  initial begin
    int maxdev_t;
    maxdev_t = 0;
    vin = 0.0; sample_en = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < 3000; n++) begin
      real ideal;
      int ci, ct;
      @(negedge clk);
      vin = (real'($urandom_range(0, 1900000)) / 1000000.0) - 0.95;
      sample_en = (n % 5 != 4);
      ideal = (vin + 1.0) * 8192.0;
      @(posedge clk); #1;
      checks++;
      if (dv_i !== sample_en || dv_t !== sample_en) begin failures++; $display("dec_valid"); end
      if (sample_en) begin
        ci = code(dec_i);
        ct = code(dec_t);
        checks++;
        if (real'(ci) < ideal - 1.5 || real'(ci) > ideal + 1.0) begin failures++; $display("ideal code %0d for %f", ci, ideal); end
        checks++;
        if (real'(ct) < ideal - 400.0 || real'(ct) > ideal + 400.0) begin failures++; $display("table code %0d for %f", ct, ideal); end
        if ($rtoi(ideal) - ct > maxdev_t) maxdev_t = $rtoi(ideal) - ct;
        if (ct - $rtoi(ideal) > maxdev_t) maxdev_t = ct - $rtoi(ideal);
      end
    end
    checks++;
    if (maxdev_t < 3) begin failures++; $display("pipeline with stage errors shows no error"); end
    $display("pipeline with stage errors: max deviation from ideal %0d codes", maxdev_t);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
