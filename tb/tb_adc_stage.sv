// tb_adc_stage: an ideal stage and one with the first row of the default error table
// (stage 12) are driven with random inputs; decisions must follow the
// comparator thresholds and residues the flip-around MDAC equation worked out
// here; the ideal residue must stay within +-Vref.
module tb_adc_stage;
  int checks = 0, failures = 0;
  real vin, noise, vres_i, vres_m;
  logic [1:0] d_i, d_m;

  adc_stage u_ideal (.vin, .noise, .d(d_i), .vres(vres_i));
  adc_stage #(.CAP_MISMATCH(0.0119), .OPAMP_GAIN(342.0), .CMP_OFFSET(0.0024), .VOLT_OFFSET(-0.0041))
    u_mm (.vin, .noise, .d(d_m), .vres(vres_m));

  initial begin
    #100000 failures++; $display("watchdog"); $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    for (int n = 0; n < 2000; n++) begin
      int de;
      real r, ve, dm;
      vin   = (real'($urandom_range(0, 2000000)) / 1000000.0) - 1.0;
      noise = (n % 2 == 0) ? 0.0 : 0.001;
      #1;
      de = (vin + noise > 0.25) ? 2 : (vin + noise > -0.25) ? 1 : 0;
      checks++;
      if (int'(d_i) != de) begin failures++; $display("ideal d %0d exp %0d at %f", d_i, de, vin); end
      ve = 2.0 * (vin + noise) - (real'(de) - 1.0);
      checks++;
      if ((vres_i - ve) > 1e-6 || (ve - vres_i) > 1e-6) begin failures++; $display("ideal vres %f exp %f", vres_i, ve); end
      checks++;
      if (vres_i > 1.01 || vres_i < -1.01) begin failures++; $display("residue out of range %f", vres_i); end
      de = (vin + noise > 0.2524) ? 2 : (vin + noise > -0.2476) ? 1 : 0;
      checks++;
      if (int'(d_m) != de) begin failures++; $display("mm d %0d exp %0d", d_m, de); end
      r  = 1.0119;
      dm = ((1.0 + r) * (vin + noise) - r * (real'(de) - 1.0)) / (1.0 + (1.0 + r) / 342.0) - 0.0041;
      checks++;
      if ((vres_m - dm) > 1e-6 || (dm - vres_m) > 1e-6) begin failures++; $display("mm vres %f exp %f", vres_m, dm); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
