// adc_stage: behavioural model of one 1.5 bit/stage switched-capacitor
// pipeline stage (an analog circuit; this model is not synthesizable).
//
// Two comparators at -Vref/4 and +Vref/4, both shifted by CMP_OFFSET, give the
// decision d in {0,1,2}. The multiplying DAC forms the residue of a
// flip-around stage with sampling/feedback capacitor ratio r = 1 + CAP_MISMATCH:
//   vres = ((1+r)*v - r*(d-1)*Vref) / (1 + (1+r)/OPAMP_GAIN) + VOLT_OFFSET*Vref
// where v = vin + noise and (1+r)/A models the closed-loop error of an op-amp
// of finite gain A. VOLT_OFFSET stands for op-amp offset and charge injection.
// All voltages are in units of Vref; mismatch and offsets are fractions (not %).
// These are the error sources the calibration targets: capacitor mismatch and
// finite gain open missing-code gaps at the decision boundaries, while the
// redundancy of the 1.5 bit stage absorbs the comparator offsets. The
// equations are the standard ones for this circuit. Combinational.
module adc_stage #(
  parameter real CAP_MISMATCH = 0.0,
  parameter real OPAMP_GAIN   = 1.0e9,
  parameter real CMP_OFFSET   = 0.0,
  parameter real VOLT_OFFSET  = 0.0
) (
  input  real        vin,
  input  real        noise,
  output logic [1:0] d,
  output real        vres
);
  real v, r, beta_err;
  always_comb begin
    v        = vin + noise;
    r        = 1.0 + CAP_MISMATCH;
    beta_err = 1.0 + (1.0 + r) / OPAMP_GAIN;
    if (v > 0.25 + CMP_OFFSET)       d = 2'd2;
    else if (v > -0.25 + CMP_OFFSET) d = 2'd1;
    else                             d = 2'd0;
    vres = ((1.0 + r) * v - r * (real'(d) - 1.0)) / beta_err + VOLT_OFFSET;
  end
endmodule
