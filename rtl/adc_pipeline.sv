// adc_pipeline: behavioural model of the pipelined ADC front end (analog;
// not synthesizable). It is the signal source of the calibrator.
//
// NSTAGES adc_stage models are chained, the input going to stage NSTAGES-1
// (the most significant) and each residue to the next lower stage. With
// USE_TABLE set, stage i takes the capacitor mismatch, op-amp gain,
// comparator offset and voltage offset of the reference converter's error
// table (package dbge_pkg); otherwise all stages are ideal. Thermal
// noise with a standard deviation of NOISE_LSB output LSBs (2^-NSTAGES Vref
// each) is added at the input of every stage. Referred to the converter
// input, the noise of a later stage is divided by the gain in front of it, so
// the total is about 1.15 * NOISE_LSB (0.25 LSB for the default 0.22). The
// noise is Gaussian, built as the sum of twelve uniform numbers. Full scale is -Vref..+Vref (vin in units of
// Vref); the ideal code is about (vin+1)*2^NSTAGES.
// Timing: on a rising clk edge with sample_en high the decisions of vin are
// stored in dec (dec[0] = last stage) and dec_valid is set for that clock; the
// pipeline delay of a real converter and its digital alignment are not
// modelled, every sample is converted at once.
module adc_pipeline
  import dbge_pkg::*;
#(
  parameter int unsigned NSTAGES   = NSTAGES_DEF,
  parameter real         NOISE_LSB = 0.22,
  parameter bit          USE_TABLE = 1'b1
) (
  input  logic clk,
  input  logic rst_n,
  input  real  vin,
  input  logic sample_en,
  output dec_t dec [NSTAGES],
  output logic dec_valid
);
  real  noise [NSTAGES];
  dec_t d     [NSTAGES];

  for (genvar i = 0; i < NSTAGES; i++) begin : g_stage
    localparam int unsigned T = i % 13;
    real vi, vo;   // stage input and residue
    if (i == NSTAGES - 1) begin : g_first
      always_comb vi = vin;
    end else begin : g_next
      always_comb vi = g_stage[i+1].vo;
    end
    adc_stage #(
      .CAP_MISMATCH(USE_TABLE ? TBL_CAP_MM_PCT[T]  / 100.0 : 0.0),
      .OPAMP_GAIN  (USE_TABLE ? TBL_OPAMP_GAIN[T]          : 1.0e9),
      .CMP_OFFSET  (USE_TABLE ? TBL_CMP_OFF_PCT[T] / 100.0 : 0.0),
      .VOLT_OFFSET (USE_TABLE ? TBL_VOFF_PCT[T]    / 100.0 : 0.0)
    ) u_stage (
      .vin(vi), .noise(noise[i]), .d(d[i]), .vres(vo)
    );
  end

  function automatic real gauss();
    real s = 0.0;
    for (int k = 0; k < 12; k++) s += real'($urandom) / 4294967296.0;
    return s - 6.0;
  endfunction

  // the noise of the next sample is drawn when the current one is taken
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      dec_valid <= 1'b0;
      for (int i = 0; i < NSTAGES; i++) begin
        dec[i]   <= '0;
        noise[i] <= 0.0;
      end
    end else begin
      dec_valid <= sample_en;
      if (sample_en) begin
        dec <= d;
        for (int i = 0; i < NSTAGES; i++)
          noise[i] <= NOISE_LSB * gauss() / real'(2.0 ** NSTAGES);
      end
    end
  end
endmodule
