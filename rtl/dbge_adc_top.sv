// dbge_adc_top: a pipelined ADC with DBGE background calibration.
//
// The behavioural 1.5 bit/stage pipeline (adc_pipeline, with the reference
// converter's stage errors by default) digitises vin once per clock while sample_en is
// high, and the synthesizable dbge_calibrator turns its stage decisions into
// a calibrated code, estimating the decision-boundary gaps of the NCORR most
// significant stages from the signal itself. y_out is signed fixed point with
// F fractional bits, raw_out the uncalibrated code; both appear 3 clocks after
// the sampling edge (1 in the converter model, 2 in the calibrator), flagged by
// y_valid. corr exposes the current gap corrections. train_en and cor_en are
// the calibrator controls (see dbge_calibrator).
module dbge_adc_top
  import dbge_pkg::*;
#(
  parameter int unsigned NSTAGES   = NSTAGES_DEF,
  parameter int unsigned NCORR     = NCORR_DEF,
  parameter int unsigned WIN       = WIN_DEF,
  parameter int unsigned SPREAD    = SPREAD_DEF,
  parameter real         NOISE_LSB = 0.22,
  parameter bit          USE_TABLE = 1'b1,
  localparam int unsigned W        = NSTAGES + 1,
  localparam int unsigned GW       = W + FRAC_DEF + 2
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  real                  vin,
  input  logic                 sample_en,
  input  logic                 train_en,
  input  logic                 cor_en,
  output logic [W-1:0]         raw_out,
  output logic signed [GW-1:0] y_out,
  output logic                 y_valid,
  output logic signed [GW-1:0] corr [2*NCORR],
  output logic                 est_update,
  output logic                 all_valid
);
  dec_t dec [NSTAGES];
  logic dec_valid;

  adc_pipeline #(.NSTAGES(NSTAGES), .NOISE_LSB(NOISE_LSB), .USE_TABLE(USE_TABLE)) u_adc (
    .clk, .rst_n, .vin, .sample_en, .dec, .dec_valid
  );

  dbge_calibrator #(
    .NSTAGES(NSTAGES), .NCORR(NCORR), .NDEC(2), .F(FRAC_DEF), .WIN(WIN), .SPREAD(SPREAD)
  ) u_cal (
    .clk, .rst_n, .train_en, .cor_en, .dec_valid, .dec,
    .raw_out, .y_out, .y_valid, .corr, .est_update, .all_valid
  );
endmodule
