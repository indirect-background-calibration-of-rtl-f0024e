// dbge_pkg: constants and types shared by the DBGE (decision boundary gap
// estimation) calibrator and by the behavioural pipelined-ADC model.
//
// The default converter is a 13-stage, 1.5 bit/stage pipeline whose raw code is
// 14 bits wide; the seven most significant stages are calibrated. Gap estimates
// and corrected samples are fixed-point numbers with FRAC fractional bits (the
// number of fractional bits is a choice of this design). The stage error set
// of the reference converter (capacitor mismatch in %, op-amp gain,
// comparator offset and voltage offset in % of Vref) is kept here so that the
// ADC model can be built with it; index 0 is the last (least significant) stage.
package dbge_pkg;

  // Converter organisation
  localparam int unsigned NSTAGES_DEF = 13;  // pipeline stages
  localparam int unsigned NCORR_DEF   = 7;   // calibrated (most significant) stages
  localparam int unsigned NDEC_DEF    = 2;   // decision boundaries per stage (1.5 bps)
  localparam int unsigned RAW_W_DEF   = NSTAGES_DEF + NDEC_DEF - 1;  // 14-bit raw code

  // Estimator defaults
  localparam int unsigned FRAC_DEF    = 6;      // fractional bits of gaps/samples
  localparam int unsigned WIN_DEF     = 100000; // samples per estimation window
  // Super-bin width s in LSB. It must cover the smear of the edge by noise
  // (0.25 LSB rms here), and the 2*s codes beside an edge must stay clear of
  // the nearest boundary of the stage below, which lies about 2^(k-3) codes
  // from the edge of stage k (8 codes for the lowest calibrated stage, k = 6).
  localparam int unsigned SPREAD_DEF  = 2;

  // A stage decision: 0, 1 or 2 (1.5 bps) or 0, 1 (1 bps)
  typedef logic [1:0] dec_t;

  // error table of the reference converter, index = stage number (0 = last stage)
  localparam real TBL_CAP_MM_PCT [13] = '{ 1.66,  1.80,  0.05, -0.54,  0.51, -0.09,  0.21,
                                          -0.88,  1.07, -0.65, -1.21,  1.64,  1.19};
  localparam real TBL_OPAMP_GAIN [13] = '{435.0, 305.0, 187.0, 499.0, 143.0, 151.0, 260.0,
                                          162.0, 421.0, 154.0, 197.0, 106.0, 342.0};
  localparam real TBL_CMP_OFF_PCT[13] = '{ 4.19,  3.07, -1.47, -2.16,  3.91, -0.99,  2.69,
                                           0.26,  2.71, -2.07,  4.72, -0.06,  0.24};
  localparam real TBL_VOFF_PCT   [13] = '{ 0.35,  0.40,  0.47, -0.26, -0.43, -0.04, -0.48,
                                          -0.43, -0.15,  0.39,  0.16, -0.30, -0.41};

endpackage
