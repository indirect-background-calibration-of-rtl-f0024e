// dbge_calibrator: DBGE background calibration of a pipelined ADC.
//
// Takes the decisions of all NSTAGES pipeline stages of one sample and
// returns the raw code and the calibrated code. The NSTAGES-NCORR least
// significant stages form the back end, assumed linear, and are only
// concatenated. The NCORR most significant stages are each handled by a
// dbge_corr_stage, chained from the least to the most significant one: the raw
// sample and the corrected sample climb the chain side by side, every stage
// estimating its gaps on the raw sample and subtracting its corrections from
// the corrected one (the real-time scheme; see dbge_corr_stage for the
// bookkeeping term passed along the chain). Calibration runs in the
// background from the normal input signal; no calibration signal is needed,
// but the input must visit the codes around each decision boundary.
//
// Controls: train_en lets the estimators replace their estimates (clear it to
// freeze them, e.g. to train on a block and then correct the same block);
// cor_en applies the corrections (clear it to see the raw code on y_out).
// Timing: one sample per clock. dec/dec_valid are registered, the chain is
// combinational and the outputs are registered: y_out/raw_out/y_valid follow
// dec_valid by 2 clocks. y_out is signed fixed point with F fractional bits.
// corr[2*j+b] is the correction of boundary b of calibrated stage j (0 = the
// least significant calibrated stage), for observation; est_update pulses when
// any estimate changed and all_valid is set once every boundary has one.
module dbge_calibrator
  import dbge_pkg::*;
#(
  parameter int unsigned NSTAGES = NSTAGES_DEF,
  parameter int unsigned NCORR   = NCORR_DEF,
  parameter int unsigned NDEC    = NDEC_DEF,
  parameter int unsigned F       = FRAC_DEF,
  parameter int unsigned WIN     = WIN_DEF,
  parameter int unsigned SPREAD  = SPREAD_DEF,
  localparam int unsigned W      = NSTAGES + NDEC - 1,
  localparam int unsigned GW     = W + F + 2,
  localparam int unsigned YW     = W + F + 2,
  localparam int unsigned NBE    = NSTAGES - NCORR
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 train_en,
  input  logic                 cor_en,
  input  logic                 dec_valid,
  input  dec_t                 dec [NSTAGES],
  output logic [W-1:0]         raw_out,
  output logic signed [YW-1:0] y_out,
  output logic                 y_valid,
  output logic signed [GW-1:0] corr [2*NCORR],
  output logic                 est_update,
  output logic                 all_valid
);
  // input register
  dec_t dec_q [NSTAGES];
  logic valid_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      valid_q <= 1'b0;
      for (int i = 0; i < NSTAGES; i++) dec_q[i] <= '0;
    end else begin
      valid_q <= dec_valid;
      if (dec_valid) dec_q <= dec;
    end
  end

  // back end: plain concatenation of the uncalibrated stages
  logic [W-1:0] x_be;
  always_comb begin
    x_be = '0;
    for (int i = 0; i < NBE; i++) x_be = x_be + (W'(dec_q[i]) << i);
  end

  // chain of correction stages
  logic [W-1:0]         x_ch [NCORR+1];
  logic signed [YW-1:0] y_ch [NCORR+1];
  logic [NCORR-1:0]     upd;
  logic [NCORR-1:0]     stage_ok;

  always_comb begin
    x_ch[0] = x_be;
    y_ch[0] = $signed(YW'(x_be)) <<< F;
  end

  for (genvar j = 0; j < NCORR; j++) begin : g_stage
    localparam int unsigned NL = (j == 0) ? 1 : j;
    logic [NDEC-1:0]      ev;
    dec_t                 d_low [NL];
    logic signed [GW-1:0] c_low [2*NL];
    logic signed [GW-1:0] clo, chi;
    // decisions and corrections of the calibrated stages below this one
    if (j == 0) begin : g_bottom
      always_comb begin
        d_low[0] = 2'd0;
        c_low[0] = '0;
        c_low[1] = '0;
      end
    end else begin : g_above
      for (genvar i = 0; i < j; i++) begin : g_low
        always_comb begin
          d_low[i]       = dec_q[NBE + i];
          c_low[2*i]     = g_stage[i].clo;
          c_low[2*i + 1] = g_stage[i].chi;
        end
      end
    end
    always_comb begin
      corr[2*j]     = clo;
      corr[2*j + 1] = chi;
    end
    dbge_corr_stage #(
      .K(NBE + j), .NDEC(NDEC), .NLOW(j), .W(W), .F(F), .WIN(WIN), .SPREAD(SPREAD)
    ) u_stage (
      .clk, .rst_n, .train_en, .cor_en, .valid(valid_q), .d(dec_q[NBE + j]),
      .x_in(x_ch[j]), .y_in(y_ch[j]), .d_low, .c_low,
      .x_out(x_ch[j+1]), .y_out(y_ch[j+1]),
      .c_lo(clo), .c_hi(chi), .est_valid(ev), .update(upd[j])
    );
    always_comb stage_ok[j] = &ev;
  end

  // output register
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      raw_out    <= '0;
      y_out      <= '0;
      y_valid    <= 1'b0;
      est_update <= 1'b0;
      all_valid  <= 1'b0;
    end else begin
      all_valid  <= &stage_ok;
      y_valid    <= valid_q;
      est_update <= |upd;
      if (valid_q) begin
        raw_out <= x_ch[NCORR];
        y_out   <= y_ch[NCORR];
      end
    end
  end

  initial begin
    assert (NCORR >= 1 && NCORR <= NSTAGES) else $error("NCORR out of range");
    assert (NDEC == 1 || NDEC == 2) else $error("NDEC must be 1 or 2");
  end
endmodule
