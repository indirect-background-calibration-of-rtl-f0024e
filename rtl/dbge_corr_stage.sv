// dbge_corr_stage: one DBGE correction stage (CAT + EST + COR, with the
// bookkeeping that lets stages be chained).
//
// Two samples pass through the stage side by side:
//   * the raw sample x: x_out = x_in + d*2^K (CAT). The estimators of every
//     stage look only at raw samples, so a change in a lower stage's estimate
//     never disturbs the statistics of a higher stage;
//   * the corrected sample y: CAT followed by COR, in fixed point with F
//     fractional bits.
// One dbge_boundary_est per decision boundary b (NDEC of them: 1 for a
// 1 bit/stage pipeline, 2 for 1.5 bit/stage) sees the samples with d = b+1 as
// the set above the boundary and d = b as the set below it.
//
// Bookkeeping: a gap measured on raw samples is not the gap the corrected
// samples see, because the NLOW calibrated stages below have subtracted
// different corrections from the sample that fixed the lower edge of the gap
// and from the one that fixed its upper edge. So every edge sample is stored
// with the decisions d_low of those stages (its tag), and the correction
// subtracted for boundary b is
//   c_b = g_b - 1 LSB + sum_j [cor_j(tag0_j) - cor_j(tag1_j)],
// where cor_j(d) = c_lo_j*(d>=1) + c_hi_j*(d>=2) uses the current corrections
// c_low of stage j. The 1 LSB keeps the two codes next to the boundary next to
// each other. In a 1 bit/stage pipeline the two edge samples have the lower
// stages at all ones and all zeros, and the sum reduces to the running total
// of the lower corrections. A boundary without an estimate gets no correction.
// Combinational from d/x_in/y_in/d_low/c_low to the outputs; the estimates
// and tags change only at the end of estimation windows.
module dbge_corr_stage #(
  parameter int unsigned K      = 6,      // stage index (weight 2^K)
  parameter int unsigned NDEC   = 2,      // boundaries per stage: 1 or 2
  parameter int unsigned NLOW   = 0,      // calibrated stages below this one
  parameter int unsigned W      = 14,     // raw sample width
  parameter int unsigned F      = 6,
  parameter int unsigned WIN    = 100000,
  parameter int unsigned SPREAD = 2,
  localparam int unsigned NL    = (NLOW == 0) ? 1 : NLOW,
  localparam int unsigned GW    = W + F + 2,
  localparam int unsigned YW    = W + F + 2
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 train_en,
  input  logic                 cor_en,
  input  logic                 valid,
  input  logic [1:0]           d,
  input  logic [W-1:0]         x_in,
  input  logic signed [YW-1:0] y_in,
  input  logic [1:0]           d_low [NL],     // decisions of the lower calibrated stages
  input  logic signed [GW-1:0] c_low [2*NL],   // their corrections, [2j] lo, [2j+1] hi
  output logic [W-1:0]         x_out,
  output logic signed [YW-1:0] y_out,
  output logic signed [GW-1:0] c_lo,
  output logic signed [GW-1:0] c_hi,
  output logic [NDEC-1:0]      est_valid,
  output logic                 update
);
  localparam logic signed [GW-1:0] ONE = GW'(1) <<< F;
  localparam int unsigned TW = 2 * NL;

  // CAT on the raw path
  dbge_cat #(.K(K), .W(W), .SHIFT(0)) u_cat_raw (.d, .x_in, .x_out);

  // the tag of a sample: decisions of the lower calibrated stages
  logic [TW-1:0] tag;
  always_comb
    for (int j = 0; j < NL; j++) tag[2*j +: 2] = (NLOW == 0) ? 2'd0 : d_low[j];

  // correction that the lower calibrated stages apply to a sample with this tag
  function automatic logic signed [GW-1:0] low_cor(logic [TW-1:0] t,
                                                   logic signed [GW-1:0] cl [2*NL]);
    logic signed [GW-1:0] acc;
    acc = '0;
    for (int j = 0; j < NL; j++) begin
      if (NLOW != 0 && t[2*j +: 2] >= 2'd1) acc += cl[2*j];
      if (NLOW != 0 && t[2*j +: 2] >= 2'd2) acc += cl[2*j+1];
    end
    return acc;
  endfunction

  // EST, one per boundary
  logic signed [GW-1:0] g [2];
  logic signed [GW-1:0] c [2];
  logic [NDEC-1:0]      upd;

  for (genvar b = 0; b < 2; b++) begin : g_bnd
    if (b < NDEC) begin : g_est
      logic [TW-1:0] t1, t0;
      dbge_boundary_est #(.W(W), .F(F), .WIN(WIN), .SPREAD(SPREAD), .TW(TW)) u_est (
        .clk, .rst_n, .train_en, .valid,
        .upper(d == 2'(b + 1)), .lower(d == 2'(b)), .x(x_out), .tag,
        .gap(g[b]), .tag1(t1), .tag0(t0), .gap_valid(est_valid[b]), .update(upd[b])
      );
      always_comb
        c[b] = est_valid[b] ? (g[b] - ONE + low_cor(t0, c_low) - low_cor(t1, c_low)) : '0;
    end else begin : g_none
      always_comb g[b] = '0;
      always_comb c[b] = '0;
    end
  end

  always_comb begin
    c_lo   = c[0];
    c_hi   = c[1];
    update = |upd;
  end

  // CAT then COR on the corrected path
  logic signed [YW-1:0] y_cat;
  dbge_cat #(.K(K), .W(YW), .SHIFT(F)) u_cat_cor (.d, .x_in(y_in), .x_out(y_cat));
  dbge_cor #(.YW(YW), .GW(GW)) u_cor (
    .en(cor_en), .d, .y_in(y_cat), .c_lo, .c_hi, .y_out
  );

  a_ndec: assert property (@(posedge clk) disable iff (!rst_n) valid |-> (d <= 2'(NDEC)));
endmodule
