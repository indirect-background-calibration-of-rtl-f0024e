// dbge_boundary_est: the EST block for one decision boundary of one stage.
//
// It watches the raw samples x of the stage and produces the gap estimate
// g = e1_hat - e0_hat in fixed point with F fractional bits:
//   * dbge_minmax tracks e1~ = min of the samples above the boundary and
//     e0~ = max of those below it;
//   * two dbge_superbin units keep the super bins next to those edges, and
//     two dbge_serial_div units form the ratios h_s[e1~]/h_s[e1~+s] and
//     h_-s[e0~]/h_-s[e0~-s];
//   * e1_hat = e1~ + s*(1 - ratio1), e0_hat = e0~ - s*(1 - ratio0).
// The adjustment pushes each edge inward when the histogram rises gradually
// (thermal noise smears the edge outward) and is zero for a sharp edge. The
// ratio is limited to 1, so the adjustment stays in 0..s, since noise can only
// move the observed edges outward. The work is organised in windows of WIN
// valid samples: at the end of a window the edges and super-bin counts are
// taken and both divisions run (F+1 clocks) while the next window collects
// samples. A window in which one side saw no sample leaves the estimate as it
// was, and the estimate is only replaced while train_en is high. update pulses
// for one clock when gap takes a new value, F+3 clocks after the last sample
// of the window. Each edge sample carries a tag (see dbge_minmax); tag1/tag0
// are the tags of the samples that fixed the two edges of the published
// estimate.
// The estimator equations and the serial division follow the DBGE method; the
// window length, the clipping of the ratio, keeping the estimate when a side
// is empty and the timing are this design's own choices.
module dbge_boundary_est #(
  parameter int unsigned W      = 14,
  parameter int unsigned F      = 6,
  parameter int unsigned WIN    = 100000,
  parameter int unsigned SPREAD = 2,
  parameter int unsigned TW     = 2,
  localparam int unsigned GW    = W + F + 2,
  localparam int unsigned CW    = $clog2(WIN + 1)
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 train_en,
  input  logic                 valid,
  input  logic                 upper,    // sample is in X1 (above the boundary)
  input  logic                 lower,    // sample is in X0 (below the boundary)
  input  logic [W-1:0]         x,
  input  logic [TW-1:0]        tag,
  output logic signed [GW-1:0] gap,
  output logic [TW-1:0]        tag1,
  output logic [TW-1:0]        tag0,
  output logic                 gap_valid,
  output logic                 update
);
  localparam int unsigned WCW = $clog2(WIN);
  localparam logic signed [GW-1:0] ONE = GW'(1) <<< F;

  // window bookkeeping: pend marks that the next valid sample opens a window
  logic [WCW-1:0] cnt;
  logic           last, pend, snap;

  always_comb last = valid && (cnt == WCW'(WIN - 1));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cnt  <= '0;
      pend <= 1'b0;
      snap <= 1'b0;
    end else begin
      snap <= last;
      if (valid) begin
        cnt  <= last ? '0 : cnt + 1'b1;
        pend <= last;
      end
    end
  end

  // min/max registers
  logic [W-1:0]  e1_min, e0_max;
  logic [TW-1:0] t1_min, t0_max;
  logic          seen1, seen0;

  dbge_minmax #(.W(W), .TW(TW)) u_minmax (
    .clk, .rst_n, .valid, .upper, .lower, .x, .tag, .restart(pend),
    .e1_min, .e0_max, .tag1(t1_min), .tag0(t0_max), .seen1, .seen0
  );

  // super bins at the two edges
  logic [CW-1:0] h1_near, h1_far, h0_near, h0_far;

  dbge_superbin #(.W(W), .CW(CW), .SPREAD(SPREAD), .DOWN(1'b0)) u_bin1 (
    .clk, .rst_n, .valid, .side(upper), .x, .edge_q(e1_min), .seen_q(seen1),
    .restart(pend), .h_near(h1_near), .h_far(h1_far)
  );
  dbge_superbin #(.W(W), .CW(CW), .SPREAD(SPREAD), .DOWN(1'b1)) u_bin0 (
    .clk, .rst_n, .valid, .side(lower), .x, .edge_q(e0_max), .seen_q(seen0),
    .restart(pend), .h_near(h0_near), .h_far(h0_far)
  );

  // end of window: take the edges and start the divisions
  logic          div_start;
  logic [W-1:0]  e1_t, e0_t;
  logic [TW-1:0] t1_t, t0_t;
  logic [F:0]    q1, q0;
  logic          done1, done0, busy1, busy0;

  always_comb div_start = snap && seen1 && seen0;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      e1_t <= '0; e0_t <= '0; t1_t <= '0; t0_t <= '0;
    end else if (div_start) begin
      e1_t <= e1_min;
      e0_t <= e0_max;
      t1_t <= t1_min;
      t0_t <= t0_max;
    end
  end

  dbge_serial_div #(.NW(CW), .F(F)) u_div1 (
    .clk, .rst_n, .start(div_start), .num(h1_near), .den(h1_far),
    .busy(busy1), .done(done1), .quo(q1)
  );
  dbge_serial_div #(.NW(CW), .F(F)) u_div0 (
    .clk, .rst_n, .start(div_start), .num(h0_near), .den(h0_far),
    .busy(busy0), .done(done0), .quo(q0)
  );

  // super-bin estimate
  logic signed [GW-1:0] e1_hat, e0_hat, g_new;

  always_comb begin
    e1_hat = ($signed(GW'(e1_t)) <<< F) + $signed(GW'(SPREAD)) * (ONE - $signed(GW'(q1)));
    e0_hat = ($signed(GW'(e0_t)) <<< F) - $signed(GW'(SPREAD)) * (ONE - $signed(GW'(q0)));
    g_new  = e1_hat - e0_hat;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      gap       <= '0;
      tag1      <= '0;
      tag0      <= '0;
      gap_valid <= 1'b0;
      update    <= 1'b0;
    end else begin
      update <= 1'b0;
      if (done1 && train_en) begin
        gap       <= g_new;
        tag1      <= t1_t;
        tag0      <= t0_t;
        gap_valid <= 1'b1;
        update    <= 1'b1;
      end
    end
  end

  // the two dividers run in lock step
  a_lockstep: assert property (@(posedge clk) disable iff (!rst_n) done1 == done0);
  // a window is far longer than a division
  a_div_free: assert property (@(posedge clk) disable iff (!rst_n) div_start |-> !(busy1 || busy0));
endmodule
