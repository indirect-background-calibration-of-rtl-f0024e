// dbge_minmax: the min/max registers of the initial gap estimate.
//
// For one decision boundary, every valid sample is either above it (upper,
// the set X1) or below it (lower, the set X0). The block keeps e1_min = min X1
// and e0_max = max X0; seen1/seen0 tell whether each set has a member. A valid
// sample that arrives with restart high starts a new window: the registers
// forget the old window and take only that sample. Periodic restart lets the
// estimate follow drift, the adaptation rate being set by the window length
// chosen by the caller. Each register also keeps a tag that came with its
// sample (the calibrator stores there the decisions of the lower calibrated
// stages, needed to refer the gap to the corrected signal); ties keep the
// earlier sample. Outputs are registered: a sample is reflected one clock
// after it is presented.
module dbge_minmax #(
  parameter int unsigned W  = 14,
  parameter int unsigned TW = 2
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         valid,
  input  logic         upper,
  input  logic         lower,
  input  logic [W-1:0]  x,
  input  logic [TW-1:0] tag,
  input  logic          restart,
  output logic [W-1:0]  e1_min,
  output logic [W-1:0]  e0_max,
  output logic [TW-1:0] tag1,
  output logic [TW-1:0] tag0,
  output logic         seen1,
  output logic         seen0
);
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      e1_min <= '1;
      e0_max <= '0;
      tag1   <= '0;
      tag0   <= '0;
      seen1  <= 1'b0;
      seen0  <= 1'b0;
    end else if (valid) begin
      if (upper && (restart || !seen1 || x < e1_min)) begin
        e1_min <= x;
        tag1   <= tag;
      end else if (restart) e1_min <= '1;
      if (lower && (restart || !seen0 || x > e0_max)) begin
        e0_max <= x;
        tag0   <= tag;
      end else if (restart) e0_max <= '0;
      seen1 <= upper || (seen1 && !restart);
      seen0 <= lower || (seen0 && !restart);
    end
  end

  // A sample cannot lie on both sides of one boundary.
  a_sides: assert property (@(posedge clk) disable iff (!rst_n) valid |-> !(upper && lower));
endmodule
