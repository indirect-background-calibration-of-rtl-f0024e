// dbge_cor: the COR block of a DBGE correction stage.
//
// Removes the missing-code gaps of one stage from a sample: the correction of
// every decision boundary that the sample lies above is subtracted,
//   y_out = y_in - c_lo*(d >= 1) - c_hi*(d >= 2).
// With a 1 bit/stage pipeline only c_lo is used and this is exactly y = x - g above the boundary. With
// 1.5 bit/stage the stage has two boundaries, each with its own correction.
// Corrections and samples are signed fixed point (two's complement); a negative
// correction (an overlap rather than a gap, possible with redundant stages)
// works the same way. When en is low the sample passes uncorrected.
// Combinational.
module dbge_cor #(
  parameter int unsigned YW = 23,
  parameter int unsigned GW = 22
) (
  input  logic                 en,
  input  logic [1:0]           d,
  input  logic signed [YW-1:0] y_in,
  input  logic signed [GW-1:0] c_lo,
  input  logic signed [GW-1:0] c_hi,
  output logic signed [YW-1:0] y_out
);
  logic signed [YW-1:0] s_lo, s_hi;
  always_comb begin
    s_lo  = (en && d >= 2'd1) ? YW'(c_lo) : '0;
    s_hi  = (en && d >= 2'd2) ? YW'(c_hi) : '0;
    y_out = y_in - s_lo - s_hi;
  end
endmodule
