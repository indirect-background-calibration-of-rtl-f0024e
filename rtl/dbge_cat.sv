// dbge_cat: the CAT block of a DBGE correction stage.
//
// Appends the decision d of pipeline stage K to the sample formed by the stages
// below it: x_out = x_in + d * 2^(K+SHIFT). For a 1 bit/stage pipeline (d in
// {0,1}) this is plain bit concatenation; for 1.5 bit/stage (d in {0,1,2}) the
// weighted digits overlap and the concatenation is an add, which is how the
// 13-stage 1.5 bps converter yields a 14-bit code. SHIFT places the weight
// above SHIFT fractional bits, so the same block serves the integer raw path
// and the fixed-point corrected path (two's complement, so signed samples work
// too). Purely combinational.
module dbge_cat #(
  parameter int unsigned K     = 0,   // stage index = weight exponent
  parameter int unsigned W     = 22,  // sample width
  parameter int unsigned SHIFT = 0    // fractional bits of the sample
) (
  input  logic [1:0]   d,
  input  logic [W-1:0] x_in,
  output logic [W-1:0] x_out
);
  always_comb x_out = x_in + (W'(d) << (K + SHIFT));
endmodule
