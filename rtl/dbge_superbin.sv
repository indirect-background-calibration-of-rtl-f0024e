// dbge_superbin: the two super histogram bins next to one edge.
//
// A super bin sums SPREAD neighbouring histogram bins. For the lower edge of
// the set above a boundary (DOWN=0) the bins are [e, e+s) ("near", at the edge)
// and [e+s, e+2s) ("far"), where e is the running minimum of the set; for the
// upper edge of the set below a boundary (DOWN=1) they are (e-s, e] and
// (e-2s, e-s], e being the running maximum. The edge e and whether the set has
// a member yet come from the dbge_minmax registers of the same boundary (their
// values before the current sample). The block keeps one counter per code for
// the 2*s codes next to the edge. When a sample moves the edge outward by D
// codes the counters slide by D, dropping those that leave the range; no
// sample was ever seen between the old and the new edge, so the counts stay
// exact and h_near/h_far always describe the super bins at the current edge
// of the current window. A valid sample with restart high starts a new window.
// Counters saturate. Counter outputs are registered, the two sums are formed
// from the counters combinationally.
// The two super bins and their use follow the DBGE method; following the
// running edge with 2*s counters, rather than two accumulators at a fixed
// place, is this design's own way of having the bins at the final edge of
// the window, which is known only when the window closes.
module dbge_superbin #(
  parameter int unsigned W      = 14,
  parameter int unsigned CW     = 17,  // counter width
  parameter int unsigned SPREAD = 2,   // super-bin width s
  parameter bit          DOWN   = 1'b0 // 0: bins above a minimum, 1: below a maximum
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          valid,   // a sample is presented
  input  logic          side,    // it belongs to the set this edge bounds
  input  logic [W-1:0]  x,
  input  logic [W-1:0]  edge_q,  // current edge of the set (before this sample)
  input  logic          seen_q,  // the set has a member in this window
  input  logic          restart,
  output logic [CW-1:0] h_near,
  output logic [CW-1:0] h_far
);
  localparam int unsigned NB = 2 * SPREAD;

  logic [CW-1:0]       cnt [NB];
  logic signed [W+1:0] dpos;   // distance of the sample from the edge, into the set
  int                  dp;

  always_comb begin
    if (DOWN) dpos = $signed({2'b00, edge_q}) - $signed({2'b00, x});
    else      dpos = $signed({2'b00, x}) - $signed({2'b00, edge_q});
    dp = int'(dpos);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < NB; i++) cnt[i] <= '0;
    end else if (valid) begin
      if (restart || !seen_q) begin
        // first member of the set in this window (or none)
        for (int i = 0; i < NB; i++) cnt[i] <= '0;
        if (side) cnt[0] <= CW'(1);
      end else if (side) begin
        if (dp < 0) begin
          // new edge, -dp codes further out: slide the counters
          for (int i = 1; i < NB; i++)
            cnt[i] <= (i + dp >= 0) ? cnt[i + dp] : '0;
          cnt[0] <= CW'(1);
        end else if (dp < int'(NB)) begin
          if (cnt[dp] != '1) cnt[dp] <= cnt[dp] + 1'b1;
        end
      end
    end
  end

  always_comb begin
    h_near = '0;
    h_far  = '0;
    for (int i = 0; i < SPREAD; i++)  h_near += cnt[i];
    for (int i = SPREAD; i < NB; i++) h_far  += cnt[i];
  end
endmodule
