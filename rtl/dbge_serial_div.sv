// dbge_serial_div: serial restoring divider for the super-bin ratio.
//
// Computes quo = num/den as an unsigned fixed-point number with F fractional
// bits, limited to 1.0 (quo = 2^F) when num >= den or den = 0. The ratio of two
// super-bin counts is needed only once per estimation window, so it is formed
// one quotient bit per clock with a shift and a trial subtraction, keeping the
// gate count small. Timing: start is accepted when busy is low; done pulses
// for one clock exactly F+1 clocks after the start edge, with quo valid from
// then until the next start.
module dbge_serial_div #(
  parameter int unsigned NW = 17,  // width of num and den
  parameter int unsigned F  = 6    // fractional bits of the quotient
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          start,
  input  logic [NW-1:0] num,
  input  logic [NW-1:0] den,
  output logic          busy,
  output logic          done,
  output logic [F:0]    quo
);
  localparam int unsigned CNTW = $clog2(F + 1) + 1;

  logic [NW-1:0]   rem;   // always below the divisor
  logic [NW-1:0]   div;
  logic [F-1:0]    q;
  logic            sat;
  logic [CNTW-1:0] cnt;
  logic [NW:0]     rem2;

  always_comb rem2 = {rem, 1'b0};

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rem  <= '0;
      div  <= '0;
      q    <= '0;
      sat  <= 1'b0;
      cnt  <= '0;
      busy <= 1'b0;
      done <= 1'b0;
      quo  <= '0;
    end else begin
      done <= 1'b0;
      if (start && !busy) begin
        rem  <= (num >= den) ? '0 : num;
        div  <= den;
        sat  <= (den == '0) || (num >= den);
        q    <= '0;
        cnt  <= CNTW'(F);
        busy <= 1'b1;
      end else if (busy) begin
        if (cnt != '0) begin
          // one quotient bit: shift the remainder, try to subtract the divisor
          if (rem2 >= {1'b0, div}) begin
            rem <= NW'(rem2 - {1'b0, div});
            q   <= {q[F-2:0], 1'b1};
          end else begin
            rem <= NW'(rem2);
            q   <= {q[F-2:0], 1'b0};
          end
          cnt <= cnt - 1'b1;
        end else begin
          busy <= 1'b0;
          done <= 1'b1;
          quo  <= sat ? (F+1)'(1 << F) : {1'b0, q};
        end
      end
    end
  end
endmodule
