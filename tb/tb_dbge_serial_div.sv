// tb_dbge_serial_div: random and corner-case divisions (num < den, num >= den,
// den = 0); the quotient is compared with min(floor(num*2^F/den), 2^F) and the
// done pulse must come exactly F+1 clocks after the start edge.
module tb_dbge_serial_div;
  localparam int F = 6;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  logic start, busy, done;
  logic [16:0] num, den;
  logic [F:0] quo;

  dbge_serial_div #(.NW(17), .F(F)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    #2000000 failures++; $display("watchdog"); $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    start = 0; num = 0; den = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < 1000; n++) begin
      longint exp_q;
      int lat;
      @(negedge clk);
      case (n % 10)
        0: begin num = 17'($urandom_range(0, 100)); den = 0; end
        1: begin den = 17'($urandom_range(1, 100000)); num = den + 17'($urandom_range(0, 20)); end
        default: begin den = 17'($urandom_range(1, 100000)); num = 17'($urandom_range(0, int'(den))); end
      endcase
      exp_q = (den == 0) ? (1 << F) : ((longint'(num) << F) / den);
      if (exp_q > (1 << F)) exp_q = 1 << F;
      start = 1;
      @(posedge clk); #1;
      start = 0;
      lat = 0;
      while (!done && lat < 50) begin @(posedge clk); #1; lat++; end
      checks++;
      if (lat != F + 1) begin failures++; $display("latency %0d", lat); end
      checks++;
      if (longint'(quo) != exp_q) begin failures++; $display("%0d/%0d: got %0d exp %0d", num, den, quo, exp_q); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
