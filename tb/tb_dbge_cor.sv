// tb_dbge_cor: random decisions, samples and (possibly negative) corrections;
// the output must be y - c_lo*(d>=1) - c_hi*(d>=2), and y unchanged when the
// correction is disabled.
module tb_dbge_cor;
  int checks = 0, failures = 0;
  logic en;
  logic [1:0] d;
  logic signed [22:0] y_in, y_out;
  logic signed [21:0] c_lo, c_hi;

  dbge_cor #(.YW(23), .GW(22)) dut (.*);

  initial begin
    #100000 failures++; $display("watchdog"); $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    for (int n = 0; n < 3000; n++) begin
      int yi, cl, ch, e;
      en = ($urandom_range(0, 4) != 0);
      d  = 2'($urandom_range(0, 2));
      yi = $urandom_range(0, 2000000) - 1000000;
      cl = $urandom_range(0, 20000) - 10000;
      ch = $urandom_range(0, 20000) - 10000;
      y_in = 23'(yi); c_lo = 22'(cl); c_hi = 22'(ch);
      #1;
      e = yi;
      if (en && d >= 1) e -= cl;
      if (en && d == 2) e -= ch;
      checks++;
      if (int'(y_out) != e) begin failures++; $display("d=%0d y=%0d got %0d exp %0d", d, yi, y_out, e); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
