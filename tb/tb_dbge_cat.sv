// tb_dbge_cat: checks the CAT block on the integer raw path (1.5 bps digit,
// weight 2^5) and on a fixed-point path with 3 fractional bits and a signed
// sample, against x + d*2^(K+SHIFT) worked out in the testbench.
module tb_dbge_cat;
  int checks = 0, failures = 0;
  logic [1:0]  d;
  logic [15:0] xa, ya;
  logic [21:0] xb, yb;

  dbge_cat #(.K(5), .W(16), .SHIFT(0)) u_a (.d, .x_in(xa), .x_out(ya));
  dbge_cat #(.K(4), .W(22), .SHIFT(3)) u_b (.d, .x_in(xb), .x_out(yb));

  initial begin
    #100000 failures++; $display("watchdog"); $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    for (int n = 0; n < 2000; n++) begin
      int sb;
      d  = 2'($urandom_range(0, 2));
      xa = 16'($urandom_range(0, 31));
      sb = $urandom_range(0, 4000) - 2000;
      xb = 22'(sb);
      #1;
      checks++;
      if (ya !== 16'(xa + d * 32)) begin failures++; $display("raw: d=%0d x=%0d y=%0d", d, xa, ya); end
      checks++;
      if ($signed(yb) != sb + int'(d) * 128) begin failures++; $display("frac: d=%0d x=%0d y=%0d", d, sb, $signed(yb)); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
