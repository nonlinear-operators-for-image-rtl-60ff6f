// Testbench for sq_approx, all 256 inputs. With m = 8 + x0x1x2 (the
// leading one and three bits of d), the table entry must be
// c*(m*m + m) - 1 (one below c*(m+1/2)^2) with c = 2 and a lowered exponent
// for m <= 10, c = 1 otherwise, and the result must approximate d*d within
// the coarse accuracy expected from a 3-bit mantissa.
module tb_sq_approx;
  import img_pkg::*;
  logic [7:0] d;
  afp_t y;
  int checks = 0, failures = 0;
  sq_approx dut (.d, .y);

  initial begin
    #100000 failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    d = 0; #1;
    checks++;
    if (!y.zero) begin failures++; $display("FAIL zero"); end
    for (int v = 1; v < 256; v++) begin
      int msb, m, c, t, e;
      real r, rel;
      d = 8'(v); #1;
      msb = 0;
      for (int i = 0; i < 8; i++) if (v >= (1 << i)) msb = i;
      e = msb + 1;
      m = (msb >= 3) ? (v >> (msb - 3)) : (v << (3 - msb));
      c = (m <= 10) ? 2 : 1;
      t = c * (m * m + m) - 1;
      checks++;
      if (y.zero || y.man !== 8'(t) || y.exp !== 7'(2 * e - (c - 1))) begin
        failures++;
        $display("FAIL d=%0d man=%0d (exp %0d) exp=%0d", v, y.man, t, y.exp);
      end
      r = real'(y.man) / 256.0 * (2.0 ** real'(y.exp));
      rel = (r - real'(v * v)) / real'(v * v);
      checks++;
      if (rel > 0.3 || rel < -0.25) begin
        failures++;
        $display("FAIL accuracy d=%0d sq~%f rel=%f", v, r, rel);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
