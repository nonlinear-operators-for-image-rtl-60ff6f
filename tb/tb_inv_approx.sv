// Testbench for inv_approx: the 8 table entries must equal
// min(255, floor(2048/(8+idx))) (1/m at the lower end of each mantissa
// interval, 7 fraction bits), the exponent must be 1-e, and the relative
// error against the exact reciprocal of random integers must stay below
// the 12.5 % bound of a 3-bit mantissa.
module tb_inv_approx;
  import img_pkg::*;
  afp_t x, y;
  int checks = 0, failures = 0;
  inv_approx dut (.x, .y);

  initial begin
    #100000 failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    for (int e = -6; e <= 9; e++) begin
      for (int i = 0; i < 8; i++) begin
        int exp_t;
        x.zero = 0; x.exp = 7'(e); x.man = 8'(128 + 16 * i + ($urandom % 16));
        #1;
        exp_t = 2048 / (8 + i);
        if (exp_t > 255) exp_t = 255;
        checks++;
        if (y.man !== 8'(exp_t) || y.exp !== 7'(1 - e) || y.zero) begin
          failures++;
          $display("FAIL idx=%0d e=%0d man=%b exp=%0d", i, e, y.man, y.exp);
        end
      end
    end
    // accuracy on integers 1..255
    for (int v = 1; v < 256; v++) begin
      real r, rel;
      x = uint_to_afp(16'(v));
      #1;
      r = real'(y.man) / 256.0 * (2.0 ** real'(y.exp));
      rel = (r - 1.0 / real'(v)) * real'(v);
      checks++;
      if (rel > 0.125 || rel < -0.125) begin
        failures++;
        $display("FAIL v=%0d 1/v~%f rel=%f", v, r, rel);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
