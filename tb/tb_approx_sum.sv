// Testbench for approx_sum: hand-worked vectors, zero operands, and random
// operands for which the result must be normalised, never exceed the exact
// sum of the 4-bit operands, and lose at most two units of the 4-bit
// mantissa (alignment and renormalisation truncation).
module tb_approx_sum;
  import img_pkg::*;
  afp_t a, b, y;
  int checks = 0, failures = 0;
  approx_sum dut (.a, .b, .y);

  function automatic real val(afp_t v);
    return v.zero ? 0.0 : real'(v.man[7:4]) / 16.0 * (2.0 ** real'(v.exp));
  endfunction

  function automatic afp_t mk(int man4, int e);
    afp_t r;
    r.zero = (man4 == 0); r.exp = 7'(e); r.man = {4'(man4), 4'b0};
    return r;
  endfunction

  task automatic exact(afp_t x, afp_t z, real expv);
    a = x; b = z; #1;
    checks++;
    if (val(y) != expv) begin
      failures++;
      $display("FAIL %f + %f = %f, expected %f", val(x), val(z), val(y), expv);
    end
  endtask

  initial begin
    #100000 failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    exact(mk(8, 3), mk(8, 3), 8.0);        // 4 + 4
    exact(mk(12, 2), mk(8, 1), 4.0);       // 3 + 1
    exact(mk(15, 0), mk(8, -8), 0.9375);   // small operand drops out
    exact(mk(0, 0), mk(10, 5), 20.0);      // zero operand
    exact(mk(9, 4), mk(0, 0), 9.0);
    exact(mk(8, 1), mk(12, 1), 2.5);       // 1 + 1.5, renormalised
    repeat (2000) begin
      real s, r;
      a = mk(8 + ($urandom % 8), int'($urandom % 20) - 6);
      b = mk(8 + ($urandom % 8), int'($urandom % 20) - 6);
      #1;
      s = val(a) + val(b);
      r = val(y);
      checks++;
      if (y.zero || !y.man[7] || y.man[3:0] != 0 || r > s ||
          r < s - 2.0 * (2.0 ** real'(y.exp)) / 16.0) begin
        failures++;
        $display("FAIL %f + %f -> %f", val(a), val(b), r);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
