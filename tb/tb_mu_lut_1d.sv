// Testbench for mu_lut_1d: random reciprocal pairs. mu = ib/(ia+ib) is
// computed in real arithmetic from the input values; the returned code must
// be the level nearest to mu (either neighbour is accepted within 2 % of a
// decision threshold), and swapping the inputs must give the complemented
// code (mu + (1-mu) = 1) away from the thresholds. Hand cases: equal
// inputs give 1/2, a 64:1 ratio gives 1 and 0.
module tb_mu_lut_1d;
  import img_pkg::*;
  afp_t ia, ib;
  mu_code_t mu, mu_sw;
  int checks = 0, failures = 0;
  mu_lut_1d dut (.ia, .ib, .mu);
  mu_lut_1d dut_sw (.ia(ib), .ib(ia), .mu(mu_sw));

  localparam real LVL [7] = '{0.0, 0.125, 0.25, 0.5, 0.75, 0.875, 1.0};
  localparam real THR [6] = '{0.0625, 0.1875, 0.375, 0.625, 0.8125, 0.9375};

  function automatic real code_val(mu_code_t c);
    case (c)
      3'b000: return 0.0;   3'b001: return 0.125; 3'b011: return 0.25;
      3'b010, 3'b101: return 0.5;
      3'b100: return 0.75;  3'b110: return 0.875; default: return 1.0;
    endcase
  endfunction

  function automatic real val(afp_t v);
    return real'(v.man) / 256.0 * (2.0 ** real'(v.exp));
  endfunction

  function automatic afp_t rnd();
    afp_t r;
    r.zero = 0; r.exp = 7'(int'($urandom % 14) - 7); r.man = 8'(128 + $urandom % 128);
    return r;
  endfunction

  initial begin
    #100000 failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    ia = '{zero: 0, exp: 7'sd0, man: 8'h80}; ib = ia; #1;
    checks++; if (code_val(mu) != 0.5) begin failures++; $display("FAIL equal"); end
    ib.exp = 7'sd6; #1;
    checks++; if (mu !== MU_1 || mu_sw !== MU_0) begin failures++; $display("FAIL 64:1 %b %b", mu, mu_sw); end
    repeat (3000) begin
      real m, got;
      int best, near_thr;
      ia = rnd(); ib = rnd(); #1;
      m = val(ib) / (val(ia) + val(ib));
      best = 0;
      for (int j = 0; j < 7; j++) if ((m - LVL[j]) ** 2 < (m - LVL[best]) ** 2) best = j;
      near_thr = 0;
      for (int j = 0; j < 6; j++) if (m > THR[j] * 0.98 && m < THR[j] * 1.02) near_thr = 1;
      got = code_val(mu);
      checks++;
      if (got != LVL[best] && !(near_thr &&
          ((best > 0 && got == LVL[best-1]) || (best < 6 && got == LVL[best+1])))) begin
        failures++;
        $display("FAIL mu=%f got %f", m, got);
      end
      if (!near_thr) begin
        checks++;
        if (code_val(mu) + code_val(mu_sw) != 1.0) begin
          failures++;
          $display("FAIL complement mu=%f %b %b", m, mu, mu_sw);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
