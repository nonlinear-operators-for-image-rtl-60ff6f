// Testbench for mu_lut_2d: four equal weights must give 1/4 each; one
// dominant weight must give 1 and 0 for the rest; for random weights each
// code must be the quantisation level of w_i / sum(w) computed in real
// arithmetic (the block forms the sum exactly in fixed point), with a
// neighbouring level allowed only within 1 % of a decision threshold.
// The result is checked one clock after the inputs (stated latency 1).
module tb_mu_lut_2d;
  import img_pkg::*;
  logic clk = 0;
  always #5 clk = ~clk;
  afp_t w [4];
  mu_code_t mu [4];
  int checks = 0, failures = 0;
  mu_lut_2d dut (.clk, .w, .mu);

  localparam real THR [5] = '{0.0625, 0.1875, 0.375, 0.625, 0.875};

  function automatic int lvl_of(mu_code_t c);
    case (c)
      3'b000: return 0; 3'b001: return 1; 3'b011: return 2;
      3'b010: return 3; 3'b100: return 4; 3'b111: return 5;
      default: return -10;
    endcase
  endfunction

  function automatic real val(afp_t v);
    return real'(v.man[7:4]) / 16.0 * (2.0 ** real'(v.exp));
  endfunction

  function automatic afp_t mk(int man, int e);
    afp_t r;
    r.zero = 0; r.exp = 7'(e); r.man = 8'(man);
    return r;
  endfunction

  initial begin
    #200000 failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    @(negedge clk);
    for (int i = 0; i < 4; i++) w[i] = mk(128, 0);
    @(negedge clk);
    for (int i = 0; i < 4; i++) begin
      checks++;
      if (mu[i] !== MU_1_4) begin failures++; $display("FAIL equal %0d %b", i, mu[i]); end
    end
    w[0] = mk(128, 0); w[1] = mk(128, -9); w[2] = mk(128, -9); w[3] = mk(128, -10);
    @(negedge clk);
    checks++;
    if (mu[0] !== MU_1 || mu[1] !== MU_0 || mu[2] !== MU_0 || mu[3] !== MU_0) begin
      failures++; $display("FAIL dominant");
    end
    repeat (2000) begin
      real s, r;
      for (int i = 0; i < 4; i++) w[i] = mk(128 + 16 * ($urandom % 8), 1 - int'($urandom % 6));
      @(negedge clk);
      s = 0.0;
      for (int i = 0; i < 4; i++) s += val(w[i]);
      for (int i = 0; i < 4; i++) begin
        int best, got;
        bit near;
        r = val(w[i]) / s;
        // level = number of decision thresholds 1/16, 3/16, 3/8, 5/8, 7/8
        // passed; a ratio within 1 % of a threshold may go either way
        best = 0;
        near = 0;
        for (int j = 0; j < 5; j++) begin
          if (r >= THR[j]) best = j + 1;
          if ((r - THR[j]) ** 2 < 1.0e-4) near = 1;
        end
        got = lvl_of(mu[i]);
        checks++;
        if (near ? (got < best - 1 || got > best + 1) : (got != best)) begin
          failures++;
          $display("FAIL r=%f best=%0d got=%0d", r, best, got);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
