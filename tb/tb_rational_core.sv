// Testbench for rational_core. A new random mask enters every clock (with
// a share of flat masks and small differences so all ranges occur) and the
// outputs are compared with the exact real-valued operator for the mask
// that entered exactly LC = 5 clocks (coefficients) or LM = 10 clocks (mu
// codes) earlier:
//  - smoothing / deblocking: coef within [0.55, 1.3] of
//    alpha / ((x-y)^2 + beta) for each lane pair; mu codes all zero;
//  - 1-D interpolation: the code on lane 0 is within one quantisation level
//    of A/(A+B), and lane 1 carries its complement (the two sum to 1);
//  - 2-D interpolation: each code within one level of w_i / sum(w);
//  - both interpolators with computed coefficients (exact = 1): the codes
//    are zero and the coefficients, LX = 8 clocks after the mask, lie
//    within [0.75, 1.45] of the exact mu (or below 0.05 where mu < 0.02).
module tb_rational_core;
  import img_pkg::*;
  localparam int LC = 5, LM = 10, LX = 8;
  logic clk = 0;
  always #5 clk = ~clk;
  mode_t mode;
  par_t beta [4];
  par_t alpha;
  logic signed [4:0] k_exp;
  logic exact;
  pixel_t mask [9];
  pixel_t row [4];
  logic signed [5:0] coef_m [4];
  logic signed [6:0] coef_e [4];
  mu_code_t mu [4];
  int checks = 0, failures = 0;
  real rmin = 10.0, rmax = 0.0, xmin = 10.0, xmax = 0.0;
  int lvl_hist [7];

  rational_core dut (.clk, .mode, .beta, .alpha, .k_exp, .exact, .mask, .row, .coef_m, .coef_e, .mu);

  typedef struct { pixel_t m [9]; pixel_t r [4]; } stim_t;
  stim_t hist [$];

  function automatic real par_val(par_t p);
    return real'(p.man4) / 16.0 * (2.0 ** p.exp);
  endfunction

  function automatic real code_val(mu_code_t c);
    case (c)
      MU_0: return 0.0;     MU_1_8: return 0.125; MU_1_4: return 0.25;
      MU_1_2: return 0.5;   3'b101: return 0.5;   MU_3_4: return 0.75;
      MU_7_8: return 0.875; default: return 1.0;
    endcase
  endfunction

  // index of a value among the levels of a table
  function automatic int lvl_idx(real v, int two_d);
    real l1 [7] = '{0.0, 0.125, 0.25, 0.5, 0.75, 0.875, 1.0};
    real l2 [6] = '{0.0, 0.125, 0.25, 0.5, 0.75, 1.0};
    int best = 0;
    real bd = 10.0;
    if (two_d) begin
      for (int i = 0; i < 6; i++) if ((v - l2[i]) ** 2 < bd) begin bd = (v - l2[i]) ** 2; best = i; end
    end else begin
      for (int i = 0; i < 7; i++) if ((v - l1[i]) ** 2 < bd) begin bd = (v - l1[i]) ** 2; best = i; end
    end
    return best;
  endfunction

  function automatic pixel_t rpix(pixel_t base);
    int v;
    case ($urandom % 4)
      0: v = base;
      1: v = int'(base) + int'($urandom % 7) - 3;
      2: v = int'(base) + int'($urandom % 61) - 30;
      default: v = int'($urandom % 256);
    endcase
    if (v < 0) v = 0;
    if (v > 255) v = 255;
    return pixel_t'(v);
  endfunction

  task automatic drive();
    stim_t s;
    pixel_t base;
    base = pixel_t'($urandom);
    for (int i = 0; i < 9; i++) s.m[i] = rpix(base);
    for (int i = 0; i < 4; i++) s.r[i] = rpix(base);
    mask = s.m; row = s.r;
    hist.push_front(s);
    if (hist.size() > 16) void'(hist.pop_back());
  endtask

  int pa [4] = '{0, 2, 1, 3};
  int pb [4] = '{8, 6, 7, 5};

  task automatic check_coef();
    stim_t s;
    s = hist[LC - 1];
    for (int k = 0; k < 4; k++) begin
      real d, ex, hw, r;
      d  = real'(s.m[pa[k]]) - real'(s.m[pb[k]]);
      ex = par_val(alpha) / (d * d + par_val(beta[k]));
      hw = real'(coef_m[k]) / 32.0 * (2.0 ** coef_e[k]);
      r  = hw / ex;
      if (r < rmin) rmin = r;
      if (r > rmax) rmax = r;
      checks++;
      if (r < 0.55 || r > 1.3) begin
        failures++; $display("FAIL coef lane %0d d=%0f exp=%g got=%g", k, d, ex, hw);
      end
    end
  endtask

  task automatic check_mu();
    stim_t s;
    real kk;
    s = hist[LM - 1];
    kk = 2.0 ** k_exp;
    if (mode == MODE_INTERP_1D) begin
      real a, b, m;
      a = kk * ((real'(s.r[1]) - s.r[0]) ** 2 + (real'(s.r[2]) - s.r[0]) ** 2) + 1.0;
      b = kk * ((real'(s.r[1]) - s.r[3]) ** 2 + (real'(s.r[2]) - s.r[3]) ** 2) + 1.0;
      m = a / (a + b);
      checks += 3;
      lvl_hist[lvl_idx(code_val(mu[0]), 0)]++;
      if ((lvl_idx(m, 0) - lvl_idx(code_val(mu[0]), 0)) ** 2 > 1) begin
        failures++; $display("FAIL 1d mu exp %f got %f", m, code_val(mu[0]));
      end
      if (code_val(mu[0]) + code_val(mu[1]) != 1.0) begin failures++; $display("FAIL 1d complement"); end
      if (mu[2] != MU_0 || mu[3] != MU_0) begin failures++; $display("FAIL 1d unused lanes"); end
    end else if (mode == MODE_INTERP_2D) begin
      real w [4], sw;
      sw = 0.0;
      for (int k = 0; k < 4; k++) begin
        real d;
        d = real'(s.m[pa[k]]) - real'(s.m[pb[k]]);
        w[k] = 1.0 / (kk * d * d + 1.0);
        sw += w[k];
      end
      for (int k = 0; k < 4; k++) begin
        checks++;
        if ((lvl_idx(w[k] / sw, 1) - lvl_idx(code_val(mu[k]), 1)) ** 2 > 1) begin
          failures++; $display("FAIL 2d mu lane %0d exp %f got %f", k, w[k] / sw, code_val(mu[k]));
        end
      end
    end else begin
      checks++;
      for (int k = 0; k < 4; k++)
        if (mu[k] != MU_0) begin failures++; $display("FAIL codes in coefficient mode"); break; end
    end
  endtask

  task automatic check_exact();
    stim_t s;
    real kk, mu_ex [4], hw;
    s = hist[LX - 1];
    kk = 2.0 ** k_exp;
    if (mode == MODE_INTERP_1D) begin
      real a, b;
      a = kk * ((real'(s.r[1]) - s.r[0]) ** 2 + (real'(s.r[2]) - s.r[0]) ** 2) + 1.0;
      b = kk * ((real'(s.r[1]) - s.r[3]) ** 2 + (real'(s.r[2]) - s.r[3]) ** 2) + 1.0;
      mu_ex = '{a / (a + b), b / (a + b), 0.0, 0.0};
    end else begin
      real w [4], sw;
      sw = 0.0;
      for (int k = 0; k < 4; k++) begin
        real d;
        d = real'(s.m[pa[k]]) - real'(s.m[pb[k]]);
        w[k] = 1.0 / (kk * d * d + 1.0);
        sw += w[k];
      end
      for (int k = 0; k < 4; k++) mu_ex[k] = w[k] / sw;
    end
    for (int k = 0; k < 4; k++) begin
      hw = real'(coef_m[k]) / 32.0 * (2.0 ** coef_e[k]);
      checks += 2;
      if (mu[k] != MU_0) begin failures++; $display("FAIL code in computed mode"); end
      if (mu_ex[k] < 0.02) begin
        if (hw > 0.05) begin failures++; $display("FAIL exact lane %0d small mu %f got %f", k, mu_ex[k], hw); end
      end else begin
        if (hw / mu_ex[k] < xmin) xmin = hw / mu_ex[k];
        if (hw / mu_ex[k] > xmax) xmax = hw / mu_ex[k];
        if (hw / mu_ex[k] < 0.75 || hw / mu_ex[k] > 1.45) begin
          failures++; $display("FAIL exact lane %0d mu %f got %f r=%p k=%0d m=%0d e=%0d", k, mu_ex[k], hw, s.r, k_exp, coef_m[k], coef_e[k]);
        end
      end
    end
  endtask

  initial begin
    #2000000 failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    mode_t modes [4] = '{MODE_SMOOTH, MODE_DEBLOCK, MODE_INTERP_1D, MODE_INTERP_2D};
    for (int mi = 0; mi < 6; mi++) begin
      for (int run = 0; run < 4; run++) begin
        @(negedge clk);
        mode = modes[mi % 4];
        exact = mi >= 4;
        if (mi == 4) mode = MODE_INTERP_1D;
        if (mi == 5) mode = MODE_INTERP_2D;
        k_exp = 5'(int'($urandom % 7) - 6);
        alpha.man4 = 4'(8 + $urandom % 8); alpha.exp = 6'(int'($urandom % 5) - 1);
        for (int k = 0; k < 4; k++) begin
          beta[k].man4 = 4'(8 + $urandom % 8);
          beta[k].exp  = 6'(int'($urandom % 12) - 2);
        end
        hist.delete();
        for (int t = 0; t < 600; t++) begin
          drive();
          @(posedge clk);
          @(negedge clk);
          if (t >= LM + 1) begin
            if (exact) check_exact();
            else begin
              if (mode == MODE_SMOOTH || mode == MODE_DEBLOCK) check_coef();
              check_mu();
            end
          end
        end
      end
    end
    $display("coef ratio range %f .. %f; 1-D level histogram %p; computed mu ratio %f .. %f", rmin, rmax, lvl_hist, xmin, xmax);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
