// rational_core: nonlinear section of the reprogrammable rational filter.
//
// Four lanes each take a pair of pixels (x_k, y_k) and form the coarse
// square of their difference. What follows depends on the mode:
//
//  smoothing / deblocking (eq. 3.1, 3.2): den_k = (x_k - y_k)^2 + beta_k in
//    the 4-bit adder, its reciprocal, times alpha: coef_k =
//    alpha / ((x_k - y_k)^2 + beta_k). Pairs: (a,i) (c,g) (b,h) (d,f).
//  1-D interpolation (eq. 3.3-3.6) on the row [p0 p1 p2 p3] between p1 and
//    p2: the lanes square p1-p0, p2-p0, p1-p3, p2-p3; A = k(sq0+sq1)+1 and
//    B = k(sq2+sq3)+1 (k = 2^k_exp, an exponent shift); their reciprocals
//    address the 1-D table, which returns the code of mu = A/(A+B) for the
//    lane carrying p1 and the complemented code (1-mu) for the lane of p2.
//  2-D interpolation (eq. 3.7, 3.8): same pairs as smoothing,
//    w_k = 1/(k(x_k-y_k)^2 + 1), and the 2-D table returns the four codes.
//
// With exact = 1 the interpolators instead compute their coefficients:
//  an extended adder forms the sum of the weights, its coarse reciprocal is
//  multiplied by each weight, and the results leave on coef_m/coef_e (at
//  LX = 8 clocks) for the radix-4 multipliers; the codes are then 0.
//
// Coefficient output: coef_m (6-bit signed, always positive, 0 1xxxx) and
// coef_e with coef = coef_m/32 * 2^coef_e, valid LC = 5 clocks after the
// mask (1 difference, 2 square, 3 sum with beta, 4 reciprocal, 5 times
// alpha). Code output: mu, valid LM = LC + 5 = 10 clocks after the mask, so
// that a 3-cycle shift-and-add multiplier after the codes finishes together
// with an 8-cycle radix-4 multiplier after the coefficients.
// Fully pipelined, one mask per clock. Computed interpolation coefficients
// appear LX = 8 clocks after the mask. Each arithmetic function is followed
// by a register, as in the document; the lane pairing, the stage order and
// the padding delays are this design's choices.
module rational_core
  import img_pkg::*;
(
  input  logic                clk,
  input  mode_t               mode,
  input  par_t                beta [4],
  input  par_t                alpha,
  input  logic signed [4:0]   k_exp,
  input  logic                exact,
  input  pixel_t              mask [9],
  input  pixel_t              row  [4],
  output logic signed [5:0]   coef_m [4],
  output logic signed [6:0]   coef_e [4],
  output mu_code_t            mu     [4]
);
  localparam int LC = 5;
  localparam int LM = LC + 5;

  // lane pair selection
  pixel_t px [4], py [4];
  always_comb begin
    if (mode == MODE_INTERP_1D) begin
      px[0] = row[1]; py[0] = row[0];
      px[1] = row[2]; py[1] = row[0];
      px[2] = row[1]; py[2] = row[3];
      px[3] = row[2]; py[3] = row[3];
    end else begin
      px[0] = mask[0]; py[0] = mask[8];   // a, i
      px[1] = mask[2]; py[1] = mask[6];   // c, g
      px[2] = mask[1]; py[2] = mask[7];   // b, h
      px[3] = mask[3]; py[3] = mask[5];   // d, f
    end
  end

  // stage 1: absolute differences
  logic [7:0] ad [4];
  always_ff @(posedge clk)
    for (int k = 0; k < 4; k++)
      ad[k] <= (px[k] >= py[k]) ? px[k] - py[k] : py[k] - px[k];

  // stage 2: coarse squares
  afp_t sq_c [4], sq [4];
  for (genvar k = 0; k < 4; k++) begin : g_sq
    sq_approx u_sq (.d(ad[k]), .y(sq_c[k]));
  end
  always_ff @(posedge clk) sq <= sq_c;

  // stage 3: coefficient path den = sq + beta; interpolator path k*sum
  afp_t den_c [4], den [4], pre [4];
  afp_t s01, s23;
  for (genvar k = 0; k < 4; k++) begin : g_den
    approx_sum u_den (.a(sq[k]), .b(par_to_afp(beta[k])), .y(den_c[k]));
  end
  approx_sum u_s01 (.a(sq[0]), .b(sq[1]), .y(s01));
  approx_sum u_s23 (.a(sq[2]), .b(sq[3]), .y(s23));

  function automatic afp_t kmul(afp_t v, logic signed [4:0] ke);
    afp_t r;
    r = v;
    r.exp = v.exp + 7'(ke);
    return r;
  endfunction

  always_ff @(posedge clk) begin
    den <= den_c;
    if (mode == MODE_INTERP_1D) begin
      pre[0] <= kmul(s01, k_exp);
      pre[1] <= kmul(s23, k_exp);
      pre[2] <= kmul(s01, k_exp);
      pre[3] <= kmul(s23, k_exp);
    end else begin
      for (int k = 0; k < 4; k++) pre[k] <= kmul(sq[k], k_exp);
    end
  end

  // stage 4: reciprocals; interpolator path + 1
  localparam afp_t ONE = '{zero: 1'b0, exp: 7'sd1, man: 8'h80};
  afp_t inv_c [4], inv [4], p1_c [4], p1 [4];
  for (genvar k = 0; k < 4; k++) begin : g_inv
    inv_approx u_inv (.x(den[k]), .y(inv_c[k]));
    approx_sum u_p1  (.a(pre[k]), .b(ONE), .y(p1_c[k]));
  end
  always_ff @(posedge clk) begin
    inv <= inv_c;
    p1  <= p1_c;
  end

  // stage 5: coefficient = inv * alpha; interpolator path reciprocals
  afp_t iw_c [4], iw [4];
  for (genvar k = 0; k < 4; k++) begin : g_iw
    inv_approx u_iw (.x(p1[k]), .y(iw_c[k]));
  end
  logic [11:0] pm [4];
  always_comb
    for (int k = 0; k < 4; k++) pm[k] = 12'(inv[k].man) * 12'(alpha.man4);

  logic signed [5:0] cm5 [4];
  logic signed [6:0] ce5 [4];
  always_ff @(posedge clk) begin
    iw <= iw_c;
    for (int k = 0; k < 4; k++) begin
      if (pm[k][11]) begin
        cm5[k] <= {1'b0, pm[k][11:7]};
        ce5[k] <= inv[k].exp + 7'(alpha.exp);
      end else begin
        cm5[k] <= {1'b0, pm[k][10:6]};
        ce5[k] <= inv[k].exp + 7'(alpha.exp) - 7'sd1;
      end
    end
  end

  // ---- computed interpolation coefficients (exact path) ----------------
  // mu_i = w_i / sum(w): stage 6 adds the weights in an extended
  // block-floating-point adder (mantissas aligned to the largest exponent), stage 7 takes the coarse
  // reciprocal of the sum, stage 8 multiplies it by each weight. In 1-D
  // mode the weights are 1/B for b and 1/A for c, since A/(A+B) =
  // (1/B) / (1/A + 1/B).
  afp_t              xw_c [4], xw6 [4], xw7 [4];
  logic [17:0]       sum_c, sum6;
  logic signed [6:0] be_c, be6;
  always_comb begin
    if (mode == MODE_INTERP_1D) begin
      xw_c[0] = iw[1];
      xw_c[1] = iw[0];
      xw_c[2] = '{zero: 1'b1, exp: '0, man: '0};
      xw_c[3] = '{zero: 1'b1, exp: '0, man: '0};
    end else begin
      xw_c = iw;
    end
    be_c  = max_exp(xw_c);
    sum_c = '0;
    for (int k = 0; k < 4; k++) sum_c += 18'(align_to(xw_c[k], be_c));
  end

  afp_t sum_f, isum_c, isum7;
  always_comb begin
    sum_f = uint_to_afp(sum6[17:2]);
    sum_f.exp = sum_f.exp + be6 - 7'sd14;
  end
  inv_approx u_isum (.x(sum_f), .y(isum_c));

  logic [15:0]       xp [4];
  logic signed [5:0] cm8 [4];
  logic signed [6:0] ce8 [4];
  always_comb
    for (int k = 0; k < 4; k++) xp[k] = 16'(xw7[k].man) * 16'(isum7.man);

  always_ff @(posedge clk) begin
    xw6   <= xw_c;
    sum6  <= sum_c;
    be6   <= be_c;
    xw7   <= xw6;
    isum7 <= isum_c;
    for (int k = 0; k < 4; k++) begin
      if (xw7[k].zero || isum7.zero) begin
        cm8[k] <= '0;
        ce8[k] <= '0;
      end else if (xp[k][15]) begin
        cm8[k] <= {1'b0, xp[k][15:11]};
        ce8[k] <= xw7[k].exp + isum7.exp;
      end else begin
        cm8[k] <= {1'b0, xp[k][14:10]};
        ce8[k] <= xw7[k].exp + isum7.exp - 7'sd1;
      end
    end
  end

  logic interp;
  assign interp = (mode == MODE_INTERP_1D) || (mode == MODE_INTERP_2D);
  always_comb
    for (int k = 0; k < 4; k++) begin
      coef_m[k] = (exact && interp) ? cm8[k] : cm5[k];
      coef_e[k] = (exact && interp) ? ce8[k] : ce5[k];
    end

  // stage 6: tables (the 2-D table holds one internal register); mode is
  // static configuration and is read without delay
  mu_code_t m1d_c, m1d, m2d [4];
  mu_lut_1d u_l1 (.ia(iw[0]), .ib(iw[1]), .mu(m1d_c));
  mu_lut_2d u_l2 (.clk, .w(iw), .mu(m2d));

  always_ff @(posedge clk) m1d <= m1d_c;

  // stage 7: select, then pad to LM
  mu_code_t sel [4];
  always_comb begin
    for (int k = 0; k < 4; k++) sel[k] = m2d[k];
    if (mode == MODE_INTERP_1D) begin
      sel[0] = m1d;
      sel[1] = ~m1d;
      sel[2] = MU_0;
      sel[3] = MU_0;
    end else if (mode != MODE_INTERP_2D) begin
      for (int k = 0; k < 4; k++) sel[k] = MU_0;
    end
    if (exact && interp)
      for (int k = 0; k < 4; k++) sel[k] = MU_0;
  end

  mu_code_t dly [LM-6][4];
  always_ff @(posedge clk) begin
    dly[0] <= sel;
    for (int i = 1; i < LM - 6; i++) dly[i] <= dly[i-1];
  end
  assign mu = dly[LM-7];
endmodule
