// mu_lut_2d: coefficient table of the two-dimensional rational
// interpolator x = sum_i mu_i * (p_i + q_i)/2 over the four pixel pairs
// through the missing pixel, with mu_i = w_i / (w_0 + w_1 + w_2 + w_3)
// and w_i = 1/(k*(p_i - q_i)^2 + 1).
//
// Inputs are the four weights w_i from the reciprocal unit (each at most
// 1). Their mantissas are aligned to the largest exponent (block floating
// point) and added exactly to give the sum S; S is registered together with the weights
// (LAT = 1). Each ratio w_i / S is then quantised to the nearest of 0, 1/8,
// 1/4, 1/2, 3/4, 1 by cross-multiplied comparisons with the thresholds
// 1/16, 3/16, 3/8, 5/8, 7/8, and delivered as a 3-bit multiplier code
// (000, 001, 011, 010, 100, 111). The quantised coefficients need not add
// up to exactly 1.
// The six levels are the document's; the block-floating-point sum and the
// comparison are this design's realisation (a sum built from truncating
// 4-bit adders came out low and pushed the coefficients up by a level).
module mu_lut_2d
  import img_pkg::*;
(
  input  logic     clk,
  input  afp_t     w  [4],
  output mu_code_t mu [4]
);
  localparam logic [8:0] C [5] = '{9'd16, 9'd48, 9'd96, 9'd160, 9'd224};

  // weights aligned to the largest exponent (block floating point), so
  // small weights keep their precision; value = fw/65536 * 2^emax
  logic [15:0] fw_c [4], fw [4];
  logic [17:0] s_c, sr;
  always_comb begin
    logic signed [6:0] emax;
    emax = max_exp(w);
    s_c = '0;
    for (int i = 0; i < 4; i++) begin
      fw_c[i] = align_to(w[i], emax);
      s_c += 18'(fw_c[i]);
    end
  end

  always_ff @(posedge clk) begin
    sr <= s_c;
    fw <= fw_c;
  end

  always_comb begin
    for (int i = 0; i < 4; i++) begin
      logic [27:0] l, r;
      int n;
      n = 0;
      l = 28'(fw[i]) << 8;
      for (int j = 0; j < 5; j++) begin
        r = 28'(sr) * 28'(C[j]);
        if (sr != '0 && l >= r) n = j + 1;
      end
      case (n)
        0: mu[i] = MU_0;
        1: mu[i] = MU_1_8;
        2: mu[i] = MU_1_4;
        3: mu[i] = MU_1_2;
        4: mu[i] = MU_3_4;
        default: mu[i] = MU_1;
      endcase
    end
  end
endmodule
