// mu_lut_1d: coefficient table of the one-dimensional rational
// interpolator x = mu*b + (1-mu)*c with mu = alpha/(alpha+beta).
//
// The inputs are the reciprocals ia = 1/alpha and ib = 1/beta as they leave
// the reciprocal unit, so mu = ib/(ia+ib) = 1/(1 + beta/alpha). mu is
// quantised to the nearest of 0, 1/8, 1/4, 1/2, 3/4, 7/8, 1 and delivered as
// the 3-bit multiplier code (000, 001, 011, 010, 100, 110, 111); the
// complement of the code selects 1-mu. Quantising only to these values keeps
// mu + (1-mu) = 1 exactly, so x always lies between b and c.
//
// The table is combinational logic, not a memory: the ratio r = ib/ia is
// compared with the six decision thresholds t/(1-t) (t = 1/16, 3/16, 3/8,
// 5/8, 13/16, 15/16 half-way between levels) by cross-multiplying
// (ib.man << (d+8) against round(256*t/(1-t)) * ia.man, d the exponent
// difference), and the number of thresholds passed selects the code.
// The quantisation levels and codes are the document's; the threshold
// comparison is this design's realisation of the table.
module mu_lut_1d
  import img_pkg::*;
(
  input  afp_t     ia,
  input  afp_t     ib,
  output mu_code_t mu
);
  localparam logic [11:0] C [6] = '{12'd17, 12'd59, 12'd154, 12'd427, 12'd1109, 12'd3840};

  logic signed [7:0] d;
  logic [20:0] l, r;
  int n;

  always_comb begin
    d = 8'(ib.exp) - 8'(ia.exp);
    n = 0;
    l = '0;
    r = '0;
    mu = MU_0;
    if (d >= 8'sd5)        n = 6;
    else if (d <= -8'sd5)  n = 0;
    else begin
      l = 21'(ib.man) << (d + 8'sd8);
      for (int j = 0; j < 6; j++) begin
        r = 21'(ia.man) * 21'(C[j]);
        if (l >= r) n = j + 1;
      end
    end
    case (n)
      0: mu = MU_0;
      1: mu = MU_1_8;
      2: mu = MU_1_4;
      3: mu = MU_1_2;
      4: mu = MU_3_4;
      5: mu = MU_7_8;
      default: mu = MU_1;
    endcase
  end
endmodule
