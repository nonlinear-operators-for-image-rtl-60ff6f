// img_pkg: types, constants and small helper functions shared by the two
// image filters in this library.
//
// afp_t is the coarse floating-point format of the reprogrammable rational
// operator: value = man/256 * 2^exp, with man[7] = 1 for every non-zero value
// (a normalised mantissa 0.1xxxxxxx). The arithmetic units use only the three
// bits after the leading one (or four bits in the approximated sum); the
// extra mantissa bits carry the 8-bit outputs of the reciprocal and square
// tables. The exponent is wider than the 4 bits plus sign that suffice for
// pixel values because squares and reciprocals of squares also pass through
// this format.
package img_pkg;

  typedef logic [7:0] pixel_t;

  typedef struct packed {
    logic              zero;  // value is 0 (exp and man are don't-care)
    logic signed [6:0] exp;
    logic [7:0]        man;
  } afp_t;

  // Operating modes of the reprogrammable filter. SMOOTH and DEBLOCK use the
  // same coefficient datapath (eq. 3.1 / 3.2); they differ only in the
  // configured PLF weights and betas.
  typedef enum logic [1:0] {
    MODE_SMOOTH    = 2'd0,
    MODE_DEBLOCK   = 2'd1,
    MODE_INTERP_1D = 2'd2,
    MODE_INTERP_2D = 2'd3
  } mode_t;

  // 3-bit code of a quantised interpolation coefficient (Table 3.3):
  // 000=0, 001=1/8, 011=1/4, 010 or 101=1/2, 100=3/4, 110=7/8, 111=1.
  // The bitwise complement of a code is the code of (1 - value).
  typedef logic [2:0] mu_code_t;

  localparam mu_code_t MU_0   = 3'b000;
  localparam mu_code_t MU_1_8 = 3'b001;
  localparam mu_code_t MU_1_4 = 3'b011;
  localparam mu_code_t MU_1_2 = 3'b010;
  localparam mu_code_t MU_3_4 = 3'b100;
  localparam mu_code_t MU_7_8 = 3'b110;
  localparam mu_code_t MU_1   = 3'b111;

  // Programmable linear filter weight: sign and an index into the magnitude
  // list 0, 1/8, 1/4, 3/8, 1/2, 3/4, 7/8, 1, 3/2, 7/4, 2 (indices 0..10;
  // 11..15 read as 0).
  typedef struct packed {
    logic       neg;
    logic [3:0] idx;
  } plf_w_t;

  // Coarse parameter (beta, alpha): 4-bit normalised mantissa 0.1xxx and a
  // signed exponent, value = man4/16 * 2^exp.
  typedef struct packed {
    logic signed [5:0] exp;
    logic [3:0]        man4;
  } par_t;

  // Configuration word of the reprogrammable filter, loaded serially
  // through the reconfiguration shift register.
  typedef struct packed {
    mode_t             mode;
    plf_w_t [5:0][2:0] plf_w;     // weights of the six PLFs
    par_t   [3:0]      beta;      // beta of lanes 1..4
    par_t              alpha;     // alpha (smoothing / deblocking)
    logic signed [4:0] k_exp;     // k = 2^k_exp (interpolators)
    logic              interp_exact; // interpolators: computed coefficients, not table codes
    mu_code_t          c0_code;   // constant multiplier of lane 0
    mu_code_t          c5_code;   // constant multiplier of lane 5
    mu_code_t          gamma;     // output scaling multiplier
    logic [2:0]        out_en;    // output enables of O1, O2, O3
  } cfg_t;

  localparam int CFG_W = $bits(cfg_t);

  function automatic afp_t par_to_afp(par_t p);
    afp_t r;
    r.zero = (p.man4 == 4'd0);
    r.exp  = 7'(p.exp);
    r.man  = {p.man4, 4'b0000};
    return r;
  endfunction

  // Normalise an unsigned integer (up to 16 bits) into afp_t, truncating
  // the mantissa to 8 bits.
  function automatic afp_t uint_to_afp(logic [15:0] v);
    afp_t r;
    int   msb;
    logic [23:0] sh;
    msb = -1;
    for (int i = 0; i < 16; i++) if (v[i]) msb = i;
    r.zero = (msb < 0);
    r.exp  = 7'(msb + 1);
    sh     = {v, 8'h00} >> ((msb < 0) ? 0 : msb + 1);
    r.man  = sh[7:0];
    return r;
  endfunction

  // Largest exponent among four non-zero coarse floats (block exponent).
  function automatic logic signed [6:0] max_exp(afp_t v [4]);
    logic signed [6:0] e;
    e = -7'sd64;
    for (int i = 0; i < 4; i++) if (!v[i].zero && v[i].exp > e) e = v[i].exp;
    return e;
  endfunction

  // Mantissa of v aligned to block exponent e: value = r/65536 * 2^e.
  function automatic logic [15:0] align_to(afp_t v, logic signed [6:0] e);
    logic signed [7:0] d;
    d = 8'(e) - 8'(v.exp);
    if (v.zero || d > 8'sd15) return '0;
    return {v.man, 8'h00} >> d;
  endfunction

endpackage
