// reprog_filter: reprogrammable rational image filter.
//
// One datapath evaluates several rational operators that share the form
// num / ((x - y)^2 + beta): edge-preserving noise smoothing (eq. 3.1),
// MPEG/JPEG deblocking (eq. 3.2, the smoothing datapath with one lane
// switched off) and the 1-D and 2-D rational interpolators (eq. 3.3-3.8).
// Coarse arithmetic makes this cheap: 3-bit mantissa squares and
// reciprocals, 4-bit sums, and interpolation coefficients restricted to
// a few values that a shift-and-add multiplier handles.
//
// Structure (six lanes, 0..5):
//  - input_fifo holds the 3x3 mask a..i and a 4-sample row;
//  - one programmable linear filter (PLF) per lane: lane 0 on (d,e,f),
//    lanes 1..4 on (x_k, e, y_k) with the core's pairs, lane 5 on (b,e,h);
//    in smoothing mode lanes 1..4 form x_k + y_k - 2e and lane 0 passes e;
//  - rational_core computes per lane either the coefficient
//    alpha/((x_k-y_k)^2+beta_k) or an interpolation coefficient code;
//  - lanes 1..4 multiply their PLF output by the coefficient in a radix-4
//    multiplier (smoothing, deblocking) or by the code in a shift-and-add
//    multiplier (interpolation); lanes 0 and 5 always use a shift-and-add
//    multiplier with a configured constant code;
//  - two 3-input adders form the upper (lanes 0-2) and lower (3-5) channel,
//    a final adder their sum, and a last shift-and-add multiplier scales it
//    by gamma. O1 = upper channel, O2 = gamma*(upper+lower), O3 = lower
//    channel, so two 1-D filters can run in the two channels.
//  - config_chain holds the whole configuration as one shift register.
//
// Interface: a column of three pixels per clock with in_valid; outputs are
// rounded and clipped to 8 bits; out_oe[2:0] are the configured output
// enables of O1..O3 (the enables of the output three-state drivers, which
// are left to the pads). Timing: fully pipelined, one sample per clock,
// LAT = 21 clocks: a column presented on clock edge n completes a mask whose
// result appears with out_valid after edge n+20 (21 edges counting edge n);
// the same in every mode except the interpolators with computed
// coefficients (cfg.interp_exact = 1): their coefficients come from the
// core 3 clocks later and go through the radix-4 multipliers, so all lanes
// are taken 3 clocks later from the PLF delay line and LATX = 24.
// The lane structure, the PLFs, the two multiplier kinds and their
// latencies, the channel adders, gamma and the three selectable outputs
// follow the document; the lane/pixel assignment, the fixed-point formats,
// the latency padding and the total latency are this design's choices.
// The radix-4 multipliers are used with the full 16-bit product (8 output
// digits) rather than the 3 digits of the stand-alone block.
module reprog_filter
  import img_pkg::*;
(
  input  logic   clk,
  input  logic   rst_n,
  // configuration
  input  logic   cfg_shift,
  input  logic   cfg_sdi,
  output logic   cfg_sdo,
  // pixel stream
  input  logic   in_valid,
  input  pixel_t in_col [3],
  output logic   out_valid,
  output pixel_t o1, o2, o3,
  output logic [2:0] out_oe
);
  localparam int LC  = 5;
  localparam int LM  = LC + 5;
  localparam int LAT = 21;
  localparam int LX  = LC + 3;     // computed interpolation coefficients
  localparam int LATX = LAT + 3;

  cfg_t cfg;
  config_chain u_cfg (.clk, .rst_n, .cfg_shift, .cfg_sdi, .cfg_sdo, .cfg);

  pixel_t mask [9];
  pixel_t row  [4];
  input_fifo u_fifo (.clk, .in_valid, .col(in_col), .mask, .row);

  // ---- lane inputs ------------------------------------------------------
  pixel_t lx [6][3];
  plf_w_t lw [6][3];
  always_comb begin
    lx[0] = '{mask[3], mask[4], mask[5]};
    lx[5] = '{mask[1], mask[4], mask[7]};
    if (cfg.mode == MODE_INTERP_1D) begin
      lx[1] = '{row[1], mask[4], row[0]};
      lx[2] = '{row[2], mask[4], row[0]};
      lx[3] = '{row[1], mask[4], row[3]};
      lx[4] = '{row[2], mask[4], row[3]};
    end else begin
      lx[1] = '{mask[0], mask[4], mask[8]};
      lx[2] = '{mask[2], mask[4], mask[6]};
      lx[3] = '{mask[1], mask[4], mask[7]};
      lx[4] = '{mask[3], mask[4], mask[5]};
    end
    for (int l = 0; l < 6; l++)
      for (int j = 0; j < 3; j++) lw[l][j] = cfg.plf_w[l][j];
  end

  logic signed [9:0] pl [6];
  for (genvar l = 0; l < 6; l++) begin : g_plf
    plf u_plf (.clk, .x(lx[l]), .w(lw[l]), .y(pl[l]));
  end

  // ---- core ------------------------------------------------------------
  par_t beta [4];
  always_comb for (int k = 0; k < 4; k++) beta[k] = cfg.beta[k];

  logic signed [5:0] coef_m [4];
  logic signed [6:0] coef_e [4];
  mu_code_t          mu     [4];
  rational_core u_core (
    .clk, .mode(cfg.mode), .beta, .alpha(cfg.alpha), .k_exp(cfg.k_exp),
    .exact(cfg.interp_exact),
    .mask, .row, .coef_m, .coef_e, .mu
  );

  // ---- PLF delay lines: to LC for the radix-4 path, to LM for shift-add --
  logic signed [9:0] pd [LM+2][6];
  always_ff @(posedge clk) begin
    pd[0] <= pl;
    for (int i = 1; i < LM + 2; i++) pd[i] <= pd[i-1];
  end

  // computed-coefficient interpolation: every path 3 clocks later
  logic interp, xmode;
  assign interp = (cfg.mode == MODE_INTERP_1D) || (cfg.mode == MODE_INTERP_2D);
  assign xmode  = interp && cfg.interp_exact;

  logic signed [9:0] r4_in [6], sa_in [6];
  always_comb begin
    r4_in = xmode ? pd[LX-2] : pd[LC-2];
    sa_in = xmode ? pd[LM+1] : pd[LM-2];
  end

  // ---- multipliers ------------------------------------------------------
  logic signed [15:0] rp [4];
  logic signed [12:0] sp [6];
  logic signed [6:0]  ce_d [8][4];
  mu_code_t           code [6];

  always_comb begin
    code[0] = cfg.c0_code;
    code[5] = cfg.c5_code;
    for (int k = 0; k < 4; k++) code[k+1] = mu[k];
  end

  for (genvar k = 0; k < 4; k++) begin : g_r4
    radix4_mult #(.A_W(10), .B_W(6), .OUT_DIGITS(8), .LAT(8)) u_r4 (
      .clk, .a(r4_in[k+1]), .b(coef_m[k]), .p(rp[k])
    );
  end
  for (genvar l = 0; l < 6; l++) begin : g_sa
    shift_add_mult #(.A_W(10), .FRAC(3)) u_sa (
      .clk, .a(sa_in[l]), .code(code[l]), .p(sp[l])
    );
  end
  always_ff @(posedge clk) begin
    ce_d[0] <= coef_e;
    for (int i = 1; i < 8; i++) ce_d[i] <= ce_d[i-1];
  end

  // ---- contributions (3 fraction bits) ---------------------------------
  typedef logic signed [23:0] acc_t;
  acc_t ct_c [6], ct [6];
  logic coef_mode;
  assign coef_mode = (cfg.mode == MODE_SMOOTH) || (cfg.mode == MODE_DEBLOCK) || xmode;

  always_comb begin
    ct_c[0] = acc_t'(sp[0]);
    ct_c[5] = acc_t'(sp[5]);
    for (int k = 0; k < 4; k++) begin
      // value = rp * 2^(ce-5); with 3 fraction bits: rp * 2^(ce-2)
      logic signed [7:0] sa;
      sa = 8'(ce_d[7][k]) - 8'sd2;
      if (!coef_mode)          ct_c[k+1] = acc_t'(sp[k+1]);
      else if (sa >= 8'sd7)    ct_c[k+1] = acc_t'(rp[k]) <<< 7;
      else if (sa >= 8'sd0)    ct_c[k+1] = acc_t'(rp[k]) <<< sa;
      else if (sa <= -8'sd23)  ct_c[k+1] = acc_t'(rp[k]) >>> 23;
      else                     ct_c[k+1] = acc_t'(rp[k]) >>> (-sa);
    end
  end

  // ---- two-stage adder, gamma, rounding --------------------------------
  acc_t up, lo, tot, up_d [4], lo_d [4];
  logic signed [26:0] g;

  shift_add_mult #(.A_W(24), .FRAC(3)) u_gamma (
    .clk, .a(tot), .code(cfg.gamma), .p(g)
  );

  function automatic pixel_t clip(logic signed [26:0] v);
    return (v < 0) ? 8'd0 : (v > 27'sd255) ? 8'd255 : 8'(v);
  endfunction

  always_ff @(posedge clk) begin
    ct  <= ct_c;
    up  <= ct[0] + ct[1] + ct[2];
    lo  <= ct[3] + ct[4] + ct[5];
    tot <= up + lo;
    up_d[0] <= up; lo_d[0] <= lo;
    for (int i = 1; i < 4; i++) begin up_d[i] <= up_d[i-1]; lo_d[i] <= lo_d[i-1]; end
    o1 <= clip((27'(up_d[3]) + 27'sd4) >>> 3);
    o3 <= clip((27'(lo_d[3]) + 27'sd4) >>> 3);
    o2 <= clip((g + 27'sd32) >>> 6);
  end

  // ---- valid tag --------------------------------------------------------
  logic [LATX-1:0] vpipe;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) vpipe <= '0;
    else        vpipe <= {vpipe[LATX-2:0], in_valid};
  end
  assign out_valid = xmode ? vpipe[LATX-1] : vpipe[LAT-1];
  assign out_oe    = cfg.out_en;
endmodule
