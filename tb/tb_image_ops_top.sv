// End-to-end testbench for image_ops_top at a short line length (24
// pixels). Both filters run at the same time.
//  Reprogrammable filter: the configuration is shifted in serially for each
//  mode in turn (pass-through smoothing, smoothing, deblocking, 1-D and 2-D
//  interpolation with table codes, 1-D interpolation with computed
//  coefficients: five mode switches), columns are streamed with random
//  gaps, and every output is checked against the operator of its mode
//  (exact for pass-through and flat masks, coarse-arithmetic bounds
//  otherwise) at the 21-clock latency (24 with computed coefficients).
//  Median-rational hybrid filter: a test image with flat, noisy, edge and
//  random black/white regions is streamed in raster order with random
//  stalls; every interior output is compared bit-exactly with the reference
//  model 14 accepted pixels after the newest pixel of its mask.
// Mechanisms counted, each of which must occur: stalls of either filter,
// outputs in each of the four modes, filter-output saturation, the
// centre-weighted median clamping the centre, and 0, 1 and 2 scalings of
// both numerator and denominator in the rational stage.
module tb_image_ops_top;
  import img_pkg::*;
  import tb_ref_pkg::*;
  localparam int LW = 24, H = 20, MLAT = 14;
  logic clk = 0;
  always #5 clk = ~clk;
  logic rst_n;
  logic rf_cfg_shift, rf_cfg_sdi, rf_cfg_sdo, rf_in_valid, rf_out_valid;
  pixel_t rf_in_col [3];
  pixel_t rf_o1, rf_o2, rf_o3;
  logic [2:0] rf_out_oe;
  logic mf_in_valid, mf_out_valid;
  pixel_t mf_in_pix, mf_out_pix;
  int checks = 0, failures = 0;

  image_ops_top #(.LINE_W(LW)) dut (.*);

  // mechanism counters
  int rf_stalls = 0, mf_stalls = 0, rf_sat = 0, clamps = 0, computed_outs = 0;
  int mode_outs [4];
  int en_seen [3], ed_seen [3];

  // ------------------------------------------------------------------
  // reprogrammable filter
  localparam plf_w_t W0 = '{neg: 1'b0, idx: 4'd0};
  localparam plf_w_t WH = '{neg: 1'b0, idx: 4'd4};
  localparam plf_w_t W1 = '{neg: 1'b0, idx: 4'd7};
  localparam plf_w_t WM2 = '{neg: 1'b1, idx: 4'd10};
  int pa [4] = '{0, 2, 1, 3};
  int pb [4] = '{8, 6, 7, 5};

  cfg_t cfg;
  int phase;
  pixel_t cols [$][3];
  int pend [$];

  function automatic real par_val(par_t p);
    return real'(p.man4) / 16.0 * (2.0 ** p.exp);
  endfunction
  function automatic real clipr(real v);
    return (v < 0.0) ? 0.0 : (v > 255.0) ? 255.0 : v;
  endfunction
  function automatic real absr(real v);
    return (v < 0.0) ? -v : v;
  endfunction

  task automatic load_cfg(cfg_t c);
    logic [CFG_W-1:0] w;
    w = c;
    for (int i = CFG_W - 1; i >= 0; i--) begin
      @(negedge clk); rf_cfg_shift = 1; rf_cfg_sdi = w[i];
    end
    @(negedge clk); rf_cfg_shift = 0;
  endtask

  task automatic rf_check(int n);
    int m [9], r [4];
    if (n < 3) return;
    for (int rr = 0; rr < 3; rr++)
      for (int j = 0; j < 3; j++) m[3 * rr + j] = cols[n - 2 + j][rr];
    for (int k = 0; k < 4; k++) r[k] = cols[n - 3 + k][1];
    mode_outs[int'(cfg.mode)]++;
    checks++;
    if (rf_out_oe != cfg.out_en) begin failures++; $display("FAIL out_oe"); end
    case (phase)
      1: begin
        checks++;
        if (rf_o1 != m[4] || rf_o2 != m[4] || rf_o3 != 0) begin failures++; $display("FAIL pass-through"); end
      end
      2, 3: begin
        real ex, bound, t;
        bit flat;
        ex = m[4]; bound = 2.0; flat = 1;
        for (int k = 0; k < 4; k++) begin
          if (phase == 3 && k != 3) continue;
          t = par_val(cfg.alpha) * real'(m[pa[k]] + m[pb[k]] - 2 * m[4]) /
              (real'((m[pa[k]] - m[pb[k]]) ** 2) + par_val(cfg.beta[k]));
          ex += t;
          bound += 0.3 * absr(t);
          if (m[pa[k]] != m[4] || m[pb[k]] != m[4]) flat = 0;
        end
        if (ex < -0.5 || ex > 255.5) rf_sat++;
        checks++;
        if (absr(real'(rf_o2) - clipr(ex)) > bound || (flat && rf_o2 != m[4])) begin
          failures++; $display("FAIL smoothing exp=%f got=%0d", ex, rf_o2);
        end
      end
      4: begin
        int lo, hi;
        lo = (r[1] < r[2]) ? r[1] : r[2];
        hi = (r[1] < r[2]) ? r[2] : r[1];
        checks++;
        if (rf_o1 < lo || rf_o1 > hi) begin failures++; $display("FAIL 1-D got=%0d", rf_o1); end
      end
      5: begin
        real w [4], sw, ex, avg;
        bit flat;
        sw = 0.0; ex = 0.0; avg = 0.0; flat = 1;
        for (int k = 0; k < 4; k++) begin
          w[k] = 1.0 / ((2.0 ** cfg.k_exp) * real'((m[pa[k]] - m[pb[k]]) ** 2) + 1.0);
          sw += w[k];
          if (m[pa[k]] != m[4] || m[pb[k]] != m[4]) flat = 0;
        end
        for (int k = 0; k < 4; k++) begin
          ex += w[k] / sw * real'(m[pa[k]] + m[pb[k]]) / 2.0;
          avg += real'(m[pa[k]] + m[pb[k]]) / 8.0;
        end
        checks++;
        if ((flat && rf_o2 != m[4]) || absr(real'(rf_o2) - clipr(ex)) > avg + 2.0) begin
          failures++; $display("FAIL 2-D exp=%f got=%0d", ex, rf_o2);
        end
      end
      6: begin
        real a, b, ex;
        a = (2.0 ** cfg.k_exp) * ((real'(r[1]) - r[0]) ** 2 + (real'(r[2]) - r[0]) ** 2) + 1.0;
        b = (2.0 ** cfg.k_exp) * ((real'(r[1]) - r[3]) ** 2 + (real'(r[2]) - r[3]) ** 2) + 1.0;
        ex = a / (a + b) * r[1] + b / (a + b) * r[2];
        computed_outs++;
        checks++;
        if (absr(real'(rf_o1) - clipr(ex)) > 0.4 * ex + 2.0) begin
          failures++; $display("FAIL 1-D computed exp=%f got=%0d", ex, rf_o1);
        end
      end
      default: ;
    endcase
  endtask

  task automatic rf_stream(int ncols);
    int sent = 0;
    pixel_t base;
    base = pixel_t'($urandom);
    while (sent < ncols || pend.size() > 0) begin
      @(negedge clk);
      if (rf_out_valid) rf_check(pend.pop_front());
      rf_in_valid = (sent < ncols) && ($urandom % 5 != 0);
      if (sent < ncols && !rf_in_valid) rf_stalls++;
      if (rf_in_valid) begin
        if ($urandom % 8 == 0) base = pixel_t'($urandom);
        for (int rr = 0; rr < 3; rr++) begin
          int v;
          case ($urandom % 4)
            0, 1: v = base;
            2: v = int'(base) + int'($urandom % 41) - 20;
            default: v = int'($urandom % 256);
          endcase
          rf_in_col[rr] = pixel_t'((v < 0) ? 0 : (v > 255) ? 255 : v);
        end
        cols.push_back(rf_in_col);
        pend.push_back(cols.size() - 1);
        sent++;
      end
    end
    @(negedge clk);
    rf_in_valid = 0;
    cols.delete();
  endtask

  function automatic cfg_t base_cfg(mode_t m);
    cfg_t c;
    c = '0;
    c.mode = m;
    for (int l = 0; l < 6; l++) for (int j = 0; j < 3; j++) c.plf_w[l][j] = W0;
    c.gamma = MU_1;
    c.out_en = 3'($urandom);
    return c;
  endfunction

  task automatic run_rf();
    phase = 1;
    cfg = base_cfg(MODE_SMOOTH);
    cfg.plf_w[0][1] = W1;
    cfg.c0_code = MU_1;
    load_cfg(cfg);
    rf_stream(300);
    for (int ph = 2; ph <= 3; ph++) begin
      phase = ph;
      cfg = base_cfg(ph == 2 ? MODE_SMOOTH : MODE_DEBLOCK);
      cfg.plf_w[0][1] = W1;
      cfg.c0_code = MU_1;
      for (int k = 1; k <= 4; k++)
        if (ph == 2 || k == 4) cfg.plf_w[k] = '{W1, WM2, W1};
      cfg.alpha.man4 = 4'd12; cfg.alpha.exp = 6'(ph == 2 ? 3 : 1);
      for (int k = 0; k < 4; k++) begin
        cfg.beta[k].man4 = 4'(8 + $urandom % 8);
        cfg.beta[k].exp  = 6'(int'($urandom % 6) + 2);
      end
      load_cfg(cfg);
      rf_stream(400);
    end
    phase = 4;
    cfg = base_cfg(MODE_INTERP_1D);
    cfg.plf_w[1] = '{W0, W0, W1};
    cfg.plf_w[2] = '{W0, W0, W1};
    cfg.k_exp = -5'sd3;
    load_cfg(cfg);
    rf_stream(300);
    phase = 5;
    cfg = base_cfg(MODE_INTERP_2D);
    for (int k = 1; k <= 4; k++) cfg.plf_w[k] = '{WH, W0, WH};
    cfg.k_exp = -5'sd4;
    load_cfg(cfg);
    rf_stream(300);
    phase = 6;
    cfg = base_cfg(MODE_INTERP_1D);
    cfg.interp_exact = 1'b1;
    cfg.plf_w[1] = '{W0, W0, W1};
    cfg.plf_w[2] = '{W0, W0, W1};
    cfg.k_exp = -5'sd3;
    load_cfg(cfg);
    rf_stream(300);
  endtask

  // ------------------------------------------------------------------
  // median-rational hybrid filter
  int img [H][LW];

  function automatic int mf_expect(int j);
    int r, c, p1, p2, p3, en, ed, cc, y;
    r = j / LW; c = j % LW;
    cc = img[r-1][c-1];
    p1 = med5(img[r-2][c-1], img[r-1][c-2], cc, img[r-1][c], img[r][c-1]);
    p2 = tb_ref_pkg::cwmf(img[r-2][c-1], img[r-1][c-2], cc, img[r-1][c], img[r][c-1]);
    p3 = med5(img[r-2][c-2], img[r-2][c], cc, img[r][c-2], img[r][c]);
    if (p2 != cc) clamps++;
    y = rat(p1, p2, p3, 6, en, ed);
    en_seen[en]++;
    ed_seen[ed]++;
    return y;
  endfunction

  task automatic run_mf();
    int k, outs;
    for (int r = 0; r < H; r++)
      for (int c = 0; c < LW; c++) begin
        int v;
        if (c < 6)       v = 100;                              // flat
        else if (c < 12) v = 80 + int'($urandom % 31) - 15;    // noise
        else if (c < 18) v = (c < 15) ? 40 : 220;              // edge
        else             v = ($urandom % 2) ? 255 : 0;         // black/white
        if ($urandom % 12 == 0) v = ($urandom % 2) ? 255 : 0;  // impulses
        img[r][c] = (v < 0) ? 0 : (v > 255) ? 255 : v;
      end
    k = 0; outs = 0;
    while (k < H * LW) begin
      @(negedge clk);
      if (mf_out_valid) begin
        int j;
        outs++;
        j = k - MLAT;
        if (j / LW >= 2 && j % LW >= 2) begin
          int ev;
          ev = mf_expect(j);
          checks++;
          if (int'(mf_out_pix) != ev) begin failures++; $display("FAIL mrhf j=%0d got %0d exp %0d", j, mf_out_pix, ev); end
        end
      end
      mf_in_valid = ($urandom % 4) != 0;
      if (!mf_in_valid) mf_stalls++;
      mf_in_pix = pixel_t'(img[k / LW][k % LW]);
      if (mf_in_valid) k++;
    end
    @(negedge clk);
    mf_in_valid = 0;
    if (mf_out_valid) begin
      outs++;
      checks++;
      if (int'(mf_out_pix) != mf_expect(k - MLAT)) begin failures++; $display("FAIL mrhf last"); end
    end
    checks++;
    if (outs != H * LW - MLAT + 1) begin failures++; $display("FAIL mrhf output count %0d", outs); end
  endtask

  // ------------------------------------------------------------------
  task automatic need(string what, int n);
    $display("  %-28s %0d", what, n);
    checks++;
    if (n == 0) begin failures++; $display("FAIL mechanism never happened: %s", what); end
  endtask

  initial begin
    #50000000 failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    rst_n = 0;
    rf_cfg_shift = 0; rf_cfg_sdi = 0; rf_in_valid = 0; rf_in_col = '{8'd0, 8'd0, 8'd0};
    mf_in_valid = 0; mf_in_pix = 0;
    #12 rst_n = 1;
    fork
      run_rf();
      run_mf();
    join
    $display("mechanisms:");
    need("reprog filter stalls", rf_stalls);
    need("mrhf stalls", mf_stalls);
    need("smoothing mode outputs", mode_outs[0]);
    need("deblocking mode outputs", mode_outs[1]);
    need("1-D interpolation outputs", mode_outs[2]);
    need("2-D interpolation outputs", mode_outs[3]);
    need("computed-coefficient outputs", computed_outs);
    need("reprog output saturation", rf_sat);
    need("CWMF centre clamped", clamps);
    for (int i = 0; i < 3; i++) begin
      need($sformatf("numerator scaled %0d times", i), en_seen[i]);
      need($sformatf("denominator scaled %0d times", i), ed_seen[i]);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
