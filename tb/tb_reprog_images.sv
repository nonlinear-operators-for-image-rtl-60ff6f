// Workload testbench for reprog_filter on whole images, in the spirit of the
// published operator comparison: the same synthetic image (ramps, step
// edges and a smooth bump, 96 x 24 pixels) is processed by
//  1 noise smoothing: Gaussian noise (sigma about 14) is added and the image
//    is filtered strip by strip: the filter stores no lines, so the three
//    rows around each output row are streamed as 3-pixel columns. alpha =
//    96, beta = 1536 on all four pairs.
//  2 1-D interpolation: every second column is dropped and rebuilt from the
//    four nearest kept samples of its row (k = 1/16), with the table codes
//    and with the computed coefficients.
//  3 deblocking: every 8-pixel row segment is replaced by its mean rounded
//    to a multiple of 16, and the pixels on both sides of each segment edge
//    are filtered with only the (d,f) pair active (alpha 256, beta 512).
// For each run the MSE against the clean image is printed for the input (or
// for the average of the two neighbours), for the hardware and for the
// real-valued operator. Checks: smoothing and deblocking lower the MSE and
// stay within 1.3x of the real-valued operator (deblocking plus 1); the
// interpolators stay within 1.5x of the real-valued interpolator plus 2,
// and every table-code result lies between its two neighbours. Outputs are counted; one must leave per
// column. The image, noise level and parameters are this design's choices;
// the operators and the interpolation set-up follow the document.
module tb_reprog_images;
  import img_pkg::*;
  localparam int W = 96, H = 24;
  logic clk = 0;
  always #5 clk = ~clk;
  logic rst_n, cfg_shift, cfg_sdi, cfg_sdo, in_valid, out_valid;
  pixel_t in_col [3];
  pixel_t o1, o2, o3;
  logic [2:0] out_oe;
  int checks = 0, failures = 0;

  reprog_filter dut (.clk, .rst_n, .cfg_shift, .cfg_sdi, .cfg_sdo, .in_valid, .in_col,
                     .out_valid, .o1, .o2, .o3, .out_oe);

  localparam plf_w_t W0 = '{neg: 1'b0, idx: 4'd0};
  localparam plf_w_t W1 = '{neg: 1'b0, idx: 4'd7};
  localparam plf_w_t WM2 = '{neg: 1'b1, idx: 4'd10};

  int clean [H][W];
  int noisy [H][W];
  cfg_t cfg;

  task automatic load_cfg(cfg_t c);
    logic [CFG_W-1:0] w;
    w = c;
    for (int i = CFG_W - 1; i >= 0; i--) begin
      @(negedge clk); cfg_shift = 1; cfg_sdi = w[i];
    end
    @(negedge clk); cfg_shift = 0;
    repeat (30) @(negedge clk);
  endtask

  function automatic real gauss();
    real s = 0.0;
    for (int i = 0; i < 12; i++) s += real'($urandom % 65536) / 65536.0;
    return s - 6.0;
  endfunction

  function automatic real clipr(real v);
    return (v < 0.0) ? 0.0 : (v > 255.0) ? 255.0 : v;
  endfunction

  // stream n columns; return output o2 (sel 2) or o1 (sel 1) per column index
  task automatic run_strip(pixel_t c [$][3], int sel, output int res [$]);
    int sent = 0, got = 0, n;
    n = c.size();
    res.delete();
    while (got < n) begin
      @(negedge clk);
      if (out_valid) begin
        res.push_back(sel == 2 ? int'(o2) : int'(o1));
        got++;
      end
      in_valid = (sent < n) && ($urandom % 6 != 0);
      if (in_valid) begin
        in_col = c[sent];
        sent++;
      end
    end
    @(negedge clk);
    in_valid = 0;
  endtask

  function automatic cfg_t base_cfg(mode_t m);
    cfg_t c;
    c = '0;
    c.mode = m;
    for (int l = 0; l < 6; l++) for (int j = 0; j < 3; j++) c.plf_w[l][j] = W0;
    c.gamma = MU_1;
    c.out_en = 3'b111;
    return c;
  endfunction

  initial begin
    repeat (2000000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int pa [4] = '{0, 2, 1, 3};
  int pb [4] = '{8, 6, 7, 5};

  initial begin
    rst_n = 0; cfg_shift = 0; cfg_sdi = 0; in_valid = 0;
    in_col = '{8'd0, 8'd0, 8'd0};
    foreach (clean[r, c]) begin
      int v, dr, dc;
      v = 40 + c + r;
      if (c >= W / 2) v += 60;
      if (r >= H / 2 && c < W / 4) v += 50;
      dr = r - H / 2; dc = c - (3 * W) / 4;
      if (dr * dr + dc * dc < 64) v += 40 - (dr * dr + dc * dc) / 2;
      clean[r][c] = v;
      v = v + int'(gauss() * 14.0);
      noisy[r][c] = v < 0 ? 0 : (v > 255 ? 255 : v);
    end
    #12 rst_n = 1;

    // 1: noise smoothing
    begin
      real se_in, se_hw, se_th, alpha, beta;
      int np;
      cfg = base_cfg(MODE_SMOOTH);
      cfg.plf_w[0][1] = W1;
      cfg.c0_code = MU_1;
      for (int k = 1; k <= 4; k++) cfg.plf_w[k] = '{W1, WM2, W1};
      cfg.alpha = '{man4: 4'd12, exp: 6'sd7};    // 12/16 * 2^7 = 96
      for (int k = 0; k < 4; k++) cfg.beta[k] = '{man4: 4'd12, exp: 6'sd11};  // 1536
      alpha = 96.0; beta = 1536.0;
      load_cfg(cfg);
      se_in = 0.0; se_hw = 0.0; se_th = 0.0; np = 0;
      for (int r = 1; r < H - 1; r++) begin
        pixel_t strip [$][3];
        int res [$];
        strip.delete();
        for (int c = 0; c < W; c++)
          strip.push_back('{pixel_t'(noisy[r-1][c]), pixel_t'(noisy[r][c]), pixel_t'(noisy[r+1][c])});
        run_strip(strip, 2, res);
        checks++;
        if (res.size() != W) begin failures++; $display("FAIL output count %0d", res.size()); end
        // output of column n belongs to centre column n-1
        for (int n = 2; n < W; n++) begin
          int m [9];
          real ex;
          for (int rr = 0; rr < 3; rr++)
            for (int j = 0; j < 3; j++) m[3 * rr + j] = noisy[r - 1 + rr][n - 2 + j];
          ex = m[4];
          for (int k = 0; k < 4; k++)
            ex += alpha * real'(m[pa[k]] + m[pb[k]] - 2 * m[4]) /
                  (real'((m[pa[k]] - m[pb[k]]) ** 2) + beta);
          se_in += real'((m[4] - clean[r][n-1]) ** 2);
          se_hw += real'((res[n] - clean[r][n-1]) ** 2);
          se_th += (clipr(ex) - real'(clean[r][n-1])) ** 2;
          np++;
        end
      end
      $display("smoothing: MSE input %0.1f, hardware %0.1f, real-valued %0.1f", se_in / np, se_hw / np, se_th / np);
      checks++;
      if (!(se_hw < se_in)) begin failures++; $display("FAIL smoothing does not reduce noise"); end
      checks++;
      if (se_hw > 1.3 * se_th) begin failures++; $display("FAIL smoothing far from real-valued"); end
    end

    // 2: 1-D interpolation of dropped columns, table codes then computed
    for (int ex_mode = 0; ex_mode < 2; ex_mode++) begin
      real se_lin, se_hw, se_th, kk;
      int np;
      cfg = base_cfg(MODE_INTERP_1D);
      cfg.plf_w[1] = '{W0, W0, W1};
      cfg.plf_w[2] = '{W0, W0, W1};
      cfg.k_exp = -5'sd4;
      cfg.interp_exact = 1'(ex_mode);
      kk = 1.0 / 16.0;
      load_cfg(cfg);
      se_lin = 0.0; se_hw = 0.0; se_th = 0.0; np = 0;
      for (int r = 0; r < H; r++) begin
        pixel_t strip [$][3];
        int res [$];
        int kept [W/2];
        strip.delete();
        for (int j = 0; j < W / 2; j++) begin
          kept[j] = clean[r][2 * j];
          strip.push_back('{8'd0, pixel_t'(kept[j]), 8'd0});
        end
        run_strip(strip, 1, res);
        checks++;
        if (res.size() != W / 2) begin failures++; $display("FAIL output count %0d", res.size()); end
        // output of column n interpolates between kept n-2 and n-1
        for (int n = 3; n < W / 2; n++) begin
          int a, b, c, d, t, lo, hi;
          real A, B, ex;
          a = kept[n-3]; b = kept[n-2]; c = kept[n-1]; d = kept[n];
          t = clean[r][2 * (n - 2) + 1];
          A = kk * real'((b - a) ** 2 + (c - a) ** 2) + 1.0;
          B = kk * real'((b - d) ** 2 + (c - d) ** 2) + 1.0;
          ex = (A * b + B * c) / (A + B);
          lo = b < c ? b : c; hi = b < c ? c : b;
          if (ex_mode == 0) begin
            checks++;
            if (res[n] < lo || res[n] > hi) begin failures++; $display("FAIL 1-D range"); end
          end
          se_lin += (real'(b + c) / 2.0 - real'(t)) ** 2;
          se_hw += real'((res[n] - t) ** 2);
          se_th += (ex - real'(t)) ** 2;
          np++;
        end
      end
      $display("1-D interpolation (%s): MSE linear %0.1f, hardware %0.1f, real-valued %0.1f",
               ex_mode ? "computed" : "table", se_lin / np, se_hw / np, se_th / np);
      checks++;
      if (se_hw > 1.5 * se_th + 2.0 * np) begin failures++; $display("FAIL interpolation far from real-valued"); end
    end

    // 3: deblocking across vertical block edges: every 8-pixel segment of a
    // row is replaced by its mean rounded to a multiple of 16 (a coarse
    // block code); only the (d,f) lane is active and only the two pixels
    // next to each edge take the filter output
    begin
      real se_in, se_hw, se_th, alpha, beta;
      int np;
      int blk [H][W];
      foreach (blk[r, c]) begin
        int sum;
        sum = 0;
        for (int j = 0; j < 8; j++) sum += clean[r][(c / 8) * 8 + j];
        blk[r][c] = ((sum / 8 + 8) / 16) * 16;
      end
      cfg = base_cfg(MODE_DEBLOCK);
      cfg.plf_w[0][1] = W1;
      cfg.c0_code = MU_1;
      cfg.plf_w[4] = '{W1, WM2, W1};
      cfg.alpha = '{man4: 4'd8, exp: 6'sd9};     // 256
      cfg.beta[3] = '{man4: 4'd8, exp: 6'sd10};  // 512
      alpha = 256.0; beta = 512.0;
      load_cfg(cfg);
      se_in = 0.0; se_hw = 0.0; se_th = 0.0; np = 0;
      for (int r = 1; r < H - 1; r++) begin
        pixel_t strip [$][3];
        int res [$];
        strip.delete();
        for (int c = 0; c < W; c++)
          strip.push_back('{pixel_t'(blk[r-1][c]), pixel_t'(blk[r][c]), pixel_t'(blk[r+1][c])});
        run_strip(strip, 2, res);
        checks++;
        if (res.size() != W) begin failures++; $display("FAIL output count %0d", res.size()); end
        for (int n = 2; n < W; n++) begin
          int cc, d, e, f;
          real ex;
          cc = n - 1;
          if (cc % 8 != 0 && cc % 8 != 7) continue;
          d = blk[r][cc-1]; e = blk[r][cc]; f = blk[r][cc+1];
          ex = real'(e) + alpha * real'(d + f - 2 * e) / (real'((d - f) ** 2) + beta);
          se_in += real'((e - clean[r][cc]) ** 2);
          se_hw += real'((res[n] - clean[r][cc]) ** 2);
          se_th += (clipr(ex) - real'(clean[r][cc])) ** 2;
          np++;
        end
      end
      $display("deblocking (edge pixels): MSE blocky %0.1f, hardware %0.1f, real-valued %0.1f", se_in / np, se_hw / np, se_th / np);
      checks++;
      if (!(se_hw < se_in)) begin failures++; $display("FAIL deblocking does not reduce the error"); end
      checks++;
      if (se_hw > 1.3 * se_th + np) begin failures++; $display("FAIL deblocking far from real-valued"); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
