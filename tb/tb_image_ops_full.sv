// Full-size testbench: image_ops_top with every parameter at its default
// (768-pixel lines). One complete frame of 768 x 625 pixels, the target
// picture format, goes through the median-rational hybrid filter in raster
// order with occasional stalls; every interior output is compared
// bit-exactly with the reference model and the number of outputs must be
// the number of pixels minus the 13-pixel pipeline fill. At the same time
// the reprogrammable filter smooths a 3 x 768 strip of the same frame in
// smoothing mode (eq. 3.1 with alpha = 1), each output checked against
// the coarse-arithmetic bound of the exact operator at the 21-clock latency.
module tb_image_ops_full;
  import img_pkg::*;
  import tb_ref_pkg::*;
  localparam int LW = 768, H = 625, MLAT = 14;
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

  image_ops_top dut (.*);

  pixel_t img [H][LW];

  // test frame: smooth shading, a bright disc, a vertical edge, Gaussian-like
  // noise and 5 % impulses
  task automatic make_frame();
    for (int r = 0; r < H; r++)
      for (int c = 0; c < LW; c++) begin
        int v;
        v = 40 + (c * 120) / LW + (r * 40) / H;
        if ((r - 300) * (r - 300) + (c - 500) * (c - 500) < 120 * 120) v += 70;
        if (c >= 200 && c < 260) v = 230;
        v += int'($urandom % 9) + int'($urandom % 9) - 8;
        if ($urandom % 20 == 0) v = ($urandom % 2) ? 255 : 0;
        img[r][c] = pixel_t'((v < 0) ? 0 : (v > 255) ? 255 : v);
      end
  endtask

  function automatic int mf_expect(int j);
    int r, c, p1, p2, p3, en, ed;
    r = j / LW; c = j % LW;
    p1 = med5(img[r-2][c-1], img[r-1][c-2], img[r-1][c-1], img[r-1][c], img[r][c-1]);
    p2 = tb_ref_pkg::cwmf(img[r-2][c-1], img[r-1][c-2], img[r-1][c-1], img[r-1][c], img[r][c-1]);
    p3 = med5(img[r-2][c-2], img[r-2][c], img[r-1][c-1], img[r][c-2], img[r][c]);
    return rat(p1, p2, p3, 6, en, ed);
  endfunction

  task automatic run_mf();
    int k, outs;
    k = 0; outs = 0;
    while (k < H * LW) begin
      @(negedge clk);
      if (mf_out_valid) begin
        int j;
        outs++;
        j = k - MLAT;
        if (j / LW >= 2 && j % LW >= 2) begin
          checks++;
          if (int'(mf_out_pix) != mf_expect(j)) begin
            failures++;
            if (failures < 10) $display("FAIL mrhf j=%0d got %0d exp %0d", j, mf_out_pix, mf_expect(j));
          end
        end
      end
      mf_in_valid = ($urandom % 16) != 0;
      mf_in_pix = img[k / LW][k % LW];
      if (mf_in_valid) k++;
    end
    @(negedge clk);
    mf_in_valid = 0;
    if (mf_out_valid) outs++;
    checks++;
    if (outs != H * LW - MLAT + 1) begin failures++; $display("FAIL mrhf output count %0d", outs); end
  endtask

  localparam plf_w_t W0 = '{neg: 1'b0, idx: 4'd0};
  localparam plf_w_t W1 = '{neg: 1'b0, idx: 4'd7};
  localparam plf_w_t WM2 = '{neg: 1'b1, idx: 4'd10};
  int pa [4] = '{0, 2, 1, 3};
  int pb [4] = '{8, 6, 7, 5};

  task automatic run_rf();
    cfg_t cfg;
    logic [CFG_W-1:0] w;
    int sent, got, t0;
    cfg = '0;
    cfg.mode = MODE_SMOOTH;
    for (int l = 0; l < 6; l++) for (int j = 0; j < 3; j++) cfg.plf_w[l][j] = W0;
    cfg.plf_w[0][1] = W1;
    for (int k = 1; k <= 4; k++) cfg.plf_w[k] = '{W1, WM2, W1};
    cfg.c0_code = MU_1;
    cfg.gamma = MU_1;
    cfg.out_en = 3'b010;
    cfg.alpha = '{exp: 6'sd1, man4: 4'd8};                  // 1
    for (int k = 0; k < 4; k++) cfg.beta[k] = '{exp: 6'sd7, man4: 4'd12};  // 96
    w = cfg;
    for (int i = CFG_W - 1; i >= 0; i--) begin
      @(negedge clk); rf_cfg_shift = 1; rf_cfg_sdi = w[i];
    end
    @(negedge clk); rf_cfg_shift = 0;
    sent = 0; got = 0;
    while (got < LW) begin
      @(negedge clk);
      if (rf_out_valid) begin
        int m [9];
        real ex, bound, t;
        checks++;
        if (got == 0 && ($time - t0) / 10 != 21) begin failures++; $display("FAIL rf latency"); end
        if (got >= 2) begin
          for (int rr = 0; rr < 3; rr++)
            for (int j = 0; j < 3; j++) m[3 * rr + j] = img[299 + rr][got - 2 + j];
          ex = m[4]; bound = 2.0;
          for (int k = 0; k < 4; k++) begin
            t = real'(m[pa[k]] + m[pb[k]] - 2 * m[4]) / (real'((m[pa[k]] - m[pb[k]]) ** 2) + 96.0);
            ex += t;
            bound += 0.3 * ((t < 0.0) ? -t : t);
          end
          if (ex < 0.0) ex = 0.0;
          if (ex > 255.0) ex = 255.0;
          if (real'(rf_o2) - ex > bound || ex - real'(rf_o2) > bound || rf_out_oe != 3'b010) begin
            failures++; $display("FAIL rf col %0d exp %f got %0d", got, ex, rf_o2);
          end
        end
        got++;
      end
      rf_in_valid = sent < LW;
      if (rf_in_valid) begin
        if (sent == 0) t0 = $time;
        for (int rr = 0; rr < 3; rr++) rf_in_col[rr] = img[299 + rr][sent];
        sent++;
      end
    end
  endtask

  initial begin
    #200000000 failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    rst_n = 0;
    rf_cfg_shift = 0; rf_cfg_sdi = 0; rf_in_valid = 0; rf_in_col = '{8'd0, 8'd0, 8'd0};
    mf_in_valid = 0; mf_in_pix = 0;
    make_frame();
    #12 rst_n = 1;
    fork
      run_rf();
      run_mf();
    join
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
