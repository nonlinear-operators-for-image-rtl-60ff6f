// Workload testbench for mrhf_filter at its default line length (768): the
// noise experiment of the hybrid filter. A clean test image (ramps, a
// vertical and a horizontal step edge) is corrupted with i.i.d. noise
//
//   nu = (1 - lambda) N(0, s) + lambda N(0, s/lambda),
//
// i.e. each sample is drawn from N(0, s) with probability 1 - lambda and
// from N(0, s/lambda) otherwise, for lambda = 0.1 (impulsive), 0.2 (mixed)
// and 1 (Gaussian) at SNR = 3, 6, 9 and 15 dB. The SNR is taken as
// clean-image variance over noise variance; s follows from it. Gaussian
// samples are sums of 12 uniform numbers. Each of the 12 frames (768 x 16
// pixels) is streamed in raster order with random stalls.
// Checks: every interior output equals the bit-exact reference model and
// appears LAT = 14 accepted pixels after the newest pixel of its mask, and
// in every frame the filtered image is closer to the clean one (MSE) than
// the noisy input, and its MSE is at most 1.25 times that of the
// real-valued filter (a bound of this design). The MSE of the hardware, of
// the input and of the real-valued hybrid filter (K = 6.25, h = 0.01) are
// printed per frame. The noise model, lambda and SNR values follow the
// document; the image, the SNR definition and the bounds are this design's.
module tb_mrhf_noise;
  import img_pkg::*;
  import tb_ref_pkg::*;
  localparam int LW = 768, H = 16, LAT = 14;
  logic clk = 0;
  always #5 clk = ~clk;
  logic rst_n, in_valid, out_valid;
  pixel_t in_pix, out_pix;
  int checks = 0, failures = 0;
  mrhf_filter dut (
    .clk, .rst_n, .in_valid, .in_pix, .out_valid, .out_pix,
    .out_phi1(), .out_phi2(), .out_phi3()
  );

  int clean [H][LW];
  int img   [H][LW];

  function automatic real gauss();
    real s = 0.0;
    for (int i = 0; i < 12; i++) s += real'($urandom % 65536) / 65536.0;
    return s - 6.0;
  endfunction

  function automatic void medians(int j, output int p1, output int p2, output int p3);
    int r, c;
    r = j / LW; c = j % LW;
    p1 = med5(img[r-2][c-1], img[r-1][c-2], img[r-1][c-1], img[r-1][c], img[r][c-1]);
    p2 = tb_ref_pkg::cwmf(img[r-2][c-1], img[r-1][c-2], img[r-1][c-1], img[r-1][c], img[r][c-1]);
    p3 = med5(img[r-2][c-2], img[r-2][c], img[r-1][c-1], img[r][c-2], img[r][c]);
  endfunction

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    real lambdas [3] = '{0.1, 0.2, 1.0};
    int  snrs    [4] = '{3, 6, 9, 15};
    real mean, var_s;
    mean = 0.0; var_s = 0.0;
    for (int r = 0; r < H; r++)
      for (int c = 0; c < LW; c++) begin
        int v;
        v = 50 + (c * 150) / LW + r * 2;
        if (c >= LW / 3 && c < (2 * LW) / 3) v += 40;
        if (r >= H / 2) v -= 30;
        clean[r][c] = v;
        mean += real'(v);
      end
    mean /= real'(H * LW);
    foreach (clean[r, c]) var_s += (real'(clean[r][c]) - mean) ** 2;
    var_s /= real'(H * LW);

    rst_n = 0; in_valid = 0; in_pix = 0;
    foreach (lambdas[li])
      foreach (snrs[si]) begin
        real lam, s, se_hw, se_in, se_th;
        int  k, n;
        lam = lambdas[li];
        // noise variance (1-lam) s^2 + lam (s/lam)^2 = var_s / 10^(SNR/10)
        s = $sqrt(var_s / (10.0 ** (real'(snrs[si]) / 10.0)) / ((1.0 - lam) + 1.0 / lam));
        foreach (img[r, c]) begin
          real z;
          int  v;
          z = gauss() * s;
          if (real'($urandom % 1000) < lam * 1000.0 && lam < 1.0) z = z / lam;
          v = clean[r][c] + int'(z);
          img[r][c] = v < 0 ? 0 : (v > 255 ? 255 : v);
        end
        rst_n = 0;
        repeat (2) @(negedge clk);
        rst_n = 1;
        se_hw = 0.0; se_in = 0.0; se_th = 0.0; n = 0;
        k = 0;
        while (k < H * LW) begin
          @(negedge clk);
          if (out_valid) begin
            int j;
            j = k - LAT;
            if (j < 0) begin failures++; $display("FAIL early output"); end
            else if (j / LW >= 2 && j % LW >= 2) begin
              int p1, p2, p3, ev, en, ed, cv;
              real th;
              medians(j, p1, p2, p3);
              ev = rat(p1, p2, p3, 6, en, ed);
              checks++;
              if (int'(out_pix) != ev) begin
                failures++; $display("FAIL j=%0d got %0d exp %0d", j, out_pix, ev);
              end
              cv = clean[j / LW - 1][j % LW - 1];
              th = rat_real(p1, p2, p3, 6.25);
              se_hw += real'((int'(out_pix) - cv) ** 2);
              se_in += real'((img[j / LW - 1][j % LW - 1] - cv) ** 2);
              se_th += (th - real'(cv)) ** 2;
              n++;
            end
          end
          if (!in_valid && out_valid) begin failures++; $display("FAIL output on stall"); end
          in_valid = ($urandom % 8) != 0;
          in_pix = pixel_t'(img[k / LW][k % LW]);
          if (in_valid) k++;
        end
        @(negedge clk);
        in_valid = 0;
        $display("lambda=%0.1f SNR=%0d dB: MSE input %0.1f, hardware %0.1f, real-valued filter %0.1f (%0d pixels)",
                 lam, snrs[si], se_in / n, se_hw / n, se_th / n, n);
        checks++;
        if (!(se_hw < se_in)) begin failures++; $display("FAIL no noise reduction"); end
        checks++;
        if (se_hw > 1.25 * se_th) begin failures++; $display("FAIL far from real-valued filter"); end
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
