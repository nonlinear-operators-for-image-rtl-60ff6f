// Testbench for mrhf_filter at a short line length (16 pixels): a test
// image with flat areas, a vertical edge, Gaussian-like noise and impulses
// is streamed in raster order with random stalls. Every interior output is
// compared bit-exactly with a reference model built from sorted medians and
// the integer form of the rational stage, and must appear exactly 14
// accepted pixels after the newest pixel of its mask. Outputs must never
// appear on a stalled clock.
module tb_mrhf_filter;
  import img_pkg::*;
  import tb_ref_pkg::*;
  localparam int LW = 16, H = 12, LAT = 14;
  logic clk = 0;
  always #5 clk = ~clk;
  logic rst_n, in_valid, out_valid;
  pixel_t in_pix, out_pix;
  int checks = 0, failures = 0, stalls = 0, outs = 0;
  mrhf_filter #(.LINE_W(LW)) dut (
    .clk, .rst_n, .in_valid, .in_pix, .out_valid, .out_pix,
    .out_phi1(), .out_phi2(), .out_phi3()
  );

  int img [H][LW];

  function automatic int expect_at(int j);
    int r, c, p1, p2, p3, en, ed;
    r = j / LW; c = j % LW;
    p1 = med5(img[r-2][c-1], img[r-1][c-2], img[r-1][c-1], img[r-1][c], img[r][c-1]);
    p2 = tb_ref_pkg::cwmf(img[r-2][c-1], img[r-1][c-2], img[r-1][c-1], img[r-1][c], img[r][c-1]);
    p3 = med5(img[r-2][c-2], img[r-2][c], img[r-1][c-1], img[r][c-2], img[r][c]);
    return rat(p1, p2, p3, 6, en, ed);
  endfunction

  initial begin
    #400000 failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    int k;
    for (int r = 0; r < H; r++)
      for (int c = 0; c < LW; c++) begin
        int v;
        v = (c < LW / 2) ? 60 : 190;
        v += int'($urandom % 21) - 10;
        if ($urandom % 10 == 0) v = ($urandom % 2) ? 255 : 0;
        if (v < 0) v = 0;
        if (v > 255) v = 255;
        img[r][c] = v;
      end
    rst_n = 0; in_valid = 0; in_pix = 0;
    #12 rst_n = 1;
    k = 0;
    while (k < H * LW) begin
      @(negedge clk);
      // check what the previous clock produced
      if (out_valid) begin
        int j;
        outs++;
        j = k - LAT;  // k pixels accepted so far; the last one has index k-1
        if (j < 0) begin failures++; $display("FAIL early output"); end
        else if (j / LW >= 2 && j % LW >= 2) begin
          int ev;
          ev = expect_at(j);
          checks++;
          if (int'(out_pix) != ev) begin
            failures++; $display("FAIL j=%0d got %0d exp %0d", j, out_pix, ev);
          end
        end
      end
      if (!in_valid && out_valid) begin failures++; $display("FAIL output on stall"); end
      in_valid = ($urandom % 4) != 0;
      if (!in_valid) stalls++;
      in_pix = pixel_t'(img[k / LW][k % LW]);
      if (in_valid) k++;
    end
    @(negedge clk);
    in_valid = 0;
    if (out_valid) begin
      outs++;
      checks++;
      if (int'(out_pix) != expect_at(k - LAT)) begin failures++; $display("FAIL last output"); end
    end
    checks++;
    if (outs != H * LW - LAT + 1) begin failures++; $display("FAIL output count %0d", outs); end
    checks++;
    if (stalls == 0) begin failures++; $display("FAIL no stall"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
