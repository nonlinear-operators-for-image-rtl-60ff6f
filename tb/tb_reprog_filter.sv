// Testbench for reprog_filter. The configuration is shifted in serially
// for each phase; random image columns are then streamed with random
// in_valid gaps. The testbench keeps the column history and rebuilds, for
// each out_valid, the 3x3 mask and 4-sample row of that output, exactly
// LAT = 21 clocks after the column that completed the mask.
// Phases:
//  1 pass-through (lane 0 = e, gamma = 1): O1 = O2 = e exactly, O3 = 0;
//  2 smoothing, eq. 3.1: O2 within the coarse-arithmetic bound of the exact
//    e + sum alpha*(x+y-2e)/((x-y)^2+beta_k), never on the wrong side of e
//    by more than 2, exact on flat masks; saturation must occur;
//  3 deblocking (only the horizontal lane active, eq. 3.2): same bound;
//  4 1-D interpolation: O1 always between the two middle row samples and
//    equal to them where they agree;
//  6 1-D interpolation with computed coefficients: O1 within a bound of
//    the exact operator, at LATX = 24 clocks;
//  7 2-D interpolation with computed coefficients: O2 within a bound;
//  5 2-D interpolation: O2 exact on flat masks, within one quantisation
//    level per pair elsewhere, and a mean absolute error below 10 grey levels.
// Latency: the first out_valid must follow the first column by 21 clocks,
// and out_oe must show the configured enables.
module tb_reprog_filter;
  import img_pkg::*;
  localparam int LAT = 21;
  logic clk = 0;
  always #5 clk = ~clk;
  logic rst_n, cfg_shift, cfg_sdi, cfg_sdo, in_valid, out_valid;
  pixel_t in_col [3];
  pixel_t o1, o2, o3;
  logic [2:0] out_oe;
  int checks = 0, failures = 0, sat = 0, n2d = 0;
  real err2d = 0.0, errx = 0.0;
  int nx = 0;

  reprog_filter dut (.clk, .rst_n, .cfg_shift, .cfg_sdi, .cfg_sdo, .in_valid, .in_col,
                     .out_valid, .o1, .o2, .o3, .out_oe);

  localparam plf_w_t W0 = '{neg: 1'b0, idx: 4'd0};
  localparam plf_w_t WH = '{neg: 1'b0, idx: 4'd4};   // 1/2
  localparam plf_w_t W1 = '{neg: 1'b0, idx: 4'd7};   // 1
  localparam plf_w_t WM2 = '{neg: 1'b1, idx: 4'd10}; // -2

  cfg_t cfg;
  int phase;
  pixel_t cols [$][3];   // history of accepted columns
  int pend [$];          // column index of each accepted column, in order

  task automatic load_cfg(cfg_t c);
    logic [CFG_W-1:0] w;
    w = c;
    for (int i = CFG_W - 1; i >= 0; i--) begin
      @(negedge clk); cfg_shift = 1; cfg_sdi = w[i];
    end
    @(negedge clk); cfg_shift = 0;
  endtask

  function automatic real par_val(par_t p);
    return real'(p.man4) / 16.0 * (2.0 ** p.exp);
  endfunction

  function automatic real clipr(real v);
    return (v < 0.0) ? 0.0 : (v > 255.0) ? 255.0 : v;
  endfunction

  function automatic real absr(real v);
    return (v < 0.0) ? -v : v;
  endfunction

  // mask a..i and row of the output belonging to column n
  function automatic void window(int n, output int m [9], output int r [4]);
    for (int rr = 0; rr < 3; rr++)
      for (int j = 0; j < 3; j++) m[3 * rr + j] = cols[n - 2 + j][rr];
    for (int k = 0; k < 4; k++) r[k] = cols[n - 3 + k][1];
  endfunction

  int pa [4] = '{0, 2, 1, 3};
  int pb [4] = '{8, 6, 7, 5};

  task automatic check_out(int n);
    int m [9], r [4];
    if (n < 3) return;
    window(n, m, r);
    case (phase)
      1: begin
        checks += 3;
        if (o1 != m[4] || o2 != m[4] || o3 != 0) begin
          failures++; $display("FAIL pass n=%0d e=%0d o1=%0d o2=%0d o3=%0d", n, m[4], o1, o2, o3);
        end
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
        if (ex < -0.5 || ex > 255.5) sat++;
        checks++;
        if (absr(real'(o2) - clipr(ex)) > bound || (flat && o2 != m[4])) begin
          failures++; $display("FAIL smooth ph=%0d n=%0d exp=%f got=%0d", phase, n, ex, o2);
        end
      end
      4: begin
        int lo, hi;
        lo = (r[1] < r[2]) ? r[1] : r[2];
        hi = (r[1] < r[2]) ? r[2] : r[1];
        checks++;
        if (o1 < lo || o1 > hi) begin
          failures++; $display("FAIL 1d n=%0d b=%0d c=%0d got=%0d", n, r[1], r[2], o1);
        end
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
        err2d += absr(real'(o2) - clipr(ex));
        n2d++;
        // each code is within one level (at most 1/4) of the exact ratio
        if ((flat && o2 != m[4]) || absr(real'(o2) - clipr(ex)) > avg + 2.0) begin
          failures++; $display("FAIL 2d n=%0d exp=%f got=%0d", n, ex, o2);
        end
      end
      6: begin
        real a, b, ex;
        a = (2.0 ** cfg.k_exp) * ((real'(r[1]) - r[0]) ** 2 + (real'(r[2]) - r[0]) ** 2) + 1.0;
        b = (2.0 ** cfg.k_exp) * ((real'(r[1]) - r[3]) ** 2 + (real'(r[2]) - r[3]) ** 2) + 1.0;
        ex = a / (a + b) * r[1] + b / (a + b) * r[2];
        errx += absr(real'(o1) - ex);
        nx++;
        checks++;
        if (absr(real'(o1) - clipr(ex)) > 0.4 * ex + 2.0) begin
          failures++; $display("FAIL 1-D computed n=%0d exp=%f got=%0d", n, ex, o1);
        end
      end
      7: begin
        real w [4], sw, ex;
        sw = 0.0; ex = 0.0;
        for (int k = 0; k < 4; k++) begin
          w[k] = 1.0 / ((2.0 ** cfg.k_exp) * real'((m[pa[k]] - m[pb[k]]) ** 2) + 1.0);
          sw += w[k];
        end
        for (int k = 0; k < 4; k++) ex += w[k] / sw * real'(m[pa[k]] + m[pb[k]]) / 2.0;
        errx += absr(real'(o2) - ex);
        nx++;
        checks++;
        if (absr(real'(o2) - clipr(ex)) > 0.4 * ex + 2.0) begin
          failures++; $display("FAIL 2-D computed n=%0d exp=%f got=%0d", n, ex, o2);
        end
      end
      default: ;
    endcase
  endtask

  // stream columns; image rows drawn around a base level with flat runs
  task automatic stream(int ncols);
    int sent = 0;
    pixel_t base;
    base = pixel_t'($urandom);
    while (sent < ncols || pend.size() > 0) begin
      @(negedge clk);
      if (out_valid) begin
        checks++;
        if (out_oe != cfg.out_en) begin failures++; $display("FAIL out_oe"); end
        check_out(pend.pop_front());
      end
      in_valid = (sent < ncols) && ($urandom % 5 != 0);
      if (in_valid) begin
        if ($urandom % 8 == 0) base = pixel_t'($urandom);
        for (int rr = 0; rr < 3; rr++) begin
          int v;
          case ($urandom % 4)
            0, 1: v = base;
            2: v = int'(base) + int'($urandom % 41) - 20;
            default: v = int'($urandom % 256);
          endcase
          in_col[rr] = pixel_t'((v < 0) ? 0 : (v > 255) ? 255 : v);
        end
        cols.push_back(in_col);
        pend.push_back(cols.size() - 1);
        sent++;
      end else begin
        for (int rr = 0; rr < 3; rr++) in_col[rr] = pixel_t'($urandom);
      end
    end
    @(negedge clk);
    in_valid = 0;
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

  initial begin
    #20000000 failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    int t0, t1;
    rst_n = 0; cfg_shift = 0; cfg_sdi = 0; in_valid = 0;
    in_col = '{8'd0, 8'd0, 8'd0};
    #12 rst_n = 1;

    // phase 1: pass-through, with latency measurement
    phase = 1;
    cfg = base_cfg(MODE_SMOOTH);
    cfg.plf_w[0][1] = W1;
    cfg.c0_code = MU_1;
    load_cfg(cfg);
    repeat (30) @(negedge clk);
    in_valid = 1; in_col = '{8'd1, 8'd2, 8'd3};
    t0 = $time;
    @(negedge clk); in_valid = 0;
    while (!out_valid) @(negedge clk);
    t1 = $time;
    checks++;
    if ((t1 - t0) / 10 != LAT) begin failures++; $display("FAIL latency %0d", (t1 - t0) / 10); end
    @(negedge clk);
    stream(800);

    // phases 2 and 3: smoothing and deblocking
    for (int ph = 2; ph <= 3; ph++)
      for (int run = 0; run < 4; run++) begin
        phase = ph;
        cfg = base_cfg(ph == 2 ? MODE_SMOOTH : MODE_DEBLOCK);
        cfg.plf_w[0][1] = W1;
        cfg.c0_code = MU_1;
        for (int k = 1; k <= 4; k++)
          if (ph == 2 || k == 4) cfg.plf_w[k] = '{W1, WM2, W1};
        cfg.alpha.man4 = 4'(8 + $urandom % 8);
        cfg.alpha.exp  = 6'((run == 3) ? 3 : int'($urandom % 3) - 1);
        for (int k = 0; k < 4; k++) begin
          cfg.beta[k].man4 = 4'(8 + $urandom % 8);
          cfg.beta[k].exp  = 6'(int'($urandom % 8) + 1);
        end
        load_cfg(cfg);
        stream(600);
      end
    checks++;
    if (sat == 0) begin failures++; $display("FAIL no saturation seen"); end

    // phase 4: 1-D interpolation between row[1] (lane 1) and row[2] (lane 2)
    for (int run = 0; run < 3; run++) begin
      phase = 4;
      cfg = base_cfg(MODE_INTERP_1D);
      cfg.plf_w[1] = '{W0, W0, W1};   // row[1]
      cfg.plf_w[2] = '{W0, W0, W1};   // row[2]
      cfg.k_exp = 5'(int'($urandom % 7) - 6);
      load_cfg(cfg);
      stream(600);
    end

    // phase 5: 2-D interpolation
    for (int run = 0; run < 3; run++) begin
      phase = 5;
      cfg = base_cfg(MODE_INTERP_2D);
      for (int k = 1; k <= 4; k++) cfg.plf_w[k] = '{WH, W0, WH};
      cfg.k_exp = 5'(int'($urandom % 7) - 6);
      load_cfg(cfg);
      stream(600);
    end

    // phases 6 and 7: interpolators with computed coefficients
    for (int ph = 6; ph <= 7; ph++) begin
      phase = ph;
      cfg = base_cfg(ph == 6 ? MODE_INTERP_1D : MODE_INTERP_2D);
      cfg.interp_exact = 1'b1;
      if (ph == 6) begin
        cfg.plf_w[1] = '{W0, W0, W1};
        cfg.plf_w[2] = '{W0, W0, W1};
      end else begin
        for (int k = 1; k <= 4; k++) cfg.plf_w[k] = '{WH, W0, WH};
      end
      cfg.k_exp = -5'sd4;
      load_cfg(cfg);
      repeat (30) @(negedge clk);
      in_valid = 1; in_col = '{8'd1, 8'd2, 8'd3};
      t0 = $time;
      @(negedge clk); in_valid = 0;
      while (!out_valid) @(negedge clk);
      t1 = $time;
      checks++;
      if ((t1 - t0) / 10 != LAT + 3) begin failures++; $display("FAIL computed latency %0d", (t1 - t0) / 10); end
      @(negedge clk);
      stream(800);
    end
    $display("computed-coefficient mean abs error %f", errx / nx);
    checks++;
    if (errx / nx > 10.0) begin failures++; $display("FAIL computed mean error"); end

    $display("saturated outputs %0d, 2-D mean abs error %f", sat, err2d / n2d);
    checks++;
    if (err2d / n2d > 10.0) begin failures++; $display("FAIL 2-D mean error"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
