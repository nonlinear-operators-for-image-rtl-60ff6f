// Testbench for plf: random pixels and weights; the result one clock later
// must equal floor(sum w_i*x_i) saturated to 10-bit signed, with the weights
// taken from the list 0, 1/8, 1/4, 3/8, 1/2, 3/4, 7/8, 1, 3/2, 7/4, 2
// (computed here in eighths).
module tb_plf;
  import img_pkg::*;
  logic clk = 0;
  always #5 clk = ~clk;
  pixel_t x [3];
  plf_w_t w [3];
  logic signed [9:0] y;
  int checks = 0, failures = 0;
  plf dut (.clk, .x, .w, .y);

  localparam int E8 [16] = '{0, 1, 2, 3, 4, 6, 7, 8, 12, 14, 16, 0, 0, 0, 0, 0};

  initial begin
    #200000 failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    for (int n = 0; n < 3000; n++) begin
      int s, e;
      @(negedge clk);
      for (int i = 0; i < 3; i++) begin
        x[i] = 8'($urandom);
        w[i].neg = 1'($urandom);
        w[i].idx = (n < 64) ? 4'(n % 16) : 4'($urandom % 12);
      end
      if (n % 7 == 0) begin            // smoothing numerator x + y - 2e
        w[0] = '{neg: 0, idx: 4'd7}; w[1] = '{neg: 1, idx: 4'd10}; w[2] = '{neg: 0, idx: 4'd7};
      end
      s = 0;
      for (int i = 0; i < 3; i++) s += (w[i].neg ? -1 : 1) * E8[w[i].idx] * int'(x[i]);
      e = s >>> 3;
      if (e > 511) e = 511;
      if (e < -512) e = -512;
      @(negedge clk);
      checks++;
      if (int'(y) != e) begin failures++; $display("FAIL n=%0d y=%0d exp=%0d", n, y, e); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
