// Testbench for line_memory at a short line length: a random image is
// streamed with random gaps in in_valid; every column delivered after a
// pixel must hold the pixels of the same column one and two lines above.
module tb_line_memory;
  import img_pkg::*;
  localparam int LW = 13, H = 9;
  logic clk = 0;
  always #5 clk = ~clk;
  logic rst_n, in_valid, col_valid;
  pixel_t in_pix, col_top, col_mid, col_bot;
  int checks = 0, failures = 0;
  line_memory #(.LINE_W(LW)) dut (.clk, .rst_n, .in_valid, .in_pix, .col_valid, .col_top, .col_mid, .col_bot);

  pixel_t img [H][LW];

  initial begin
    #400000 failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    for (int r = 0; r < H; r++) for (int c = 0; c < LW; c++) img[r][c] = 8'($urandom);
    rst_n = 0; in_valid = 0; in_pix = 0;
    #12 rst_n = 1;
    for (int r = 0; r < H; r++)
      for (int c = 0; c < LW; c++) begin
        @(negedge clk);
        in_valid = 1; in_pix = img[r][c];
        @(negedge clk);
        in_valid = 0;
        checks++;
        if (!col_valid || col_bot !== img[r][c] ||
            (r >= 1 && col_mid !== img[r-1][c]) || (r >= 2 && col_top !== img[r-2][c])) begin
          failures++; $display("FAIL r=%0d c=%0d", r, c);
        end
        repeat ($urandom % 2) @(negedge clk);
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
