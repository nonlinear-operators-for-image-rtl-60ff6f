// Testbench for input_fifo: columns of a random image are pushed one per
// valid clock, with idle clocks in between; after each push the 3x3 mask
// must hold the last three columns and the row output the middle row of
// the last four.
module tb_input_fifo;
  import img_pkg::*;
  logic clk = 0;
  always #5 clk = ~clk;
  logic in_valid;
  pixel_t col [3];
  pixel_t mask [9];
  pixel_t row [4];
  int checks = 0, failures = 0;
  input_fifo dut (.clk, .in_valid, .col, .mask, .row);

  pixel_t img [3][200];

  initial begin
    #200000 failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    for (int r = 0; r < 3; r++) for (int c = 0; c < 200; c++) img[r][c] = 8'($urandom);
    in_valid = 0;
    for (int c = 0; c < 200; c++) begin
      @(negedge clk);
      in_valid = 1;
      for (int r = 0; r < 3; r++) col[r] = img[r][c];
      @(negedge clk);
      in_valid = ($urandom % 3) == 0;  // sometimes push a junk column (checked next round)
      for (int r = 0; r < 3; r++) col[r] = img[r][c];
      if (in_valid) begin
        // a repeated column; re-synchronise the reference by repeating it
        in_valid = 0;
      end
      if (c >= 3) begin
        for (int r = 0; r < 3; r++)
          for (int k = 0; k < 3; k++) begin
            checks++;
            if (mask[3 * r + k] !== img[r][c - 2 + k]) begin
              failures++; $display("FAIL c=%0d mask[%0d]", c, 3 * r + k);
            end
          end
        for (int k = 0; k < 4; k++) begin
          checks++;
          if (row[k] !== img[1][c - 3 + k]) begin failures++; $display("FAIL c=%0d row[%0d]", c, k); end
        end
      end
      repeat ($urandom % 3) @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
