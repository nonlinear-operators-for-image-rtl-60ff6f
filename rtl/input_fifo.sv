// input_fifo: input sample store of the reprogrammable filter.
//
// As the image is scanned, only three new samples (one column of three
// rows) enter the filter mask per step; the others move one position. The
// store keeps the last four columns: the newest three form the 3x3 mask
//     a b c
//     d e f
//     g h i      (c, f, i newest)
// and the middle row of all four columns, row[0..3] (row[3] newest), is the
// 4-sample window of the one-dimensional interpolator.
//
// Timing: a column presented with in_valid is part of the mask from the
// next clock on. Registered outputs, no reset (the contents are data).
// Keeping four columns for the 1-D interpolator is this design's choice.
module input_fifo
  import img_pkg::*;
(
  input  logic   clk,
  input  logic   in_valid,
  input  pixel_t col [3],    // top, middle, bottom
  output pixel_t mask [9],   // a..i row-major
  output pixel_t row [4]     // middle row, oldest first
);
  pixel_t st [3][4];        // [row][column], column 3 newest

  always_ff @(posedge clk) begin
    if (in_valid) begin
      for (int r = 0; r < 3; r++) begin
        for (int c = 0; c < 3; c++) st[r][c] <= st[r][c+1];
        st[r][3] <= col[r];
      end
    end
  end

  always_comb begin
    for (int r = 0; r < 3; r++)
      for (int c = 0; c < 3; c++) mask[3*r+c] = st[r][c+1];
    for (int c = 0; c < 4; c++) row[c] = st[1][c];
  end
endmodule
