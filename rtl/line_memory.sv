// line_memory: two-line input buffer of the median-rational hybrid filter.
//
// Pixels arrive one per enabled clock in raster order. The buffer keeps the
// two previous image lines in two arrays of LINE_W pixels that share one
// column address. Each accepted pixel reads the pixels of the same column one
// and two lines above and overwrites them (the older line takes the value of
// the younger one, the younger takes the new pixel), so old data are
// replaced as soon as they are no longer needed. The result is a vertical
// column of three pixels per clock, which is what the 3x3 mask consumes.
//
// Interface: in_valid qualifies in_pix; col_top/col_mid/col_bot are the
// pixels two lines above, one line above and the new pixel, registered, and
// valid one clock after the pixel was accepted (col_valid).
// The document gives the function (two stored lines, three pixels per
// clock) and the 768-pixel line of its target video format; the
// shared-address organisation is this design's choice.
module line_memory
  import img_pkg::*;
#(
  parameter int LINE_W = 768
) (
  input  logic   clk,
  input  logic   rst_n,
  input  logic   in_valid,
  input  pixel_t in_pix,
  output logic   col_valid,
  output pixel_t col_top,
  output pixel_t col_mid,
  output pixel_t col_bot
);
  localparam int AW = (LINE_W > 1) ? $clog2(LINE_W) : 1;

  pixel_t line1 [LINE_W];   // previous line
  pixel_t line2 [LINE_W];   // line before that
  logic [AW-1:0] addr;

  always_ff @(posedge clk) begin
    if (in_valid) begin
      line2[addr] <= line1[addr];
      line1[addr] <= in_pix;
      col_top     <= line2[addr];
      col_mid     <= line1[addr];
      col_bot     <= in_pix;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      addr      <= '0;
      col_valid <= 1'b0;
    end else begin
      col_valid <= in_valid;
      if (in_valid) addr <= (addr == AW'(LINE_W - 1)) ? '0 : addr + 1'b1;
    end
  end
endmodule
