// mrhf_filter: median-rational hybrid filter for grey-level images.
//
// Three median sub-filters work on the 3x3 neighbourhood of each pixel:
//   phi1  median of the plus-shaped mask (centre and its 4 neighbours),
//   phi2  centre-weighted median of the plus mask (centre counted 3 times),
//   phi3  median of the cross-shaped mask (centre and the 4 corners).
// A rational stage then combines them,
//   y = phi2 + (phi1 + phi3 - 2*phi2) / (K + h*(phi1 - phi3)^2),
// which smooths like a linear filter where phi1 and phi3 agree and leaves
// phi2 (an impulse-free estimate) where they differ, i.e. across edges.
//
// Data path: a two-line memory turns the raster pixel stream into one
// 3-pixel column per clock, a 3-column register window holds the mask, the
// three medians take 4 clocks and the rational stage 8 clocks.
//
// Interface and timing: one pixel per clock when in_valid is high; a low
// in_valid stalls the whole pipeline (it advances only with new pixels).
// The output for the mask whose newest (bottom-right) pixel is pixel j of
// the stream leaves with out_valid on the clock that accepts pixel j+13,
// i.e. LAT = 14 accepted pixels after pixel j. That output belongs to image
// position (row-1, col-1) of pixel j. Masks that straddle the left or right
// image border mix pixels of two lines; their outputs are not meaningful
// and are left to the consumer to discard (no border handling).
// The structure (three medians feeding one rational stage, the line memory,
// the median and rational pipelines) follows the document; the stall
// scheme and border behaviour are this design's choices.
module mrhf_filter
  import img_pkg::*;
#(
  parameter int         LINE_W = 768,
  parameter logic [7:0] K      = 8'd6
) (
  input  logic   clk,
  input  logic   rst_n,
  input  logic   in_valid,
  input  pixel_t in_pix,
  output logic   out_valid,
  output pixel_t out_pix,
  output pixel_t out_phi1,    // medians of the same mask, 8 clocks earlier
  output pixel_t out_phi2,
  output pixel_t out_phi3
);
  localparam int LAT = 14;

  pixel_t col_top, col_mid, col_bot;
  logic   col_valid;

  line_memory #(.LINE_W(LINE_W)) u_lines (
    .clk, .rst_n, .in_valid, .in_pix,
    .col_valid, .col_top, .col_mid, .col_bot
  );

  // 3x3 mask: a[0..8] row-major, column 2 (a2, a5, a8) is the newest.
  pixel_t a [9];
  always_ff @(posedge clk) begin
    if (in_valid) begin
      a[0] <= a[1]; a[1] <= a[2]; a[2] <= col_top;
      a[3] <= a[4]; a[4] <= a[5]; a[5] <= col_mid;
      a[6] <= a[7]; a[7] <= a[8]; a[8] <= col_bot;
    end
  end

  pixel_t phi1, phi2, phi3;

  pmf_cwmf u_pmf (
    .clk, .en(in_valid),
    .n(a[1]), .w(a[3]), .c(a[4]), .e(a[5]), .s(a[7]),
    .pmf(phi1), .cwmf(phi2)
  );

  cmf u_cmf (
    .clk, .en(in_valid),
    .top(a[2]), .mid(a[5]), .bot(a[8]),
    .med(phi3)
  );

  mrhf_rational #(.K(K)) u_rat (
    .clk, .en(in_valid),
    .phi1, .phi2, .phi3,
    .y(out_pix), .dbg_en(), .dbg_ed()
  );

  assign out_phi1 = phi1;
  assign out_phi2 = phi2;
  assign out_phi3 = phi3;

  logic [4:0] fill;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      fill      <= '0;
      out_valid <= 1'b0;
    end else begin
      out_valid <= in_valid && (fill >= 5'(LAT - 1));
      if (in_valid && fill < 5'(LAT - 1)) fill <= fill + 1'b1;
    end
  end

  // col_valid repeats in_valid one clock later; the window advances with
  // in_valid itself, so the column registers are always current.
  logic unused_ok;
  assign unused_ok = col_valid;
endmodule
