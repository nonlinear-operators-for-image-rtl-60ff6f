// cmf: cross-shaped median filter, median of the centre and the four
// corners of the 3x3 mask.
//
// The filter takes only the newest mask column (top, mid, bot) and exploits
// the scan timing: the corners of the newest column are ordered once by a
// compare/exchange cell, and the same ordered pair, delayed by two columns,
// serves as the ordered pair of the oldest column's corners. The middle
// pixel of the newest column, delayed by one column, is the mask centre.
// From the two ordered corner pairs the maximum, minimum and two middle
// values of the four corners follow as in the plus-mask filter, and the
// median of five is the median of the centre and the two middle values.
//
// Timing: one column per enabled clock; `med` is the cross median of the
// mask whose newest column was presented LAT = 4 enabled clocks earlier.
// Reusing the delayed corner comparison follows the document's description
// of the cross filter; the cell order is this design's choice.
module cmf
  import img_pkg::*;
(
  input  logic   clk,
  input  logic   en,
  input  pixel_t top, mid, bot,   // newest column of the mask
  output pixel_t med
);
  pixel_t ph_c, pl_c;
  pixel_t ph [3];   // ordered corner pair, delayed 1..3 columns
  pixel_t pl [3];
  pixel_t mid_d1, ctr1;
  minmax_cell u_pair (.a(top), .b(bot), .hi(ph_c), .lo(pl_c));

  // stage 2: combine newest pair (ph[0]) with the pair two columns older (ph[2])
  pixel_t M4_c, mh_c, ml_c, m4_c, mid_a, mid_b, ctr2;
  minmax_cell u_mx (.a(ph[0]), .b(ph[2]), .hi(M4_c), .lo(mh_c));
  minmax_cell u_mn (.a(pl[0]), .b(pl[2]), .hi(ml_c), .lo(m4_c));

  // stage 3
  pixel_t mb_c, ms_c, p_hi, p_lo, ctr3;
  minmax_cell u_mid (.a(mid_a), .b(mid_b), .hi(mb_c), .lo(ms_c));

  // stage 4
  pixel_t t_c, md_c;
  minmax_cell u_m1 (.a(ctr3), .b(p_hi), .hi(), .lo(t_c));
  minmax_cell u_m2 (.a(t_c), .b(p_lo), .hi(md_c), .lo());

  always_ff @(posedge clk) begin
    if (en) begin
      ph[0] <= ph_c; pl[0] <= pl_c;
      ph[1] <= ph[0]; pl[1] <= pl[0];
      ph[2] <= ph[1]; pl[2] <= pl[1];
      mid_d1 <= mid;          // centre of the current mask
      ctr1   <= mid_d1;
      mid_a  <= mh_c; mid_b <= ml_c; ctr2 <= ctr1;
      p_hi   <= mb_c; p_lo  <= ms_c; ctr3 <= ctr2;
      med    <= md_c;
    end
  end
endmodule
