// pmf_cwmf: plus-shaped median filter (PMF) and centre-weighted median
// filter (CWMF) sharing one compare/exchange network.
//
// Inputs are the five pixels of the plus mask: n, w, e, s around the centre
// c. Stage 1 orders the pairs (n,w) and (e,s). Stage 2 gives the maximum M4
// and minimum m4 of the four neighbours and their two middle values. The
// median of five is then the median of the centre and the two middle values
// (stages 3 and 4). The CWMF repeats the centre three times in a 7-pixel
// mask, so its output is the centre unless the centre lies outside
// [m4, M4]; it is obtained with two more compare/exchange cells on the
// delayed centre: clamp(c, m4, M4).
//
// Timing: fully pipelined, one mask per enabled clock, both outputs LAT = 4
// enabled clocks after the inputs. `en` stalls the whole pipeline.
// The sharing of M4/m4 between PMF and CWMF follows the document; the exact
// cell arrangement of the PMF is this design's choice.
module pmf_cwmf
  import img_pkg::*;
(
  input  logic   clk,
  input  logic   en,
  input  pixel_t n, w, c, e, s,
  output pixel_t pmf,
  output pixel_t cwmf
);
  // stage 1
  pixel_t h1_c, l1_c, h2_c, l2_c;
  pixel_t h1, l1, h2, l2, c1;
  minmax_cell u_p1 (.a(n), .b(w), .hi(h1_c), .lo(l1_c));
  minmax_cell u_p2 (.a(e), .b(s), .hi(h2_c), .lo(l2_c));

  // stage 2
  pixel_t M4_c, mid_hi_c, mid_lo_c, m4_c;
  pixel_t M4, m4, mid_a, mid_b, c2;
  minmax_cell u_mx (.a(h1), .b(h2), .hi(M4_c),     .lo(mid_hi_c));
  minmax_cell u_mn (.a(l1), .b(l2), .hi(mid_lo_c), .lo(m4_c));

  // stage 3
  pixel_t mb_c, ms_c, cw1_c, unused_hi, p_hi, p_lo, c3, cw1, m4_3;
  minmax_cell u_mid (.a(mid_a), .b(mid_b), .hi(mb_c), .lo(ms_c));
  minmax_cell u_cw1 (.a(c2), .b(M4), .hi(unused_hi), .lo(cw1_c));

  // stage 4
  pixel_t t_c, unused_lo, pm_c, unused2, cw_c;
  minmax_cell u_pm1 (.a(c3), .b(p_hi), .hi(unused_lo), .lo(t_c));
  minmax_cell u_pm2 (.a(t_c), .b(p_lo), .hi(pm_c), .lo(unused2));
  minmax_cell u_cw2 (.a(cw1), .b(m4_3), .hi(cw_c), .lo());

  always_ff @(posedge clk) begin
    if (en) begin
      h1 <= h1_c; l1 <= l1_c; h2 <= h2_c; l2 <= l2_c; c1 <= c;
      M4 <= M4_c; m4 <= m4_c; mid_a <= mid_hi_c; mid_b <= mid_lo_c; c2 <= c1;
      p_hi <= mb_c; p_lo <= ms_c; c3 <= c2; cw1 <= cw1_c; m4_3 <= m4;
      pmf  <= pm_c;
      cwmf <= cw_c;
    end
  end
endmodule
