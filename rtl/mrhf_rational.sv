// mrhf_rational: rational stage of the median-rational hybrid filter,
//
//   y = phi2 + (phi1 + phi3 - 2*phi2) / (K + h*(phi1 - phi3)^2),
//
// with h approximated so that sqrt(h) = 2^-4 + 2^-5 (about 0.094 for the
// nominal h = 0.01). The square is taken of the scaled difference
// s = |d|/16 + |d|/32 truncated to 5 bits, which keeps the denominator
// D = s*s + K within 11 bits. The numerator N = (phi1-phi2) + (phi3-phi2)
// needs 10 bits.
//
// Division by scaling: numerator and denominator are each divided by 16
// (drop four bits, round on the dropped bit 3) until they are at most 16,
// at most twice, counting the scalings e_n and e_d. A 16-entry table gives
// round(256/Ds) for the scaled denominator Ds in 1..16; the quotient is
// Ns * inv * 16^(e_n - e_d) / 256, rounded to an integer. The result is
// added to phi2 and clipped to 0..255.
//
// Pipeline (LAT = 8 enabled clocks, one result per clock): 1 difference and
// numerator sum, 2 scaled difference, 3 square, 4 add K (denominator), 5
// scaling, 6 table and exponent difference, 7 multiply and shift, 8 add phi2
// and clip. The split of 4 + 3 + 1 stages, the constant 2^-4 + 2^-5, the
// scaling by 16 and the table follow the document. The rounding details,
// the integer K and the 8 fraction bits of the table are this design's
// choices.
module mrhf_rational
  import img_pkg::*;
#(
  parameter logic [7:0] K = 8'd6      // denominator constant (nominal 6.25)
) (
  input  logic   clk,
  input  logic   en,
  input  pixel_t phi1, phi2, phi3,
  output pixel_t y,
  output logic [1:0] dbg_en,          // numerator scalings of the output sample
  output logic [1:0] dbg_ed           // denominator scalings of the output sample
);
  typedef logic signed [10:0] num_t;

  // round(x/16) on the magnitude, dropping four bits
  function automatic logic [10:0] scale16(logic [10:0] m);
    return (m >> 4) + 11'(m[3]);
  endfunction

  // stage 1
  num_t       n1;
  logic [7:0] ad1;
  pixel_t     p2_1;
  // stage 2
  num_t       n2;
  logic [4:0] s2;
  pixel_t     p2_2;
  // stage 3
  num_t       n3;
  logic [9:0] sq3;
  pixel_t     p2_3;
  // stage 4
  num_t       n4;
  logic [10:0] d4;
  pixel_t     p2_4;
  // stage 5
  logic       sgn5;
  logic [4:0] ns5, ds5;
  logic [1:0] en5, ed5;
  pixel_t     p2_5;
  // stage 6
  logic       sgn6;
  logic [4:0] ns6;
  logic [8:0] inv6;
  logic [2:0] sh6;       // e_n - e_d + 2, 0..4
  pixel_t     p2_6;
  logic [1:0] en6, ed6;
  // stage 7
  logic signed [11:0] q7;
  pixel_t     p2_7;
  logic [1:0] en7, ed7;

  logic [10:0] nm, nmA, dm, dmA;
  logic [1:0]  ecn, ecd;
  logic [29:0] prod;
  logic [13:0] qmag;
  logic signed [12:0] ysum;

  always_comb begin
    // numerator scaling
    nm  = n4[10] ? 11'(-n4) : 11'(n4);
    ecn = 2'd0;
    if (nm > 11'd16) begin nm = scale16(nm); ecn = 2'd1; end
    if (nm > 11'd16) begin nm = scale16(nm); ecn = 2'd2; end
    nmA = nm;
    // denominator scaling
    dm  = d4;
    ecd = 2'd0;
    if (dm > 11'd16) begin dm = scale16(dm); ecd = 2'd1; end
    if (dm > 11'd16) begin dm = scale16(dm); ecd = 2'd2; end
    dmA = dm;
    // multiply and shift: |q| = round(ns*inv*16^(sh-2) / 256)
    prod = (30'(ns6) * 30'(inv6)) << (4 * sh6);
    qmag = 14'((prod + 30'(1 << 15)) >> 16);
    ysum = 13'(p2_7) + 13'(q7);
  end

  always_ff @(posedge clk) begin
    if (en) begin
      // 1
      n1   <= (num_t'(phi1) - num_t'(phi2)) + (num_t'(phi3) - num_t'(phi2));
      ad1  <= (phi1 >= phi3) ? phi1 - phi3 : phi3 - phi1;
      p2_1 <= phi2;
      // 2
      n2   <= n1;
      s2   <= 5'((ad1 >> 4) + (ad1 >> 5));
      p2_2 <= p2_1;
      // 3
      n3   <= n2;
      sq3  <= 10'(s2) * 10'(s2);
      p2_3 <= p2_2;
      // 4
      n4   <= n3;
      d4   <= 11'(sq3) + 11'(K);
      p2_4 <= p2_3;
      // 5
      sgn5 <= n4[10];
      ns5  <= 5'(nmA);
      ds5  <= 5'(dmA);
      en5  <= ecn;
      ed5  <= ecd;
      p2_5 <= p2_4;
      // 6
      sgn6 <= sgn5;
      ns6  <= ns5;
      inv6 <= (ds5 == 5'd0) ? 9'd256 : 9'((10'd256 + 10'(ds5 >> 1)) / 10'(ds5));
      sh6  <= 3'(3'(en5) + 3'd2 - 3'(ed5));
      p2_6 <= p2_5;
      en6  <= en5; ed6 <= ed5;
      // 7
      q7   <= sgn6 ? -12'(qmag) : 12'(qmag);
      p2_7 <= p2_6;
      en7  <= en6; ed7 <= ed6;
      // 8
      y      <= ysum < 0 ? 8'd0 : (ysum > 13'sd255 ? 8'd255 : 8'(ysum));
      dbg_en <= en7;
      dbg_ed <= ed7;
    end
  end
endmodule
