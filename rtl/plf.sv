// plf: programmable linear filter y = w0*x0 + w1*x1 + w2*x2 on three
// pixels of the mask.
//
// Each weight takes one of the quantised values 0, +-1/8, +-1/4, +-3/8,
// +-1/2, +-3/4, +-7/8, +-1, +-3/2, +-7/4, +-2 (plf_w_t: sign and index
// 0..10 into that list). Every product is formed by a shift-and-add
// multiplier: channel 1 is the pixel times 2, 1 or 1/2, channel 2 the pixel
// shifted right by 1 to 3 positions, and the channels are added or
// subtracted (e.g. 7/4 = 2 - 1/4, 3/8 = 1/2 - 1/8). The three products are
// summed with 3 fraction bits, which is exact, then truncated towards minus
// infinity and saturated to a 10-bit signed result.
//
// Timing: one registered stage (LAT = 1), one result per clock.
// The weight set and the shift-and-add products follow the document; the
// weight encoding and the decomposition of each value are this design's.
module plf
  import img_pkg::*;
(
  input  logic               clk,
  input  pixel_t             x [3],
  input  plf_w_t             w [3],
  output logic signed [9:0]  y
);
  // x * |w| * 8 by two shifted channels
  function automatic logic signed [15:0] wmul(pixel_t p, plf_w_t wt);
    logic [15:0] c1, c2, m;
    logic [15:0] x8;
    x8 = 16'(p) << 3;
    c1 = '0;
    c2 = '0;
    m  = '0;
    case (wt.idx)
      4'd1:  m = x8 >> 3;                         // 1/8
      4'd2:  m = x8 >> 2;                         // 1/4
      4'd3:  begin c1 = x8 >> 1; c2 = x8 >> 3; m = c1 - c2; end   // 3/8
      4'd4:  m = x8 >> 1;                         // 1/2
      4'd5:  begin c1 = x8; c2 = x8 >> 2; m = c1 - c2; end        // 3/4
      4'd6:  begin c1 = x8; c2 = x8 >> 3; m = c1 - c2; end        // 7/8
      4'd7:  m = x8;                              // 1
      4'd8:  begin c1 = x8; c2 = x8 >> 1; m = c1 + c2; end        // 3/2
      4'd9:  begin c1 = x8 << 1; c2 = x8 >> 2; m = c1 - c2; end   // 7/4
      4'd10: m = x8 << 1;                         // 2
      default: m = '0;
    endcase
    return wt.neg ? -$signed(m) : $signed(m);
  endfunction

  logic signed [15:0] sum;
  logic signed [12:0] yi;

  always_comb begin
    sum = wmul(x[0], w[0]) + wmul(x[1], w[1]) + wmul(x[2], w[2]);
    yi  = 13'(sum >>> 3);
  end

  always_ff @(posedge clk)
    y <= (yi > 13'sd511) ? 10'sd511 : (yi < -13'sd512) ? -10'sd512 : 10'(yi);
endmodule
