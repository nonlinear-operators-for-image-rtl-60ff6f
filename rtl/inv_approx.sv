// inv_approx: coarse reciprocal of a floating-point value.
//
// Only the three mantissa bits x0x1x2 after the leading one address the
// function: 1/m for m = 0.1x0x1x2 in [1/2, 1) is taken from the 8-entry
// table below (8-bit result 1.y1..y7, the reciprocal of the lower end of
// each mantissa interval, 2 clipped to 1.1111111). The exponent is negated.
// Maximum relative error is about 12 %. The table is realised as a small
// combinational function (a few tens of gates), not as a memory.
//
// Output format: value = man/256 * 2^exp with man = {1, y1..y7} and
// exp = 1 - exp_in. A zero input gives the largest representable result.
// Combinational; the caller registers the result.
// The table is the document's; the zero handling is this design's choice.
module inv_approx
  import img_pkg::*;
(
  input  afp_t x,
  output afp_t y
);
  logic [2:0] idx;
  logic [7:0] t;

  always_comb begin
    idx = x.man[6:4];
    unique case (idx)
      3'b000: t = 8'b1111_1111;
      3'b001: t = 8'b1110_0011;
      3'b010: t = 8'b1100_1100;
      3'b011: t = 8'b1011_1010;
      3'b100: t = 8'b1010_1010;
      3'b101: t = 8'b1001_1101;
      3'b110: t = 8'b1001_0010;
      default: t = 8'b1000_1000;
    endcase
    y.zero = 1'b0;
    y.man  = x.zero ? 8'hFF : t;
    y.exp  = x.zero ? 7'sd63 : 7'sd1 - x.exp;
  end
endmodule
