// sq_approx: coarse square of an unsigned 8-bit magnitude (a pixel
// difference), used only to detect image detail.
//
// The input is first normalised to m * 2^e with m = 0.1x0x1x2 (leading-one
// detection, lower bits dropped). The 8-entry table below gives
// 0.y0..y7, close to 2*m^2 when m^2 < 1/2 and to m^2 otherwise (evaluated
// at the centre of each mantissa interval); the flag ctrl marks the first
// case (inputs 1000, 1001, 1010) and lowers the result exponent by one.
// Result: value = man/256 * 2^(2e - ctrl); maximum relative error about
// 12 %. A zero input gives a zero result.
// Combinational; the caller registers the result.
// Table and ctrl come from the document; the normaliser is this design's.
module sq_approx
  import img_pkg::*;
(
  input  logic [7:0] d,
  output afp_t       y
);
  afp_t       xn;
  logic [2:0] idx;
  logic [7:0] t;
  logic       ctrl;

  always_comb begin
    xn   = uint_to_afp(16'(d));
    idx  = xn.man[6:4];
    ctrl = ~idx[2] & (~idx[1] | ~idx[0]);
    unique case (idx)
      3'b000: t = 8'b1000_1111;
      3'b001: t = 8'b1011_0011;
      3'b010: t = 8'b1101_1011;
      3'b011: t = 8'b1000_0011;
      3'b100: t = 8'b1001_1011;
      3'b101: t = 8'b1011_0101;
      3'b110: t = 8'b1101_0001;
      default: t = 8'b1110_1111;
    endcase
    y.zero = xn.zero;
    y.man  = t;
    y.exp  = 7'(2 * xn.exp) - 7'(ctrl);
  end
endmodule
