// approx_sum: reduced-precision floating-point sum used for the
// denominators (x-y)^2 + beta and for sums of squares.
//
// Both operands are cut to 4-bit mantissas 0.1xxx. The operand with the
// smaller exponent is shifted right by the exponent difference (and drops
// out after four positions), the 4-bit mantissas are added, and a carry
// renormalises the result by one position. The result again has a 4-bit
// mantissa (man[3:0] = 0). A zero operand passes the other one through.
// Combinational; the caller registers the result.
// The 4-bit operands follow the document; the alignment and truncation
// rules are this design's choice.
module approx_sum
  import img_pkg::*;
(
  input  afp_t a,
  input  afp_t b,
  output afp_t y
);
  afp_t       big, sml;
  logic [6:0] dexp;
  logic [3:0] ms;
  logic [4:0] s;

  always_comb begin
    if (a.zero || (!b.zero && b.exp > a.exp)) begin big = b; sml = a; end
    else                                      begin big = a; sml = b; end
    dexp = 7'(big.exp - sml.exp);
    ms   = (sml.zero || dexp > 7'd3) ? 4'd0 : sml.man[7:4] >> dexp;
    s    = {1'b0, big.man[7:4]} + {1'b0, ms};
    y.zero = big.zero;
    if (s[4]) begin
      y.man = {s[4:1], 4'b0000};
      y.exp = big.exp + 7'sd1;
    end else begin
      y.man = {s[3:0], 4'b0000};
      y.exp = big.exp;
    end
  end
endmodule
