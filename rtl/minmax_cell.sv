// minmax_cell: the compare/exchange building block of the median filters.
//
// The difference a-b is formed only for its carry: with unsigned inputs the
// carry out of a + ~b + 1 is 1 exactly when a >= b. That carry drives two
// 2-to-1 multiplexers, one passing the larger input to hi and the other,
// with the select inverted, passing the smaller to lo. On an FPGA the carry
// comes from the dedicated carry chain; here it is an ordinary adder carry.
// Purely combinational; the median networks add their own pipeline registers.
module minmax_cell #(
  parameter int W = 8
) (
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  output logic [W-1:0] hi,   // max(a, b)
  output logic [W-1:0] lo    // min(a, b)
);
  logic [W:0] diff;
  logic       cout;

  always_comb begin
    diff = {1'b0, a} + {1'b0, ~b} + (W+1)'(1);
    cout = diff[W];
    hi   = cout ? a : b;
    lo   = cout ? b : a;
  end
endmodule
