// radix4_mult: pipelined radix-4 multiplier producing the most significant
// digits first.
//
// The signed multiplier b (B_W bits) is converted to B_W/2 radix-4 digits in
// {-2,-1,0,1,2} (each digit from an overlapping bit triplet of b). The
// signed multiplicand a (A_W bits) is not converted: for a digit 0 or +-1
// the partial product is a or -a, for +-2 it is a shifted left by one
// position, negated for a negative digit. Starting with the most significant
// digit, one row per pipeline stage adds its partial product to four times
// the running sum, so the high part of the product is known first. Only the
// OUT_DIGITS most significant radix-4 digits (2*OUT_DIGITS bits) of the
// A_W+B_W bit product are delivered, truncated towards minus infinity; the
// cells that would only affect lower digits are left out.
//
// Timing: fully pipelined, one product per clock, LAT = 8 clocks including
// the conversion stages (1 input conversion, B_W/2 rows, the rest output
// conversion and delay).
// Operand sizes, digit set, MSB-first order, 3 output digits and the
// 8-cycle latency follow the document. The rows here use a conventional
// carry-propagate adder instead of the redundant (sum/transfer) cells of
// the document's array, so every row is exact before truncation.
module radix4_mult #(
  parameter int A_W        = 10,
  parameter int B_W        = 6,     // even
  parameter int OUT_DIGITS = 3,
  parameter int LAT        = 8
) (
  input  logic                        clk,
  input  logic signed [A_W-1:0]       a,
  input  logic signed [B_W-1:0]       b,
  output logic signed [2*OUT_DIGITS-1:0] p
);
  localparam int ND = B_W / 2;
  localparam int PW = A_W + B_W;
  localparam int TAIL = LAT - 1 - ND;   // output conversion / delay stages

  typedef logic signed [2:0] digit_t;

  initial begin
    assert (TAIL >= 1) else $error("radix4_mult: LAT too small");
    assert (2 * OUT_DIGITS <= PW) else $error("radix4_mult: too many output digits");
  end

  // stage 0: binary to radix-4 conversion
  digit_t               dig_c [ND];
  digit_t               dig   [ND];
  logic signed [A_W-1:0] a0;
  logic [B_W:0]          bx;

  always_comb begin
    bx = {b, 1'b0};
    for (int i = 0; i < ND; i++)
      dig_c[i] = -3'sd2 * digit_t'({2'b00, bx[2*i+2]}) + digit_t'({2'b00, bx[2*i+1]})
                 + digit_t'({2'b00, bx[2*i]});
  end

  always_ff @(posedge clk) begin
    dig <= dig_c;
    a0  <= a;
  end

  // rows, most significant digit first
  logic signed [PW-1:0]  acc  [ND+1];
  logic signed [A_W-1:0] arow [ND+1];
  digit_t                drow [ND+1][ND];

  function automatic logic signed [PW-1:0] pprod(logic signed [A_W-1:0] x, digit_t d);
    logic signed [PW-1:0] v;
    v = PW'(x);
    if (d == 3'sd2 || d == -3'sd2) v = v <<< 1;
    if (d == 3'sd0) v = '0;
    if (d < 0) v = -v;
    return v;
  endfunction

  always_comb begin
    acc[0]  = '0;
    arow[0] = a0;
    drow[0] = dig;
  end

  for (genvar r = 0; r < ND; r++) begin : g_row
    always_ff @(posedge clk) begin
      acc[r+1]  <= (acc[r] <<< 2) + pprod(arow[r], drow[r][ND-1-r]);
      arow[r+1] <= arow[r];
      drow[r+1] <= drow[r];
    end
  end

  // output conversion: keep the OUT_DIGITS most significant digits
  logic signed [2*OUT_DIGITS-1:0] tail [TAIL];
  always_ff @(posedge clk) begin
    tail[0] <= acc[ND][PW-1 -: 2*OUT_DIGITS];
    for (int i = 1; i < TAIL; i++) tail[i] <= tail[i-1];
  end
  assign p = tail[TAIL-1];
endmodule
