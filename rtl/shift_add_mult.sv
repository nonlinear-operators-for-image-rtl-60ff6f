// shift_add_mult: two-channel shift-and-add multiplier by a quantised
// coefficient in 0..1 given as a 3-bit code x0x1x2:
//   000=0  001=1/8  011=1/4  010 or 101=1/2  100=3/4  110=7/8  111=1,
// and the complement of a code is the code of 1 minus its value.
//
// The input feeds two channels. Channel 1 passes a unshifted and is used
// when x0 = 1; channel 2 is a shifted right by 3, 2, 1 or 0 positions and is
// used when (x0 xor x1) or (x0 xor x2); x0 also turns the adder into a
// subtracter (a - a*2^-s gives 1/2, 3/4 and 7/8). The shift decode is
//   by 3: 001, 110   by 2: 011, 100   by 1: 010, 101   none: 000, 111.
// The product keeps FRAC = 3 fraction bits, so every coefficient is exact.
//
// Timing: 3-stage pipeline, one product per clock, LAT = 3: stage 1 decodes
// and shifts, stages 2 and 3 add the low and the high half of the wide sum
// (the sum is wider than 8 bits, so the adder is split in two).
// The channel structure, the decode equations and the 3-cycle latency
// follow the document; the half-word split point is this design's choice.
module shift_add_mult
  import img_pkg::*;
#(
  parameter int A_W  = 10,           // signed input width
  parameter int FRAC = 3
) (
  input  logic                        clk,
  input  logic signed [A_W-1:0]       a,
  input  mu_code_t                    code,
  output logic signed [A_W+FRAC-1:0]  p      // a * coef, FRAC fraction bits
);
  localparam int W  = A_W + FRAC;
  localparam int LO = W / 2;
  localparam int HI = W - LO;

  logic signed [W-1:0] ext, c1_c, c2_c;
  logic [1:0] sh;
  logic       sel1, sel2, sub;

  always_comb begin
    ext  = W'(a) <<< FRAC;
    sel1 = code[2];
    sub  = code[2];
    sel2 = (code[2] ^ code[1]) | (code[2] ^ code[0]);
    unique case (code)
      3'b001, 3'b110: sh = 2'd3;
      3'b011, 3'b100: sh = 2'd2;
      3'b010, 3'b101: sh = 2'd1;
      default:        sh = 2'd0;
    endcase
    c1_c = '0;
    c2_c = '0;
    if (sel1) c1_c = ext;
    if (sel2) c2_c = ext >>> sh;
    if (sub && sel2) c2_c = ~c2_c;  // + 1 enters as carry-in of the low half
  end

  // stage 1
  logic [W-1:0] c1, c2;
  logic         cin;
  // stage 2
  logic [LO-1:0] lo_sum;
  logic          lo_cy;
  logic [HI-1:0] c1_hi, c2_hi;
  logic [LO:0]   lo_c;

  always_comb lo_c = {1'b0, c1[LO-1:0]} + {1'b0, c2[LO-1:0]} + (LO+1)'(cin);

  always_ff @(posedge clk) begin
    c1  <= c1_c;
    c2  <= c2_c;
    cin <= sub & sel2;
    lo_sum <= lo_c[LO-1:0];
    lo_cy  <= lo_c[LO];
    c1_hi  <= c1[W-1:LO];
    c2_hi  <= c2[W-1:LO];
    p <= {c1_hi + c2_hi + HI'(lo_cy), lo_sum};
  end
endmodule
