// config_chain: reconfiguration register of the reprogrammable filter.
//
// The whole configuration (mode, PLF weights, betas, alpha, k, constant
// multipliers, output enables; see img_pkg::cfg_t) is one serial shift
// register. While cfg_shift is high, one bit enters at cfg_sdi per clock,
// most significant bit of cfg_t first, and the bit shifted out appears at
// cfg_sdo so several chains can be daisy-chained. The register drives the
// path multiplexers and parameters of the datapath directly, so the
// datapath should be idle while a new configuration is shifted in.
// Reset clears the configuration (smoothing mode, all weights zero,
// outputs disabled).
// A plain shift register driving the multiplexers is what the document
// describes; the bit order and the reset value are this design's choice.
module config_chain
  import img_pkg::*;
(
  input  logic clk,
  input  logic rst_n,
  input  logic cfg_shift,
  input  logic cfg_sdi,
  output logic cfg_sdo,
  output cfg_t cfg
);
  logic [CFG_W-1:0] sr;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)          sr <= '0;
    else if (cfg_shift)  sr <= {sr[CFG_W-2:0], cfg_sdi};
  end

  assign cfg     = cfg_t'(sr);
  assign cfg_sdo = sr[CFG_W-1];
endmodule
