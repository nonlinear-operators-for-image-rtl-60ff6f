// image_ops_top: the two rational image filters of this library side by
// side, each with its own ports.
//
//  - reprog_filter: reprogrammable rational operator (noise smoothing,
//    deblocking, 1-D and 2-D rational interpolation) fed with one 3-pixel
//    column per clock, configured through a serial shift register.
//  - mrhf_filter: median-rational hybrid filter fed with a raster pixel
//    stream of LINE_W pixels per line.
//
// The two designs share only the clock and reset. See the two modules for
// interfaces and latencies.
module image_ops_top
  import img_pkg::*;
#(
  parameter int         LINE_W = 768,
  parameter logic [7:0] MRHF_K = 8'd6
) (
  input  logic   clk,
  input  logic   rst_n,
  // reprogrammable rational filter
  input  logic   rf_cfg_shift,
  input  logic   rf_cfg_sdi,
  output logic   rf_cfg_sdo,
  input  logic   rf_in_valid,
  input  pixel_t rf_in_col [3],
  output logic   rf_out_valid,
  output pixel_t rf_o1, rf_o2, rf_o3,
  output logic [2:0] rf_out_oe,
  // median-rational hybrid filter
  input  logic   mf_in_valid,
  input  pixel_t mf_in_pix,
  output logic   mf_out_valid,
  output pixel_t mf_out_pix
);
  reprog_filter u_rf (
    .clk, .rst_n,
    .cfg_shift(rf_cfg_shift), .cfg_sdi(rf_cfg_sdi), .cfg_sdo(rf_cfg_sdo),
    .in_valid(rf_in_valid), .in_col(rf_in_col),
    .out_valid(rf_out_valid), .o1(rf_o1), .o2(rf_o2), .o3(rf_o3),
    .out_oe(rf_out_oe)
  );

  mrhf_filter #(.LINE_W(LINE_W), .K(MRHF_K)) u_mf (
    .clk, .rst_n,
    .in_valid(mf_in_valid), .in_pix(mf_in_pix),
    .out_valid(mf_out_valid), .out_pix(mf_out_pix),
    .out_phi1(), .out_phi2(), .out_phi3()
  );
endmodule
