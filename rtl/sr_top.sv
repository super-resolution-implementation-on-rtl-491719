// sr_top - super-resolution accelerator: application block plus pipeline.
//
// The host writes a low-resolution image, already interpolated to the output
// size, into DDR3, loads the network coefficients through wload and pulses
// app_go. blk_mem_app fetches the image over OCP into bram1, streams it
// through super_resolution (stage1 -> stage2 -> stage3), collects the restored
// image in bram2, writes it back to DDR3 at out_addr and raises app_done.
// app_m2s / app_s2m form the OCP master port that the board's OCP switch
// connects to its DDR3 memory interface; those board parts, the host link and
// the DDR3 devices are outside this design. Parameters: image size
// IMG_W x IMG_H (256 x 256 by default, a choice of this design), MINOR clocks
// per pixel (96), OCP burst length (8 words).
module sr_top
  import sr_pkg::*;
#(
  parameter int IMG_W = 256,
  parameter int IMG_H = 256,
  parameter int MINOR = 96,
  parameter int BURST = 8
) (
  input  logic              clk,
  input  logic              reset,
  input  logic              app_go,
  output logic              app_done,
  input  logic [OCP_AW-1:0] in_addr,
  input  logic [OCP_AW-1:0] out_addr,
  input  wload_t            wload,
  output ocp_m2s_t          app_m2s,
  input  ocp_s2m_t          app_s2m
);
  logic sync1, start_a, sync4, start_d;
  pix_t a, d;

  blk_mem_app #(.IMG_W(IMG_W), .IMG_H(IMG_H), .MINOR(MINOR), .BURST(BURST)) u_app (
    .clk, .reset, .app_go, .app_done, .in_addr, .out_addr, .app_m2s, .app_s2m,
    .sr_sync_out(sync1), .sr_start_out(start_a), .sr_data_out(a),
    .sr_sync_in(sync4), .sr_start_in(start_d), .sr_data_in(d));

  super_resolution #(.IMG_W(IMG_W), .IMG_H(IMG_H)) u_sr (
    .clk, .reset, .sync_minor_in(sync1), .start_in(start_a), .data_in(a), .wload,
    .sync_minor_out(sync4), .start_out(start_d), .data_out(d));
endmodule
