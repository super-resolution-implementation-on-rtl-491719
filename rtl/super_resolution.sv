// super_resolution - the three-layer super-resolution network as a pixel
// pipeline: stage1 (9x9 conv, 64 maps, ReLU) -> stage2 (1x1 conv, 32 maps,
// ReLU) -> stage3 (5x5 conv, 32 maps summed into one pixel).
//
// The input A is the (already upscaled) low-resolution luminance image in
// raster order, one Q8.8 pixel per minor cycle; the output D is the restored
// image, same size, one pixel per minor cycle. Every stage carries the common
// synchronisation signals: sync_minor marks each minor cycle and start marks
// the first pixel of a frame (sync1/start_A in, sync2/start_B between stage 1
// and 2, sync3/start_C, sync4/start_D out). Each stage delays them by whole
// minor cycles plus clocks, so the data of a frame stays aligned with its start
// pulse without any handshaking.
//
// Timing: sync_minor_in must pulse at least MINOR_MIN = K1*K1 clocks apart and
// keep pulsing after the last input pixel until the last output pixel appears:
// the output frame starts (h1 + h3)*(IMG_W + 1) + 2 minor cycles after the
// input frame (h = (K-1)/2), plus a fixed number of clocks. Coefficients of
// all three stages are written through wload.
module super_resolution
  import sr_pkg::*;
#(
  parameter int IMG_W = 256,
  parameter int IMG_H = 256,
  parameter int K1    = 9,
  parameter int N1    = 64,
  parameter int N2    = 32,
  parameter int K3    = 5
) (
  input  logic   clk,
  input  logic   reset,
  input  logic   sync_minor_in,   // sync1
  input  logic   start_in,        // start_A
  input  pix_t   data_in,         // A
  input  wload_t wload,
  output logic   sync_minor_out,  // sync4
  output logic   start_out,       // start_D
  output pix_t   data_out         // D
);
  logic          sync2, sync3, start_b, start_c;
  pix_t          b;
  pix_t [N2-1:0] c;

  stage1 #(.K(K1), .NF(N1), .IMG_W(IMG_W), .IMG_H(IMG_H)) u_stage1 (
    .clk, .reset, .sync_minor_in, .start_in, .data_in, .wload,
    .sync_minor_out(sync2), .start_out(start_b), .data_out(b));

  stage2 #(.NIN(N1), .NF(N2)) u_stage2 (
    .clk, .reset, .sync_minor_in(sync2), .start_in(start_b), .data_in(b), .wload,
    .sync_minor_out(sync3), .start_out(start_c), .data_out(c));

  stage3 #(.K(K3), .NCH(N2), .IMG_W(IMG_W), .IMG_H(IMG_H)) u_stage3 (
    .clk, .reset, .sync_minor_in(sync3), .start_in(start_c), .data_in(c), .wload,
    .sync_minor_out, .start_out, .data_out);
endmodule
