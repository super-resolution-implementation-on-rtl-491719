// stage1 - first convolution layer: 9x9 filters, NF feature maps, bias, ReLU.
//
// toep_top turns the input pixel stream A into one 81-tap window per output
// pixel, sent serially (AT). NF processing elements share that stream; PE f
// holds the weights of filter f, so after 82 clocks all NF results of a pixel
// are available in parallel (Btemp). The PISO then sends them serially on
// data_out (B): feature map 0 first, one per clock, starting with
// sync_minor_out. This structure (toep_top -> stacked PEs -> PISO) follows the
// stage-1 block diagram; widths, the timing below and the coefficient load
// port are this design's choices.
//
// Timing: minor cycles (sync_minor_in pulses) must be at least K*K clocks
// apart. sync_minor_out follows sync_minor_in by K*K+4 clocks and the output
// frame starts D = h*IMG_W + h + 1 minor cycles after the input frame
// (h = (K-1)/2). Coefficients are written with wload.stage == 1,
// wload.unit = filter, wload.addr = tap i*K + j (or wload.bias = 1).
module stage1
  import sr_pkg::*;
#(
  parameter int K     = 9,
  parameter int NF    = 64,
  parameter int IMG_W = 256,
  parameter int IMG_H = 256
) (
  input  logic          clk,
  input  logic          reset,
  input  logic          sync_minor_in,
  input  logic          start_in,
  input  pix_t          data_in,
  input  wload_t        wload,
  output logic          sync_minor_out,
  output logic          start_out,
  output pix_t          data_out
);
  localparam int NT = K * K;

  pix_t [0:0]    at;
  logic          sync_t1, start_t1;
  pix_t [NF-1:0] btemp;
  logic [NF-1:0] sync_t2, start_t2;

  toep_top #(.CH(1), .K(K), .IMG_W(IMG_W), .IMG_H(IMG_H)) u_toep (
    .clk, .reset, .sync_minor_in, .start_in, .data_in(data_in),
    .sync_minor_out(sync_t1), .start_out(start_t1), .data_out(at));

  for (genvar f = 0; f < NF; f++) begin : g_pe
    logic sel;
    assign sel = wload.we && wload.stage == 2'd1 && wload.unit == 8'(f);
    pe #(.N(NT), .RELU(1'b1)) u_pe (
      .clk, .reset, .sync_minor_in(sync_t1), .start_in(start_t1), .data_in(at[0]),
      .sync_minor_out(sync_t2[f]), .start_out(start_t2[f]), .data_out(btemp[f]),
      .w_we(sel && !wload.bias), .w_addr(($clog2(NT))'(wload.addr)), .w_data(wload.data),
      .b_we(sel && wload.bias), .b_data(wload.data));
  end

  piso #(.N(NF)) u_piso (
    .clk, .reset, .sync_minor_in(sync_t2[0]), .start_in(start_t2[0]), .data_in(btemp),
    .sync_minor_out, .start_out, .data_out);

  // all PEs of the stage run in lock step
  a_lockstep: assert property (@(posedge clk) disable iff (reset)
    (sync_t2 == '0 || sync_t2 == '1) && (start_t2 == '0 || start_t2 == '1));
endmodule
