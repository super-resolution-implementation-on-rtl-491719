// stage3 - reconstruction layer: a K x K filter on each of NCH feature maps,
// summed into one output pixel.
//
// toep_top builds the K x K windows of all NCH maps at once (CT: NCH taps per
// clock, one per map). PE c filters map c with its sub-filter
// weights_conv3(c, :) - no bias and no ReLU, as in the reference loop - and
// pipe_add sums the NCH partial results into the output pixel D. This is the
// toep_top -> PE -> pipe_add chain of the stage-3 block diagram; each partial
// result is rounded back to Q8.8 (truncation, saturation) before the sum,
// which is this design's choice.
//
// Timing: minor cycles at least K*K clocks apart; sync_minor_out follows
// sync_minor_in by K*K + 3 + log2(NCH) + 2 clocks, and the output frame starts
// h*IMG_W + h + 1 minor cycles after the input frame (h = (K-1)/2).
// Coefficients: wload.stage == 3, wload.unit = map, wload.addr = tap i*K + j.
module stage3
  import sr_pkg::*;
#(
  parameter int K     = 5,
  parameter int NCH   = 32,
  parameter int IMG_W = 256,
  parameter int IMG_H = 256
) (
  input  logic           clk,
  input  logic           reset,
  input  logic           sync_minor_in,
  input  logic           start_in,
  input  pix_t [NCH-1:0] data_in,
  input  wload_t         wload,
  output logic           sync_minor_out,
  output logic           start_out,
  output pix_t           data_out
);
  localparam int NT = K * K;

  pix_t [NCH-1:0] ct, ctemp;
  logic           sync_t1, start_t1;
  logic [NCH-1:0] sync_t2, start_t2;

  toep_top #(.CH(NCH), .K(K), .IMG_W(IMG_W), .IMG_H(IMG_H)) u_toep (
    .clk, .reset, .sync_minor_in, .start_in, .data_in,
    .sync_minor_out(sync_t1), .start_out(start_t1), .data_out(ct));

  for (genvar c = 0; c < NCH; c++) begin : g_pe
    logic sel;
    assign sel = wload.we && !wload.bias && wload.stage == 2'd3 && wload.unit == 8'(c);
    pe #(.N(NT), .RELU(1'b0)) u_pe (
      .clk, .reset, .sync_minor_in(sync_t1), .start_in(start_t1), .data_in(ct[c]),
      .sync_minor_out(sync_t2[c]), .start_out(start_t2[c]), .data_out(ctemp[c]),
      .w_we(sel), .w_addr(($clog2(NT))'(wload.addr)), .w_data(wload.data),
      .b_we(1'b0), .b_data('0));
  end

  pipe_add #(.N(NCH)) u_add (
    .clk, .reset, .sync_minor_in(sync_t2[0]), .start_in(start_t2[0]), .data_in(ctemp),
    .sync_minor_out, .start_out, .data_out);

  // all PEs of the stage run in lock step
  a_lockstep: assert property (@(posedge clk) disable iff (reset)
    (sync_t2 == '0 || sync_t2 == '1) && (start_t2 == '0 || start_t2 == '1));
endmodule
