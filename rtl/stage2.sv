// stage2 - second convolution layer: 1x1 filters, NIN -> NF feature maps,
// bias, ReLU.
//
// The NIN stage-1 values of a pixel arrive serially on data_in (B), the first
// with sync_minor_in. With a 1x1 filter every output map is one dot product
// over the input maps, so NF processing elements read the same stream, PE i
// holding weights_conv2(:, i). Their NF results (C) are presented in parallel
// and held for a minor cycle. The document draws this stage as a single PE
// block; using NF of them side by side is this design's choice.
//
// Timing: sync_minor_out follows sync_minor_in by NIN+1 clocks, start_out in
// the same minor cycle. Coefficients: wload.stage == 2, wload.unit = output
// map, wload.addr = input map (or wload.bias = 1).
module stage2
  import sr_pkg::*;
#(
  parameter int NIN = 64,
  parameter int NF  = 32
) (
  input  logic          clk,
  input  logic          reset,
  input  logic          sync_minor_in,
  input  logic          start_in,
  input  pix_t          data_in,
  input  wload_t        wload,
  output logic          sync_minor_out,
  output logic          start_out,
  output pix_t [NF-1:0] data_out
);
  logic [NF-1:0] sync_o, start_o;

  for (genvar f = 0; f < NF; f++) begin : g_pe
    logic sel;
    assign sel = wload.we && wload.stage == 2'd2 && wload.unit == 8'(f);
    pe #(.N(NIN), .RELU(1'b1)) u_pe (
      .clk, .reset, .sync_minor_in, .start_in, .data_in,
      .sync_minor_out(sync_o[f]), .start_out(start_o[f]), .data_out(data_out[f]),
      .w_we(sel && !wload.bias), .w_addr(($clog2(NIN))'(wload.addr)), .w_data(wload.data),
      .b_we(sel && wload.bias), .b_data(wload.data));
  end

  assign sync_minor_out = sync_o[0];
  assign start_out      = start_o[0];

  // all PEs of the stage run in lock step
  a_lockstep: assert property (@(posedge clk) disable iff (reset)
    (sync_o == '0 || sync_o == '1) && (start_o == '0 || start_o == '1));
endmodule
