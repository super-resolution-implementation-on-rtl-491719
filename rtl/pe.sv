// pe - processing element: serial multiply-accumulate with stored weights.
//
// A vector of N values arrives on data_in on N consecutive clocks, the first
// one together with the sync_minor_in pulse. Each value is multiplied by the
// weight of its position (an internal N-entry weight memory, indexed by a
// counter) and summed. One clock after the last value the sum plus the bias is
// shifted back to the Q8.8 format, optionally clipped at zero (ReLU, as in the
// max(.,0) of the first two convolution stages) and saturated to 16 bits; it
// is presented on data_out together with a one-clock sync_minor_out pulse and
// held until the next result. Latency: sync_minor_out follows sync_minor_in by
// N+1 clocks; start_out follows start_in by the same amount. One multiplier per
// PE; sync_minor_in pulses must be at least N clocks apart.
//
// Weights and the bias are written through the load port (w_we / b_we), which
// is this design's choice (the bias is cleared by reset): the document does not say how the trained
// coefficients reach the hardware.
module pe
  import sr_pkg::*;
#(
  parameter int  N    = 81,  // vector length (taps), at least 2
  parameter bit  RELU = 1'b1 // clip negative results to zero
) (
  input  logic                  clk,
  input  logic                  reset,
  input  logic                  sync_minor_in,
  input  logic                  start_in,
  input  pix_t                  data_in,
  output logic                  sync_minor_out,
  output logic                  start_out,
  output pix_t                  data_out,
  // coefficient load
  input  logic                  w_we,
  input  logic [$clog2(N)-1:0]  w_addr,
  input  pix_t                  w_data,
  input  logic                  b_we,
  input  pix_t                  b_data
);
  localparam int CW = $clog2(N + 1);

  pix_t                weights [N];
  pix_t                bias;
  logic signed [47:0]  acc, acc_next, biased;
  logic [CW-1:0]       cnt;      // values still to come in the current vector
  logic                busy, fin, start_pend, fin_start;
  logic [$clog2(N)-1:0] idx;

  always_ff @(posedge clk)
    if (w_we) weights[w_addr] <= w_data;

  always_ff @(posedge clk)
    if (reset)     bias <= '0;
    else if (b_we) bias <= b_data;

  assign idx      = sync_minor_in ? '0 : $clog2(N)'(N - cnt);
  assign acc_next = (sync_minor_in ? 48'sd0 : acc) + 48'(data_in) * 48'(weights[idx]);
  assign biased   = acc + (48'(bias) <<< FRAC);

  always_ff @(posedge clk) begin
    if (reset) begin
      cnt <= '0; busy <= 1'b0; fin <= 1'b0; start_pend <= 1'b0; fin_start <= 1'b0;
      acc <= '0; sync_minor_out <= 1'b0; start_out <= 1'b0; data_out <= '0;
    end else begin
      fin <= 1'b0;
      if (sync_minor_in) begin
        acc        <= acc_next;
        cnt        <= CW'(N - 1);
        busy       <= 1'b1;
        start_pend <= start_in;
      end else if (busy) begin
        acc <= acc_next;
        cnt <= cnt - 1'b1;
        if (cnt == 1) begin
          busy <= 1'b0; fin <= 1'b1; fin_start <= start_pend;
        end
      end
      sync_minor_out <= fin;
      start_out      <= fin & fin_start;
      if (fin) data_out <= (RELU && biased < 0) ? '0 : sat_shift(biased);
    end
  end

  // a new vector must not start while the previous one is still arriving
  a_spacing: assert property (@(posedge clk) disable iff (reset) sync_minor_in |-> !busy);
endmodule
