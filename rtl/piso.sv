// piso - parallel-in, serial-out converter.
//
// On the sync_minor_in pulse the N parallel values on data_in (one per
// processing element) are loaded into a shift register. During the next N
// clocks they leave on data_out one per clock, value 0 first; sync_minor_out
// pulses with value 0, one clock after sync_minor_in, and start_out follows
// start_in the same way. sync_minor_in pulses must be at least N clocks apart.
// Shift order and latency are this design's choice; the document gives the
// block's function (parallel to serial) and its place after the PE array.
module piso
  import sr_pkg::*;
#(
  parameter int N = 64
) (
  input  logic          clk,
  input  logic          reset,
  input  logic          sync_minor_in,
  input  logic          start_in,
  input  pix_t [N-1:0]  data_in,
  output logic          sync_minor_out,
  output logic          start_out,
  output pix_t          data_out
);
  pix_t [N-1:0]          sreg;
  logic [$clog2(N+1)-1:0] left;

  always_ff @(posedge clk) begin
    if (reset) begin
      sreg <= '0; left <= '0; sync_minor_out <= 1'b0; start_out <= 1'b0;
    end else begin
      sync_minor_out <= sync_minor_in;
      start_out      <= sync_minor_in & start_in;
      if (sync_minor_in) begin
        sreg <= data_in;
        left <= ($clog2(N+1))'(N);
      end else if (left != '0) begin
        sreg <= {pix_t'(0), sreg[N-1:1]};
        left <= left - 1'b1;
      end
    end
  end

  assign data_out = sreg[0];

  a_spacing: assert property (@(posedge clk) disable iff (reset) sync_minor_in |-> left <= 1);
endmodule
