// pipe_add - pipelined adder tree.
//
// Sums the N values on data_in (N a power of two) in log2(N) register levels,
// each level adding neighbouring pairs at one bit more width, so the full sum
// is exact. The sum is shifted into the Q8.8 range only by saturation to 16
// bits. data_in is sampled on the sync_minor_in pulse; the result appears
// log2(N)+2 clocks later on data_out, marked by sync_minor_out, and is held
// until the next result; start_out follows start_in with the same delay. The
// tree is fully pipelined, so any pulse spacing works. The tree shape is this
// design's choice; the document names the block (pipe_add) and its place
// after the stage-3 PEs.
module pipe_add
  import sr_pkg::*;
#(
  parameter int N = 32
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
  localparam int L  = $clog2(N);
  localparam int SW = DW + L;  // width of the exact sum

  logic signed [SW-1:0] lvl [L+1][N];
  logic [L:0] sync_sr, start_sr;

  always_ff @(posedge clk) begin
    if (sync_minor_in)
      for (int i = 0; i < N; i++) lvl[0][i] <= SW'(pix_t'(data_in[i]));
  end

  for (genvar l = 1; l <= L; l++) begin : g_lvl
    for (genvar i = 0; i < (N >> l); i++) begin : g_add
      always_ff @(posedge clk) lvl[l][i] <= lvl[l-1][2*i] + lvl[l-1][2*i+1];
    end
  end

  always_ff @(posedge clk) begin
    if (reset) begin
      sync_sr <= '0; start_sr <= '0; data_out <= '0;
      sync_minor_out <= 1'b0; start_out <= 1'b0;
    end else begin
      sync_sr  <= {sync_sr[L-1:0], sync_minor_in};
      start_sr <= {start_sr[L-1:0], sync_minor_in & start_in};
      sync_minor_out <= sync_sr[L];
      start_out      <= start_sr[L];
      if (sync_sr[L]) begin
        if (lvl[L][0] > SW'(32767))       data_out <= pix_t'(16'sh7fff);
        else if (lvl[L][0] < -SW'(32768)) data_out <= pix_t'(16'sh8000);
        else                               data_out <= pix_t'(lvl[L][0]);
      end
    end
  end

endmodule
