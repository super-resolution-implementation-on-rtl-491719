// sr_bram - simple dual-port block RAM (one write port, one read port).
//
// Used twice in the application block: bram1 holds the input image fetched
// from DDR3, bram2 collects the output image before it is written back. A word
// is LANES lanes of DW/LANES bits (four 16-bit pixels by default); each lane
// has its own write enable so single pixels can be written. The read is
// registered: rdata shows word raddr one clock after raddr is applied. Depth,
// width and lane writes are this design's choices.
module sr_bram #(
  parameter int DEPTH = 16384,
  parameter int DW    = 64,
  parameter int LANES = 4
) (
  input  logic                     clk,
  input  logic [LANES-1:0]         we,
  input  logic [$clog2(DEPTH)-1:0] waddr,
  input  logic [DW-1:0]            wdata,
  input  logic [$clog2(DEPTH)-1:0] raddr,
  output logic [DW-1:0]            rdata
);
  localparam int LW = DW / LANES;

  logic [DW-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    for (int l = 0; l < LANES; l++)
      if (we[l]) mem[waddr][l*LW +: LW] <= wdata[l*LW +: LW];
    rdata <= mem[raddr];
  end
endmodule
