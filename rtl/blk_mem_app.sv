// blk_mem_app - application block on the board's OCP memory path.
//
// It holds the two image buffers (bram1 for the input image read from DDR3,
// bram2 for the output image), the OCP-BRAM FSM that moves whole images
// between them and DDR3 in OCP bursts, and the host controller that runs
// load -> pipeline -> store on app_go and raises app_done. The
// super_resolution pipeline sits outside and is connected through the sr_*
// stream ports. app_m2s / app_s2m are the OCP master port toward the board's
// OCP switch and DDR3 memory interface. The partition follows the
// blk_mem_app block diagram (BRAM, OCP-BRAM FSM, host controller, OCP
// interface); the internals are this design's own.
module blk_mem_app
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
  output ocp_m2s_t          app_m2s,
  input  ocp_s2m_t          app_s2m,
  output logic              sr_sync_out,
  output logic              sr_start_out,
  output pix_t              sr_data_out,
  input  logic              sr_sync_in,
  input  logic              sr_start_in,
  input  pix_t              sr_data_in
);
  localparam int DEPTH = (IMG_W * IMG_H + 3) / 4;
  localparam int AW    = $clog2(DEPTH);

  logic              x_go, x_dir, x_done, x_busy;
  logic [OCP_AW-1:0] x_addr;
  logic [AW:0]       x_nwords;
  logic              b1_we;
  logic [AW-1:0]     b1_waddr, b1_raddr, b2_waddr, b2_raddr;
  logic [OCP_DW-1:0] b1_wdata, b1_rdata, b2_wdata, b2_rdata;
  logic [3:0]        b2_we;

  sr_bram #(.DEPTH(DEPTH), .DW(OCP_DW), .LANES(4)) u_bram1 (
    .clk, .we({4{b1_we}}), .waddr(b1_waddr), .wdata(b1_wdata), .raddr(b1_raddr), .rdata(b1_rdata));

  sr_bram #(.DEPTH(DEPTH), .DW(OCP_DW), .LANES(4)) u_bram2 (
    .clk, .we(b2_we), .waddr(b2_waddr), .wdata(b2_wdata), .raddr(b2_raddr), .rdata(b2_rdata));

  ocp_bram_fsm #(.BURST(BURST), .DEPTH(DEPTH)) u_fsm (
    .clk, .reset, .go(x_go), .dir(x_dir), .base_addr(x_addr), .nwords(x_nwords),
    .busy(x_busy), .done(x_done),
    .b1_we, .b1_waddr, .b1_wdata, .b2_raddr, .b2_rdata, .app_m2s, .app_s2m);

  host_controller #(.IMG_W(IMG_W), .IMG_H(IMG_H), .MINOR(MINOR)) u_host (
    .clk, .reset, .app_go, .app_done, .in_addr, .out_addr,
    .x_go, .x_dir, .x_addr, .x_nwords, .x_done,
    .b1_raddr, .b1_rdata, .b2_we, .b2_waddr, .b2_wdata,
    .sr_sync(sr_sync_out), .sr_start(sr_start_out), .sr_data(sr_data_out),
    .sr_sync_in, .sr_start_in, .sr_data_in);

  // a new transfer is only requested while the FSM is idle
  a_go_idle: assert property (@(posedge clk) disable iff (reset) x_go |-> !x_busy);
endmodule
