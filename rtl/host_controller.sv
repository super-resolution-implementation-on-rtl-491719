// host_controller - sequences one super-resolution run of the application
// block and drives the pixel streams of the pipeline.
//
// app_go (a one-clock pulse) starts: LOAD - the OCP-BRAM FSM copies the input
// image (IMG_W*IMG_H Q8.8 pixels, four per 64-bit word) from DDR3 address
// in_addr into bram1; RUN - the image is streamed from bram1 into the
// super_resolution pipeline, one pixel per minor cycle of MINOR clocks (the
// sync pulse at clock 2 of each minor cycle, start with pixel 0), while the
// pipeline's output pixels, from the one marked by start, are written to
// bram2 in the same order; sync pulses continue after the last input pixel
// until the last output pixel has arrived. STORE - the FSM writes bram2 to
// DDR3 address out_addr. app_done then rises and stays high until the next
// app_go. The document gives the go/done handshake and the BRAM -> FSM ->
// OCP path; the three phases, the minor-cycle length and the packing are this
// design's choices.
module host_controller
  import sr_pkg::*;
#(
  parameter int IMG_W = 256,
  parameter int IMG_H = 256,
  parameter int MINOR = 96,    // clocks per minor cycle (at least 81)
  localparam int DEPTH = (IMG_W * IMG_H + 3) / 4   // bram words per image
) (
  input  logic                     clk,
  input  logic                     reset,
  input  logic                     app_go,
  output logic                     app_done,
  input  logic [OCP_AW-1:0]        in_addr,
  input  logic [OCP_AW-1:0]        out_addr,
  // OCP-BRAM FSM request
  output logic                     x_go,
  output logic                     x_dir,
  output logic [OCP_AW-1:0]        x_addr,
  output logic [$clog2(DEPTH):0]   x_nwords,
  input  logic                     x_done,
  // bram1 read port, bram2 write port
  output logic [$clog2(DEPTH)-1:0] b1_raddr,
  input  logic [OCP_DW-1:0]        b1_rdata,
  output logic [3:0]               b2_we,
  output logic [$clog2(DEPTH)-1:0] b2_waddr,
  output logic [OCP_DW-1:0]        b2_wdata,
  // pixel stream into the pipeline (sync1, start_A, A)
  output logic                     sr_sync,
  output logic                     sr_start,
  output pix_t                     sr_data,
  // pixel stream out of the pipeline (sync4, start_D, D)
  input  logic                     sr_sync_in,
  input  logic                     sr_start_in,
  input  pix_t                     sr_data_in
);
  localparam int NPIX  = IMG_W * IMG_H;
  localparam int PW    = $clog2(NPIX + 1);
  localparam int MW    = $clog2(MINOR);

  typedef enum logic [2:0] {H_IDLE, H_LOAD, H_LOAD_W, H_RUN, H_STORE, H_STORE_W} hstate_e;
  hstate_e state;

  logic [MW-1:0] mc;           // clock within the minor cycle
  logic [PW-1:0] pin, pout;    // pixels sent / pixels received
  logic          capturing;
  logic [1:0]    lane_q;

  always_ff @(posedge clk) begin
    if (reset) begin
      state <= H_IDLE; app_done <= 1'b0; x_go <= 1'b0; x_dir <= 1'b0; x_addr <= '0;
      mc <= '0; pin <= '0; pout <= '0; capturing <= 1'b0; lane_q <= '0;
      sr_sync <= 1'b0; sr_start <= 1'b0; sr_data <= '0;
    end else begin
      x_go     <= 1'b0;
      sr_sync  <= 1'b0;
      sr_start <= 1'b0;
      case (state)
        H_IDLE: if (app_go) begin
          app_done <= 1'b0;
          x_go <= 1'b1; x_dir <= 1'b0; x_addr <= in_addr;
          state <= H_LOAD;
        end
        H_LOAD:   state <= H_LOAD_W;
        H_LOAD_W: if (x_done) begin
          mc <= '0; pin <= '0; pout <= '0; capturing <= 1'b0;
          state <= H_RUN;
        end
        H_RUN: begin
          mc <= (mc == MW'(MINOR - 1)) ? '0 : mc + 1'b1;
          // clock 0: read the word, clock 1: pick the lane, clock 2: sync pulse
          if (mc == MW'(1)) begin
            sr_data <= (pin < PW'(NPIX)) ? pix_t'(b1_rdata[16*lane_q +: 16]) : '0;
            sr_sync  <= 1'b1;
            sr_start <= (pin == '0);
            if (pin < PW'(NPIX)) pin <= pin + 1'b1;
          end
          if (sr_sync_in && (capturing || sr_start_in)) begin
            capturing <= 1'b1;
            pout <= pout + 1'b1;
            if (pout == PW'(NPIX - 1)) begin
              x_go <= 1'b1; x_dir <= 1'b1; x_addr <= out_addr;
              state <= H_STORE;
            end
          end
        end
        H_STORE:   state <= H_STORE_W;
        H_STORE_W: if (x_done) begin
          app_done <= 1'b1;
          state <= H_IDLE;
        end
        default: state <= H_IDLE;
      endcase
      lane_q <= pin[1:0];
    end
  end

  assign x_nwords = ($clog2(DEPTH) + 1)'(DEPTH);
  assign b1_raddr = ($clog2(DEPTH))'(pin >> 2);
  assign b2_waddr = ($clog2(DEPTH))'(pout >> 2);
  assign b2_wdata = {4{sr_data_in}};
  assign b2_we    = (state == H_RUN && sr_sync_in && (capturing || sr_start_in))
                    ? 4'(1 << pout[1:0]) : 4'b0;

  a_minor: assert property (@(posedge clk) disable iff (reset) MINOR >= 81);
endmodule
