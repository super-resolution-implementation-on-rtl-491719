// ocp_bram_fsm - moves a block of words between DDR3 (through an OCP master
// port) and the application BRAMs.
//
// A transfer is requested with a one-clock go pulse, a direction, a DDR3 byte
// address and a word count. Direction 0 (load) reads DDR3 into bram1,
// direction 1 (store) writes bram2 to DDR3. The transfer is cut into bursts of
// up to BURST words, one burst outstanding at a time:
//   read burst : the RD command with address and burst length is held until
//                cmd_accept; the read data words are then taken whenever the
//                slave's response is VALID (resp_accept is held high) and
//                written into consecutive bram1 words.
//   write burst: the burst is first read from bram2 into a small buffer; then
//                the WR command is held until cmd_accept while the data words
//                are offered with data_valid, each one held until data_accept,
//                the first one together with the command.
// This follows the OCP burst read and burst write sequences (command,
// address, burst length, tag; response VALID/NONE); the data width (64 bits),
// address width (32-bit byte address), tag use (burst number) and the single
// outstanding burst are this design's choices. done pulses for one clock when
// the last word has been transferred.
module ocp_bram_fsm
  import sr_pkg::*;
#(
  parameter int BURST = 8,      // words per burst
  parameter int DEPTH = 16384   // BRAM depth in words
) (
  input  logic                     clk,
  input  logic                     reset,
  // request from the host controller
  input  logic                     go,
  input  logic                     dir,        // 0: DDR3 -> bram1, 1: bram2 -> DDR3
  input  logic [OCP_AW-1:0]        base_addr,
  input  logic [$clog2(DEPTH):0]   nwords,
  output logic                     busy,
  output logic                     done,
  // bram1 write port
  output logic                     b1_we,
  output logic [$clog2(DEPTH)-1:0] b1_waddr,
  output logic [OCP_DW-1:0]        b1_wdata,
  // bram2 read port (one clock read latency)
  output logic [$clog2(DEPTH)-1:0] b2_raddr,
  input  logic [OCP_DW-1:0]        b2_rdata,
  // OCP master
  output ocp_m2s_t                 app_m2s,
  input  ocp_s2m_t                 app_s2m
);
  localparam int AW = $clog2(DEPTH);
  localparam int CW = $clog2(DEPTH) + 1;
  localparam int BW = $clog2(BURST + 1);
  localparam int IW = $clog2(BURST);

  typedef enum logic [2:0] {S_IDLE, S_RD_CMD, S_RD_DATA, S_WR_FETCH, S_WR_BURST, S_NEXT} state_e;
  state_e state;

  logic                dir_q;
  logic [OCP_AW-1:0]   base_q;
  logic [CW-1:0]       total, word;     // words in the transfer / first word of this burst
  logic [BW-1:0]       blen, k, fk;     // burst length, data beat, fetch counter
  logic                cmd_done, fetch_v;
  logic [OCP_TW-1:0]   tag;
  logic [OCP_DW-1:0]   wbuf [BURST];

  logic [CW-1:0] remaining;
  assign remaining = total - word;

  always_ff @(posedge clk) begin
    if (reset) begin
      state <= S_IDLE; done <= 1'b0; dir_q <= 1'b0; base_q <= '0;
      total <= '0; word <= '0; blen <= '0; k <= '0; fk <= '0;
      cmd_done <= 1'b0; fetch_v <= 1'b0; tag <= '0;
    end else begin
      done    <= 1'b0;
      fetch_v <= 1'b0;
      case (state)
        S_IDLE: if (go) begin
          dir_q <= dir; base_q <= base_addr; total <= nwords; word <= '0; tag <= '0;
          state <= S_NEXT;
        end
        S_NEXT: begin
          if (remaining == '0) begin
            done  <= 1'b1;
            state <= S_IDLE;
          end else begin
            blen     <= (remaining >= CW'(BURST)) ? BW'(BURST) : BW'(remaining);
            k        <= '0;
            fk       <= '0;
            cmd_done <= 1'b0;
            state    <= dir_q ? S_WR_FETCH : S_RD_CMD;
          end
        end
        S_RD_CMD: if (app_s2m.cmd_accept) state <= S_RD_DATA;
        S_RD_DATA: if (app_s2m.resp == OCP_DVA) begin
          k <= k + 1'b1;
          if (k + 1'b1 == blen) begin
            word <= word + CW'(blen); tag <= tag + 1'b1; state <= S_NEXT;
          end
        end
        S_WR_FETCH: begin
          // read address fk is applied now, its data arrives next clock
          if (fk != blen) fk <= fk + 1'b1;
          fetch_v <= (fk != blen);
          if (fetch_v) wbuf[k[IW-1:0]] <= b2_rdata;
          if (fetch_v) k <= k + 1'b1;
          if (!fetch_v && fk == blen && k == blen) begin
            k <= '0; state <= S_WR_BURST;
          end
        end
        S_WR_BURST: begin
          if (app_s2m.cmd_accept) cmd_done <= 1'b1;
          if (app_s2m.data_accept && k != blen) k <= k + 1'b1;
          if ((cmd_done || app_s2m.cmd_accept) &&
              (k == blen || (app_s2m.data_accept && k + 1'b1 == blen))) begin
            word <= word + CW'(blen); tag <= tag + 1'b1; state <= S_NEXT;
          end
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  assign busy     = state != S_IDLE;
  assign b1_we    = state == S_RD_DATA && app_s2m.resp == OCP_DVA;
  assign b1_waddr = AW'(word + CW'(k));
  assign b1_wdata = app_s2m.data;
  assign b2_raddr = AW'(word + CW'(fk));

  always_comb begin
    app_m2s             = '0;
    app_m2s.cmd         = OCP_IDLE;
    app_m2s.byte_en     = '1;
    app_m2s.tag         = tag;
    app_m2s.addr        = base_q + (OCP_AW'(word) << $clog2(OCP_DW / 8));
    app_m2s.burst_len   = OCP_BLW'(blen);
    app_m2s.resp_accept = (state == S_RD_DATA);
    if (state == S_RD_CMD) app_m2s.cmd = OCP_RD;
    if (state == S_WR_BURST) begin
      if (!cmd_done) app_m2s.cmd = OCP_WR;
      app_m2s.data_valid = (k != blen);
      app_m2s.data       = wbuf[k[IW-1:0]];
    end
  end

  // read data must carry the tag of the burst it answers
  a_tag: assert property (@(posedge clk) disable iff (reset)
    state == S_RD_DATA && app_s2m.resp == OCP_DVA |-> app_s2m.tag == tag);
  a_len: assert property (@(posedge clk) disable iff (reset) go && !busy |-> nwords <= (CW)'(DEPTH));
endmodule
