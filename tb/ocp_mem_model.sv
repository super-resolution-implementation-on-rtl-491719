// ocp_mem_model - behavioural model of the board's OCP memory path (switch,
// DDR3 controller and DDR3 devices) as seen from an OCP master; testbench
// only.
//
// Words of 64 bits are kept in an associative array indexed by byte address
// / 8. One burst at a time: a command is accepted after a random wait; write
// data words are accepted with random data_accept stalls (the first possibly
// in the command's clock); read data returns after a random latency, one word
// per clock with random gaps where the response is NONE, each word held until
// resp_accept, and carries the command's tag. The counters record how often
// each kind of stall happened.
module ocp_mem_model
  import sr_pkg::*;
(
  input  logic     clk,
  input  logic     reset,
  input  ocp_m2s_t m2s,
  output ocp_s2m_t s2m
);
  logic [OCP_DW-1:0] mem [longint];
  int cmd_waits = 0, data_stalls = 0, read_gaps = 0, bursts_rd = 0, bursts_wr = 0, byte_en_errors = 0;

  typedef enum {M_IDLE, M_WDATA, M_RLAT, M_RDATA} mstate_e;
  mstate_e st;
  longint  base;
  int      len, k, lat, widx;
  logic    gap;
  logic [OCP_TW-1:0] tag;

  function automatic logic [OCP_DW-1:0] rd(longint a);
    return mem.exists(a) ? mem[a] : '0;
  endfunction

  logic ca, da, rv;   // randomised accept / valid decisions for this clock
  always @(negedge clk) begin
    ca = ($urandom_range(1) != 0);
    da = ($urandom_range(4) != 0);
    rv = ($urandom_range(5) != 0);
  end

  logic cmd_accept_q, data_accept_q;
  assign cmd_accept_q  = (st == M_IDLE) && m2s.cmd != OCP_IDLE && ca;
  assign data_accept_q = ((st == M_IDLE && cmd_accept_q && m2s.cmd == OCP_WR) || st == M_WDATA) && da;

  always_comb begin
    s2m = '0;
    s2m.resp        = OCP_NONE;
    s2m.cmd_accept  = cmd_accept_q;
    s2m.data_accept = data_accept_q;
    if (st == M_RDATA && !gap) begin
      s2m.resp = OCP_DVA;
      s2m.data = rd(base + longint'(k));
      s2m.tag  = tag;
    end
  end

  always @(posedge clk) begin
    if (reset) begin
      st <= M_IDLE; k <= 0; gap <= 1'b0; widx <= 0; lat <= 0;
    end else begin
      if (st == M_IDLE && m2s.cmd != OCP_IDLE && !cmd_accept_q) cmd_waits++;
      if ((st == M_WDATA || cmd_accept_q) && m2s.data_valid && !data_accept_q) data_stalls++;
      if ((st == M_WDATA || (cmd_accept_q && m2s.cmd == OCP_WR)) && m2s.data_valid && data_accept_q
          && m2s.byte_en != '1) byte_en_errors++;
      case (st)
        M_IDLE: if (cmd_accept_q) begin
          base <= longint'(m2s.addr >> 3); len <= int'(m2s.burst_len); tag <= m2s.tag;
          if (m2s.cmd == OCP_WR) begin
            bursts_wr++;
            if (m2s.data_valid && data_accept_q) begin
              mem[longint'(m2s.addr >> 3)] = m2s.data;
              widx <= 1;
              st <= (m2s.burst_len == 1) ? M_IDLE : M_WDATA;
            end else begin
              widx <= 0;
              st <= M_WDATA;
            end
          end else begin
            bursts_rd++;
            lat <= int'($urandom_range(6, 1));
            k <= 0; gap <= 1'b0;
            st <= M_RLAT;
          end
        end
        M_WDATA: if (m2s.data_valid && data_accept_q) begin
          mem[base + longint'(widx)] = m2s.data;
          widx <= widx + 1;
          if (widx + 1 == len) st <= M_IDLE;
        end
        M_RLAT: begin
          lat <= lat - 1;
          if (lat == 1) st <= M_RDATA;
        end
        M_RDATA: begin
          if (gap) gap <= 1'b0;
          else if (m2s.resp_accept) begin
            if (k == len - 1) st <= M_IDLE;
            else begin
              k <= k + 1;
              gap <= !rv;
              if (!rv) read_gaps++;
            end
          end
        end
      endcase
    end
  end
endmodule
