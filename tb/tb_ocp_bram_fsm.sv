// tb_ocp_bram_fsm - self-checking testbench of the OCP-BRAM FSM.
//
// The FSM is connected to two image buffers and to the behavioural OCP memory
// (random command waits, data-accept stalls and read gaps). Transfers of
// 8-word multiples and of lengths that leave a short last burst are run in
// both directions: loads must copy DDR3 words into bram1, stores must copy
// bram2 words to DDR3 at the requested address, the number of bursts must
// match, and every kind of memory stall must have happened.
module tb_ocp_bram_fsm;
  import sr_pkg::*;
  localparam int DEPTH = 256, AW = 8;
  logic clk = 0, reset = 1;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic go = 0, dir = 0, busy, done;
  logic [31:0] base = 0;
  logic [AW:0] nwords = 0;
  logic b1_we;
  logic [AW-1:0] b1_waddr, b2_raddr, b1_raddr = 0, b2_waddr = 0;
  logic [63:0] b1_wdata, b2_rdata, b1_rdata, b2_wdata = 0;
  logic [3:0] b2_we = 0;
  ocp_m2s_t m2s;
  ocp_s2m_t s2m;

  ocp_bram_fsm #(.BURST(8), .DEPTH(DEPTH)) dut (.clk, .reset, .go, .dir, .base_addr(base), .nwords,
    .busy, .done, .b1_we, .b1_waddr, .b1_wdata, .b2_raddr, .b2_rdata, .app_m2s(m2s), .app_s2m(s2m));
  sr_bram #(.DEPTH(DEPTH)) u_b1 (.clk, .we({4{b1_we}}), .waddr(b1_waddr), .wdata(b1_wdata), .raddr(b1_raddr), .rdata(b1_rdata));
  sr_bram #(.DEPTH(DEPTH)) u_b2 (.clk, .we(b2_we), .waddr(b2_waddr), .wdata(b2_wdata), .raddr(b2_raddr), .rdata(b2_rdata));
  ocp_mem_model u_mem (.clk, .reset, .m2s, .s2m);

  task automatic run(bit d, int addr, int n);
    int rd0 = u_mem.bursts_rd, wr0 = u_mem.bursts_wr;
    @(negedge clk);
    go = 1; dir = d; base = 32'(addr); nwords = (AW+1)'(n);
    @(negedge clk);
    go = 0;
    while (!done) @(negedge clk);
    checks++;
    if ((d ? u_mem.bursts_wr - wr0 : u_mem.bursts_rd - rd0) != (n + 7) / 8) begin
      failures++; $display("burst count wrong for %0d words", n);
    end
  endtask

  initial begin
    repeat (3) @(negedge clk);
    reset = 0;
    // loads
    for (int t = 0; t < 3; t++) begin
      int n, a;
      n = (t == 0) ? DEPTH : (t == 1 ? 37 : 8);
      a = 32'h1000 * (t + 1);
      for (int i = 0; i < n; i++) u_mem.mem[longint'(a / 8 + i)] = {$urandom, $urandom};
      run(0, a, n);
      for (int i = 0; i < n; i++) begin
        b1_raddr = AW'(i);
        @(negedge clk);
        checks++;
        if (b1_rdata !== u_mem.mem[longint'(a / 8 + i)]) begin failures++; $display("load %0d word %0d", t, i); end
      end
    end
    // stores
    for (int t = 0; t < 3; t++) begin
      int n, a;
      logic [63:0] ref_w [DEPTH];
      n = (t == 0) ? DEPTH : (t == 1 ? 21 : 16);
      a = 32'h80000 + 32'h800 * t;
      for (int i = 0; i < n; i++) begin
        @(negedge clk);
        ref_w[i] = {$urandom, $urandom};
        b2_we = 4'hf; b2_waddr = AW'(i); b2_wdata = ref_w[i];
      end
      @(negedge clk); b2_we = 0;
      run(1, a, n);
      for (int i = 0; i < n; i++) begin
        checks++;
        if (!u_mem.mem.exists(longint'(a / 8 + i)) || u_mem.mem[longint'(a / 8 + i)] !== ref_w[i]) begin
          failures++; $display("store %0d word %0d", t, i);
        end
      end
      checks++;
      if (u_mem.mem.exists(longint'(a / 8 + n))) begin failures++; $display("store %0d wrote past its end", t); end
    end
    $display("command waits %0d, data stalls %0d, read gaps %0d", u_mem.cmd_waits, u_mem.data_stalls, u_mem.read_gaps);
    checks += 2;
    if (u_mem.cmd_waits == 0 || u_mem.data_stalls == 0 || u_mem.read_gaps == 0) begin failures++; $display("a stall kind never happened"); end
    if (u_mem.byte_en_errors != 0) begin failures++; $display("byte enables not all set"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
