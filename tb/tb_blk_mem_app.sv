// tb_blk_mem_app - self-checking testbench of the application block.
//
// blk_mem_app (bram1, bram2, OCP-BRAM FSM, host controller) is connected to
// the behavioural OCP memory and, in place of the network, to a stand-in
// pipeline that answers pulse p, 40 clocks later, with input pixel p - 15
// negated (start at p = 15). A 12 x 10 image is placed in memory; after
// app_go the negated image must appear at out_addr, nothing may be written
// outside it, app_done must rise, and the memory must have shown command
// waits, data stalls and read gaps. Two runs are made with different images.
module tb_blk_mem_app;
  import sr_pkg::*;
  localparam int W = 12, H = 10, NPIX = W*H, DL = 15, LAT = 40;
  logic clk = 0, reset = 1;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic app_go = 0, app_done;
  logic [31:0] in_addr, out_addr;
  ocp_m2s_t m2s;
  ocp_s2m_t s2m;
  logic so, sto, si = 0, sti = 0;
  pix_t dso, dsi = '0;

  blk_mem_app #(.IMG_W(W), .IMG_H(H), .MINOR(84)) dut (.clk, .reset, .app_go, .app_done, .in_addr, .out_addr,
    .app_m2s(m2s), .app_s2m(s2m), .sr_sync_out(so), .sr_start_out(sto), .sr_data_out(dso),
    .sr_sync_in(si), .sr_start_in(sti), .sr_data_in(dsi));
  ocp_mem_model u_mem (.clk, .reset, .m2s, .s2m);

  int p = 0;
  pix_t inq [$];
  always @(posedge clk) if (!reset && so) begin
    automatic int pp;
    pp = p;
    if (sto) begin p = 0; pp = 0; inq.delete(); end
    inq.push_back(dso);
    p = pp + 1;
    fork begin
      repeat (LAT - 1) @(negedge clk);
      si = 1; sti = (pp == DL); dsi = (pp >= DL) ? -inq[pp - DL] : pix_t'(16'h1234);
      @(negedge clk);
      si = 0; sti = 0;
    end join_none
  end

  initial begin
    repeat (3) @(negedge clk);
    reset = 0;
    for (int run = 0; run < 2; run++) begin
      int img [NPIX];
      in_addr = 32'h10000 * (run + 1); out_addr = 32'h80000 + 32'h10000 * run;
      foreach (img[i]) img[i] = int'($urandom_range(65535)) - 32768;
      for (int w = 0; w < NPIX / 4; w++)
        u_mem.mem[longint'(in_addr / 8 + w)] = {16'(img[4*w+3]), 16'(img[4*w+2]), 16'(img[4*w+1]), 16'(img[4*w])};
      @(negedge clk);
      app_go = 1; @(negedge clk); app_go = 0;
      @(negedge clk);
      checks++;
      if (app_done) begin failures++; $display("app_done not cleared"); end
      while (!app_done) @(negedge clk);
      for (int i = 0; i < NPIX; i++) begin
        longint a;
        a = longint'(out_addr / 8 + i / 4);
        checks++;
        if (!u_mem.mem.exists(a) || pix_t'(u_mem.mem[a][16*(i % 4) +: 16]) != -pix_t'(img[i])) begin
          failures++; if (failures < 10) $display("run %0d pixel %0d wrong", run, i);
        end
      end
      checks++;
      if (u_mem.mem.exists(longint'(out_addr / 8 + NPIX / 4))) begin failures++; $display("write past the image"); end
    end
    $display("command waits %0d, data stalls %0d, read gaps %0d", u_mem.cmd_waits, u_mem.data_stalls, u_mem.read_gaps);
    checks++;
    if (u_mem.cmd_waits == 0 || u_mem.data_stalls == 0 || u_mem.read_gaps == 0) begin failures++; $display("a stall kind never happened"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
