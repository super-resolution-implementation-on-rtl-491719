// tb_sr_top_full - one complete operation of the accelerator at its default
// size: a 256 x 256 image, the full 9-1-5 network with 64 and 32 feature maps,
// 96-clock minor cycles and 8-word OCP bursts (no parameter is overridden).
// Random coefficients are loaded, a random image is placed in the behavioural
// OCP memory, app_go is pulsed, and the output image written back to memory
// must equal the reference model's bit for bit. Stage-3 weights are drawn
// large enough that some output pixels saturate. Counted and required: OCP
// command waits, write-data stalls, read-response gaps, ReLU clipping, output
// saturation; about 6.5 million clocks.
module tb_sr_top_full;
  import sr_pkg::*;
  import sr_model_pkg::*;
  localparam int W = 256, H = 256, NPIX = W*H;
  logic clk = 0, reset = 1;
  always #5 clk = ~clk;
  int checks = 0, failures = 0, relus = 0, sats = 0, runs = 0;

  logic app_go = 0, app_done;
  logic [31:0] in_addr, out_addr;
  wload_t wl = '0;
  ocp_m2s_t m2s;
  ocp_s2m_t s2m;

  sr_top dut (.clk, .reset, .app_go, .app_done, .in_addr, .out_addr,
    .wload(wl), .app_m2s(m2s), .app_s2m(s2m));
  ocp_mem_model u_mem (.clk, .reset, .m2s, .s2m);

  task automatic load(logic [1:0] st, int unit, int addr, int data, bit bias);
    @(negedge clk);
    wl.we = 1; wl.stage = st; wl.unit = 8'(unit); wl.addr = 8'(addr); wl.data = 16'(data); wl.bias = bias;
    @(negedge clk);
    wl = '0;
  endtask

  initial begin
    sr_model m;
    repeat (3) @(negedge clk);
    reset = 0;
    for (int run = 0; run < 1; run++) begin
      m = new(W, H);
      m.randomize_all();
      if (run == 0) foreach (m.w3[g, t]) m.w3[g][t] = rnd(3000);
      m.run();
      relus += m.relu_zero; sats += m.saturations;
      for (int f = 0; f < 64; f++) begin
        for (int t = 0; t < 81; t++) load(2'd1, f, t, m.w1[f][t], 0);
        load(2'd1, f, 0, m.b1[f], 1);
      end
      for (int g = 0; g < 32; g++) begin
        for (int f = 0; f < 64; f++) load(2'd2, g, f, m.w2[g][f], 0);
        load(2'd2, g, 0, m.b2[g], 1);
        for (int t = 0; t < 25; t++) load(2'd3, g, t, m.w3[g][t], 0);
      end
      in_addr = 32'h20000 * (run + 1); out_addr = 32'h100000 + 32'h20000 * run;
      for (int w = 0; w < NPIX / 4; w++)
        u_mem.mem[longint'(in_addr / 8 + w)] = {16'(m.img[4*w+3]), 16'(m.img[4*w+2]), 16'(m.img[4*w+1]), 16'(m.img[4*w])};
      @(negedge clk);
      app_go = 1; @(negedge clk); app_go = 0;
      @(negedge clk);
      while (!app_done) @(negedge clk);
      runs++;
      for (int i = 0; i < NPIX; i++) begin
        longint a;
        a = longint'(out_addr / 8 + i / 4);
        checks++;
        if (!u_mem.mem.exists(a) || int'(pix_t'(u_mem.mem[a][16*(i % 4) +: 16])) != m.out[i]) begin
          failures++;
          if (failures < 10) $display("run %0d pixel %0d got %0d exp %0d", run, i,
                                      u_mem.mem.exists(a) ? int'(pix_t'(u_mem.mem[a][16*(i % 4) +: 16])) : 99999, m.out[i]);
        end
      end
    end
    $display("command waits %0d, data stalls %0d, read gaps %0d, ReLU clips %0d, saturations %0d, border pixels %0d, runs %0d",
             u_mem.cmd_waits, u_mem.data_stalls, u_mem.read_gaps, relus, sats, (2 * W + 2 * H - 4), runs);
    checks += 6;
    if (u_mem.cmd_waits == 0)   begin failures++; $display("no command wait"); end
    if (u_mem.data_stalls == 0) begin failures++; $display("no write-data stall"); end
    if (u_mem.read_gaps == 0)   begin failures++; $display("no read gap"); end
    if (relus == 0)             begin failures++; $display("no ReLU clipping"); end
    if (sats == 0)              begin failures++; $display("no output saturation"); end
    if (runs != 1)              begin failures++; $display("run missing"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (12000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
