// tb_stage2 - self-checking testbench of the 1x1 convolution stage.
//
// The default stage (64 -> 32 maps) gets random serial 64-value pixels on
// minor cycles of 64 clocks (back to back) and 70 clocks; every one of the 32
// parallel outputs is compared with the reference dot product + bias + ReLU,
// and must appear NIN+1 clocks after the pixel's pulse, with start_out on the
// first pixel only.
module tb_stage2;
  import sr_pkg::*;
  import sr_model_pkg::*;
  localparam int NIN = 64, NF = 32, NPIX = 40;
  logic clk = 0, reset = 1;
  always #5 clk = ~clk;
  int checks = 0, failures = 0, zeros = 0, nonzeros = 0;
  longint cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  logic si = 0, sti = 0, so, sto;
  pix_t din = '0;
  pix_t [NF-1:0] dout;
  wload_t wl = '0;
  stage2 dut (.clk, .reset, .sync_minor_in(si), .start_in(sti), .data_in(din), .wload(wl),
              .sync_minor_out(so), .start_out(sto), .data_out(dout));

  int w [NF][NIN], b [NF], x [NPIX][NIN];
  longint pt [NPIX];

  task automatic load(logic [1:0] st, int unit, int addr, int data, bit bias);
    @(negedge clk);
    wl.we = 1; wl.stage = st; wl.unit = 8'(unit); wl.addr = 8'(addr); wl.data = 16'(data); wl.bias = bias;
    @(negedge clk);
    wl = '0;
  endtask

  task automatic drive();
    for (int p = 0; p < NPIX; p++) begin
      for (int j = 0; j < NIN; j++) begin
        @(negedge clk);
        si = (j == 0); sti = (j == 0 && p == 0); din = pix_t'(x[p][j]);
        if (j == 0) pt[p] = cyc;
      end
      if (p % 2) repeat (6) begin @(negedge clk); si = 0; sti = 0; din = '0; end
    end
    @(negedge clk); si = 0; sti = 0;
  endtask

  task automatic check();
    for (int p = 0; p < NPIX; p++) begin
      do @(negedge clk); while (!so);
      checks += 2;
      if (cyc != pt[p] + NIN + 1) begin failures++; $display("pixel %0d at %0d exp %0d", p, cyc, pt[p] + NIN + 1); end
      if (sto != (p == 0)) begin failures++; $display("start_out at %0d", p); end
      for (int f = 0; f < NF; f++) begin
        longint a = 0;
        int e;
        for (int j = 0; j < NIN; j++) a += longint'(x[p][j]) * w[f][j];
        e = finish(a, b[f], 1);
        checks++;
        if (int'(dout[f]) != e) begin failures++; if (failures < 10) $display("pixel %0d map %0d got %0d exp %0d", p, f, dout[f], e); end
        if (e == 0) zeros++; else nonzeros++;
      end
    end
  endtask

  initial begin
    foreach (w[i, j]) w[i][j] = rnd(64);
    foreach (b[i]) b[i] = rnd(512);
    foreach (x[i, j]) x[i][j] = int'($urandom_range(2000));
    repeat (3) @(negedge clk);
    reset = 0;
    for (int f = 0; f < NF; f++) begin
      for (int j = 0; j < NIN; j++) load(2'd2, f, j, w[f][j], 0);
      load(2'd2, f, 0, b[f], 1);
    end
    load(2'd1, 0, 0, 999, 0);
    load(2'd3, 0, 0, 999, 0);
    fork drive(); check(); join
    checks++;
    if (zeros == 0 || nonzeros == 0) begin failures++; $display("ReLU clipping not exercised"); end
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
