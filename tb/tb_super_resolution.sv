// tb_super_resolution - end-to-end test of the three-stage pipeline.
//
// The full network (9x9x64, 1x1 64->32, 5x5x32) on a small 12 x 10 image with
// 96-clock minor cycles: random coefficients are loaded, two random frames are
// streamed, and every output pixel is compared with the reference model. The
// output frame must start (4 + 2) * (W + 1) + 2 minor cycles after the input
// frame, each output pulse must follow its input pulse by 185 clocks, and
// start_out must mark the first output pixel.
module tb_super_resolution;
  import sr_pkg::*;
  import sr_model_pkg::*;
  localparam int W = 12, H = 10, MINOR = 96;
  localparam int D = 6 * (W + 1) + 2;
  // clocks from an input pulse to its output pulse: stage1 81+4, stage2 64+1,
  // stage3 25+3+5+2
  localparam int LAT = 85 + 65 + 35;
  logic clk = 0, reset = 1;
  always #5 clk = ~clk;
  int checks = 0, failures = 0, sats = 0, relus = 0;
  longint cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  logic si = 0, sti = 0, so, sto;
  pix_t din = '0, dout;
  wload_t wl = '0;
  super_resolution #(.IMG_W(W), .IMG_H(H)) dut (.clk, .reset, .sync_minor_in(si), .start_in(sti),
    .data_in(din), .wload(wl), .sync_minor_out(so), .start_out(sto), .data_out(dout));

  sr_model m [2];
  longint pt [2][H*W + D + 2];

  task automatic load(logic [1:0] st, int unit, int addr, int data, bit bias);
    @(negedge clk);
    wl.we = 1; wl.stage = st; wl.unit = 8'(unit); wl.addr = 8'(addr); wl.data = 16'(data); wl.bias = bias;
    @(negedge clk);
    wl = '0;
  endtask

  task automatic drive();
    for (int fr = 0; fr < 2; fr++)
      for (int p = 0; p < H*W + D + 1; p++) begin
        @(negedge clk);
        si = 1; sti = (p == 0); din = pix_t'(p < H*W ? m[fr].img[p] : 0);
        pt[fr][p] = cyc;
        @(negedge clk);
        si = 0; sti = 0; din = '0;
        repeat (MINOR - 2) @(negedge clk);
      end
  endtask

  task automatic check();
    for (int fr = 0; fr < 2; fr++)
      for (int p = 0; p < H*W + D + 1; p++) begin
        int n;
        n = p - D;
        do @(negedge clk); while (!so);
        checks += 2;
        if (cyc - pt[fr][p] != LAT) begin failures++; $display("pulse %0d: clock offset %0d", p, cyc - pt[fr][p]); end
        if (sto != (n == 0)) begin failures++; $display("start_out at %0d", n); end
        if (n < 0 || n >= H*W) continue;
        checks++;
        if (int'(dout) != m[fr].out[n]) begin
          failures++;
          if (failures < 10) $display("f%0d pixel %0d got %0d exp %0d", fr, n, dout, m[fr].out[n]);
        end
      end
  endtask

  initial begin
    for (int fr = 0; fr < 2; fr++) begin
      m[fr] = new(W, H);
      m[fr].randomize_all();
      if (fr == 1) begin
        m[1].w1 = m[0].w1; m[1].b1 = m[0].b1; m[1].w2 = m[0].w2; m[1].b2 = m[0].b2; m[1].w3 = m[0].w3;
      end
      m[fr].run();
      sats += m[fr].saturations; relus += m[fr].relu_zero;
    end
    repeat (3) @(negedge clk);
    reset = 0;
    for (int f = 0; f < 64; f++) begin
      for (int t = 0; t < 81; t++) load(2'd1, f, t, m[0].w1[f][t], 0);
      load(2'd1, f, 0, m[0].b1[f], 1);
    end
    for (int g = 0; g < 32; g++) begin
      for (int f = 0; f < 64; f++) load(2'd2, g, f, m[0].w2[g][f], 0);
      load(2'd2, g, 0, m[0].b2[g], 1);
      for (int t = 0; t < 25; t++) load(2'd3, g, t, m[0].w3[g][t], 0);
    end
    fork drive(); check(); join
    $display("ReLU clips %0d, saturations %0d", relus, sats);
    checks++;
    if (relus == 0) begin failures++; $display("ReLU clipping not exercised"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
