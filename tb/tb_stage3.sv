// tb_stage3 - self-checking testbench of the reconstruction stage.
//
// The full-width stage (32 maps, 5x5 sub-filters) on a small 8 x 6 image, with
// 25-clock minor cycles (the shortest allowed): random maps and sub-filters,
// two frames. Every output pixel is compared with the reference model (per-map
// 5x5 correlation with replicate border, rounding to Q8.8, sum over maps,
// saturation), its timing is checked (frame delay h*W + h + 1 minor cycles,
// 35 clocks inside the minor cycle) and start_out must mark pixel 0.
module tb_stage3;
  import sr_pkg::*;
  import sr_model_pkg::*;
  localparam int K = 5, NCH = 32, W = 8, H = 6, MINOR = 25, LAT = 35;
  localparam int D = (K/2)*W + K/2 + 1;
  logic clk = 0, reset = 1;
  always #5 clk = ~clk;
  int checks = 0, failures = 0, sats = 0;
  longint cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  logic si = 0, sti = 0, so, sto;
  pix_t [NCH-1:0] din = '0;
  pix_t dout;
  wload_t wl = '0;
  stage3 #(.IMG_W(W), .IMG_H(H)) dut (.clk, .reset, .sync_minor_in(si), .start_in(sti), .data_in(din),
    .wload(wl), .sync_minor_out(so), .start_out(sto), .data_out(dout));

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
        si = 1; sti = (p == 0);
        for (int c = 0; c < NCH; c++) din[c] = pix_t'(p < H*W ? m[fr].f2[c][p] : 0);
        pt[fr][p] = cyc;
        @(negedge clk);
        si = 0; sti = 0;
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
        if (cyc != pt[fr][p] + LAT) begin failures++; $display("pulse %0d at %0d exp %0d", p, cyc, pt[fr][p] + LAT); end
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
      m[fr] = new(W, H, 9, 1, NCH, K);
      m[fr].randomize_all();
      // large maps in frame 1 so that the final sum saturates sometimes
      foreach (m[fr].f2[g, i]) m[fr].f2[g][i] = fr ? rnd(20000) : int'($urandom_range(3000));
      if (fr == 1) m[1].w3 = m[0].w3;
      m[fr].run3();
      sats += m[fr].saturations;
    end
    repeat (3) @(negedge clk);
    reset = 0;
    for (int c = 0; c < NCH; c++)
      for (int t = 0; t < K*K; t++) load(2'd3, c, t, m[0].w3[c][t], 0);
    load(2'd3, 0, 0, 4444, 1);   // stage 3 has no bias: must be ignored
    fork drive(); check(); join
    checks++;
    if (sats == 0) begin failures++; $display("saturation not exercised"); end
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
