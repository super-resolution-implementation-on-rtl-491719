// tb_stage1 - self-checking testbench of the first convolution stage.
//
// A reduced stage (8 filters of 9x9, 12 x 10 image, 82-clock minor cycles) is
// loaded with random coefficients and fed two random frames. Each output
// pixel's 8 serial values are compared with the reference model (9x9
// correlation, replicate border, bias, ReLU, Q8.8). The output frame must
// start h*W + h + 1 minor cycles after the input frame and each output must
// leave K*K + 4 clocks after its minor-cycle pulse; start_out must mark the
// first output pixel of each frame.
module tb_stage1;
  import sr_pkg::*;
  import sr_model_pkg::*;
  localparam int K = 9, NF = 8, W = 12, H = 10, MINOR = 82;
  localparam int D = (K/2)*W + K/2 + 1;
  logic clk = 0, reset = 1;
  always #5 clk = ~clk;
  int checks = 0, failures = 0, zeros = 0, nonzeros = 0;
  longint cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  logic si = 0, sti = 0, so, sto;
  pix_t din = '0, dout;
  wload_t wl = '0;
  stage1 #(.K(K), .NF(NF), .IMG_W(W), .IMG_H(H)) dut (.clk, .reset, .sync_minor_in(si), .start_in(sti),
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
        if (cyc != pt[fr][p] + K*K + 4) begin failures++; $display("pulse %0d at %0d exp %0d", p, cyc, pt[fr][p] + K*K + 4); end
        if (sto != (n == 0)) begin failures++; $display("start_out at %0d", n); end
        if (n < 0 || n >= H*W) continue;
        for (int f = 0; f < NF; f++) begin
          if (f > 0) @(negedge clk);
          checks++;
          if (int'(dout) != m[fr].f1[f][n]) begin
            failures++;
            if (failures < 10) $display("f%0d pixel %0d map %0d got %0d exp %0d", fr, n, f, dout, m[fr].f1[f][n]);
          end
          if (dout == 0) zeros++; else nonzeros++;
        end
      end
  endtask

  initial begin
    for (int fr = 0; fr < 2; fr++) begin
      m[fr] = new(W, H, K, NF, 1, 5);
      m[fr].randomize_all();
      if (fr == 1) begin m[1].w1 = m[0].w1; m[1].b1 = m[0].b1; end
      m[fr].run1();
    end
    repeat (3) @(negedge clk);
    reset = 0;
    for (int f = 0; f < NF; f++) begin
      for (int t = 0; t < K*K; t++) load(2'd1, f, t, m[0].w1[f][t], 0);
      load(2'd1, f, 0, m[0].b1[f], 1);
    end
    load(2'd2, 0, 0, 12345, 0);   // other stages' coefficients must not disturb
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
