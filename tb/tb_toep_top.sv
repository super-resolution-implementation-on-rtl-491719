// tb_toep_top - self-checking testbench of the Toeplitz window generator.
//
// Two generators are tested on small images: a 9x9, one-channel one (12 x 10
// image) and a 5x5, two-channel one (8 x 6 image), each with minor cycles of
// exactly K*K clocks, the shortest allowed. Two frames of random pixels are
// sent. For every window the K*K serial taps are compared with the clamped
// (replicate-border) neighbourhood of the reference image, the window must
// start 2 clocks after sync pulse n + h*W + h + 1 of its frame, and start_out
// must mark window 0 only.
module tb_toep_top;
  import sr_pkg::*;
  logic clk = 0, reset = 1;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  longint cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  // ---- instance A: K = 9, CH = 1, 12 x 10 ----
  localparam int KA = 9, WA = 12, HA = 10, CA = 1;
  // ---- instance B: K = 5, CH = 2, 8 x 6 ----
  localparam int KB = 5, WB = 8, HB = 6, CB = 2;

  logic sa = 0, sta = 0, soa, stoa; pix_t [CA-1:0] da = '0, qa;
  logic sb = 0, stb = 0, sob, stob; pix_t [CB-1:0] db = '0, qb;

  toep_top #(.CH(CA), .K(KA), .IMG_W(WA), .IMG_H(HA)) dut_a (.clk, .reset,
    .sync_minor_in(sa), .start_in(sta), .data_in(da), .sync_minor_out(soa), .start_out(stoa), .data_out(qa));
  toep_top #(.CH(CB), .K(KB), .IMG_W(WB), .IMG_H(HB)) dut_b (.clk, .reset,
    .sync_minor_in(sb), .start_in(stb), .data_in(db), .sync_minor_out(sob), .start_out(stob), .data_out(qb));

  function automatic int clampi(int v, int lo, int hi);
    return v < lo ? lo : (v > hi ? hi : v);
  endfunction

  // one generic checker per instance, written as a task run in parallel
  int imgA [2][HA*WA][CA];
  int imgB [2][HB*WB][CB];
  longint ptA [2][HA*WA + (KA/2)*WA + KA/2 + 4];
  longint ptB [2][HB*WB + (KB/2)*WB + KB/2 + 4];
  int winsA = 0, winsB = 0;

  task automatic drive_a();
    localparam int D = (KA/2)*WA + KA/2 + 1;
    for (int fr = 0; fr < 2; fr++) begin
      foreach (imgA[fr][i, c]) imgA[fr][i][c] = int'($urandom_range(65535)) - 32768;
      for (int p = 0; p < HA*WA + D + 1; p++) begin
        @(negedge clk);
        sa = 1; sta = (p == 0);
        for (int c = 0; c < CA; c++) da[c] = pix_t'(p < HA*WA ? imgA[fr][p][c] : 0);
        ptA[fr][p] = cyc;
        @(negedge clk);
        sa = 0; sta = 0; da = '0;
        repeat (KA*KA - 2) @(negedge clk);
      end
    end
  endtask

  task automatic drive_b();
    localparam int D = (KB/2)*WB + KB/2 + 1;
    for (int fr = 0; fr < 2; fr++) begin
      foreach (imgB[fr][i, c]) imgB[fr][i][c] = int'($urandom_range(65535)) - 32768;
      for (int p = 0; p < HB*WB + D + 1; p++) begin
        @(negedge clk);
        sb = 1; stb = (p == 0);
        for (int c = 0; c < CB; c++) db[c] = pix_t'(p < HB*WB ? imgB[fr][p][c] : 0);
        ptB[fr][p] = cyc;
        @(negedge clk);
        sb = 0; stb = 0; db = '0;
        repeat (KB*KB - 2) @(negedge clk);
      end
    end
  endtask

  task automatic check_a();
    localparam int H = KA/2, D = H*WA + H + 1;
    for (int fr = 0; fr < 2; fr++)
      for (int p = 0; p < HA*WA + D + 1; p++) begin
        int r, c, n;
        n = p - D;
        r = n / WA; c = n % WA;
        do @(negedge clk); while (!soa);
        checks += 2;
        if (cyc != ptA[fr][p] + 2) begin failures++; $display("A: pulse %0d at %0d exp %0d", p, cyc, ptA[fr][p] + 2); end
        if (stoa != (n == 0)) begin failures++; $display("A: start_out at window %0d", n); end
        if (n < 0 || n >= HA*WA) continue;
        for (int t = 0; t < KA*KA; t++) begin
          int rr, cc;
          if (t > 0) @(negedge clk);
          rr = clampi(r + t / KA - H, 0, HA - 1); cc = clampi(c + t % KA - H, 0, WA - 1);
          for (int ch = 0; ch < CA; ch++) begin
            checks++;
            if (int'(pix_t'(qa[ch])) != imgA[fr][rr*WA + cc][ch]) begin
              failures++;
              if (failures < 10) $display("A: f%0d win (%0d,%0d) tap %0d ch %0d got %0d exp %0d", fr, r, c, t, ch, qa[ch], imgA[fr][rr*WA + cc][ch]);
            end
          end
        end
        winsA++;
      end
  endtask

  task automatic check_b();
    localparam int H = KB/2, D = H*WB + H + 1;
    for (int fr = 0; fr < 2; fr++)
      for (int p = 0; p < HB*WB + D + 1; p++) begin
        int r, c, n;
        n = p - D;
        r = n / WB; c = n % WB;
        do @(negedge clk); while (!sob);
        checks += 2;
        if (cyc != ptB[fr][p] + 2) begin failures++; $display("B: pulse %0d at %0d exp %0d", p, cyc, ptB[fr][p] + 2); end
        if (stob != (n == 0)) begin failures++; $display("B: start_out at window %0d", n); end
        if (n < 0 || n >= HB*WB) continue;
        for (int t = 0; t < KB*KB; t++) begin
          int rr, cc;
          if (t > 0) @(negedge clk);
          rr = clampi(r + t / KB - H, 0, HB - 1); cc = clampi(c + t % KB - H, 0, WB - 1);
          for (int ch = 0; ch < CB; ch++) begin
            checks++;
            if (int'(pix_t'(qb[ch])) != imgB[fr][rr*WB + cc][ch]) begin
              failures++;
              if (failures < 10) $display("B: f%0d win (%0d,%0d) tap %0d ch %0d got %0d exp %0d", fr, r, c, t, ch, qb[ch], imgB[fr][rr*WB + cc][ch]);
            end
          end
        end
        winsB++;
      end
  endtask

  initial begin
    repeat (3) @(negedge clk);
    reset = 0;
    fork
      drive_a();
      drive_b();
      check_a();
      check_b();
    join
    checks++;
    if (winsA != 2*HA*WA || winsB != 2*HB*WB) begin failures++; $display("windows %0d %0d", winsA, winsB); end
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
