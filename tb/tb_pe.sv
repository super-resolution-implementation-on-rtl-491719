// tb_pe - self-checking testbench of the processing element.
//
// Two PEs are tested: the default one (81 taps, ReLU) and a 25-tap one without
// ReLU. Random weights, biases and input vectors are sent back to back with
// the tightest allowed spacing (N clocks) and with a looser one. Every result
// is compared with the reference model's value, its latency (N+1 clocks after
// sync_minor_in) is checked, and start_out must mark the first result only.
module tb_pe;
  import sr_pkg::*;
  import sr_model_pkg::*;

  logic clk = 0, reset = 1;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  longint cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  // ---- DUT A: N = 81, ReLU ----
  localparam int NA = 81, NB = 25;
  logic sa, sta, soa, stoa, wea, bwa; pix_t xa, ya, wda; logic [$clog2(NA)-1:0] waa;
  pe dut_a (.clk, .reset, .sync_minor_in(sa), .start_in(sta), .data_in(xa),
            .sync_minor_out(soa), .start_out(stoa), .data_out(ya),
            .w_we(wea), .w_addr(waa), .w_data(wda), .b_we(bwa), .b_data(wda));
  // ---- DUT B: N = 25, no ReLU ----
  logic sb, stb, sob, stob, web, bwb; pix_t xb, yb, wdb; logic [$clog2(NB)-1:0] wab;
  pe #(.N(NB), .RELU(1'b0)) dut_b (.clk, .reset, .sync_minor_in(sb), .start_in(stb), .data_in(xb),
            .sync_minor_out(sob), .start_out(stob), .data_out(yb),
            .w_we(web), .w_addr(wab), .w_data(wdb), .b_we(bwb), .b_data(wdb));

  int wa[NA], wb[NB], ba, bb;
  int qa[$], qb[$];
  longint ta[$], tb_[$];
  int zeros = 0, sats = 0, firsts_a = 0, firsts_b = 0;

  always @(posedge clk) if (!reset) begin
    if (soa) begin
      checks += 3;
      if (qa.size() == 0) begin failures++; $display("A: unexpected result"); end
      else begin
        int e; longint t;
        e = qa.pop_front(); t = ta.pop_front();
        if (int'(ya) != e) begin failures++; $display("A: got %0d exp %0d", ya, e); end
        if (cyc - t != NA + 1) begin failures++; $display("A: latency %0d", cyc - t); end
        if (stoa != (firsts_a == 0)) begin failures++; $display("A: start_out %0b", stoa); end
        if (e == 0) zeros++;
        if (e == 32767) sats++;
        firsts_a++;
      end
    end
    if (sob) begin
      checks += 3;
      if (qb.size() == 0) begin failures++; $display("B: unexpected result"); end
      else begin
        int e; longint t;
        e = qb.pop_front(); t = tb_.pop_front();
        if (int'(yb) != e) begin failures++; $display("B: got %0d exp %0d", yb, e); end
        if (cyc - t != NB + 1) begin failures++; $display("B: latency %0d", cyc - t); end
        if (stob != (firsts_b == 0)) begin failures++; $display("B: start_out %0b", stob); end
        firsts_b++;
      end
    end
  end

  task automatic send_a(int gap, bit first, int lim);
    int x[NA]; longint acc = 0;
    foreach (x[i]) begin x[i] = rnd(lim); acc += longint'(x[i]) * wa[i]; end
    qa.push_back(finish(acc, ba, 1));
    for (int i = 0; i < NA; i++) begin
      sa <= (i == 0); sta <= (i == 0) && first; xa <= pix_t'(x[i]);
      if (i == 0) ta.push_back(cyc + 1);
      @(posedge clk);
    end
    if (gap > 0) begin sa <= 0; sta <= 0; end
    repeat (gap) @(posedge clk);
  endtask

  task automatic send_b(int gap, bit first);
    int x[NB]; longint acc = 0;
    foreach (x[i]) begin x[i] = rnd(20000); acc += longint'(x[i]) * wb[i]; end
    qb.push_back(finish(acc, bb, 0));
    for (int i = 0; i < NB; i++) begin
      sb <= (i == 0); stb <= (i == 0) && first; xb <= pix_t'(x[i]);
      if (i == 0) tb_.push_back(cyc + 1);
      @(posedge clk);
    end
    if (gap > 0) begin sb <= 0; stb <= 0; end
    repeat (gap) @(posedge clk);
  endtask

  initial begin
    sa = 0; sta = 0; xa = 0; wea = 0; bwa = 0; waa = 0; wda = 0;
    sb = 0; stb = 0; xb = 0; web = 0; bwb = 0; wab = 0; wdb = 0;
    repeat (3) @(posedge clk);
    reset <= 0;
    foreach (wa[i]) begin wa[i] = rnd(200); wea <= 1; waa <= 7'(i); wda <= pix_t'(wa[i]); @(posedge clk); end
    wea <= 0;
    ba = rnd(2000); bwa <= 1; wda <= pix_t'(ba); @(posedge clk); bwa <= 0;
    foreach (wb[i]) begin wb[i] = rnd(300); web <= 1; wab <= 5'(i); wdb <= pix_t'(wb[i]); @(posedge clk); end
    web <= 0;
    bb = rnd(2000); bwb <= 1; wdb <= pix_t'(bb); @(posedge clk); bwb <= 0;
    fork
      begin for (int v = 0; v < 40; v++) send_a(v % 2 ? 0 : 5, v == 0, v < 30 ? 300 : 32000); sa <= 0; end
      begin for (int v = 0; v < 60; v++) send_b(v % 3, v == 0); sb <= 0; end
    join
    repeat (100) @(posedge clk);
    checks++;
    if (qa.size() != 0 || qb.size() != 0) begin failures++; $display("missing results"); end
    checks++;
    if (zeros == 0 || sats == 0) begin failures++; $display("ReLU clip %0d / saturation %0d never seen", zeros, sats); end
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
