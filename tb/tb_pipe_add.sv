// tb_pipe_add - self-checking testbench of the pipelined adder tree.
//
// Sends random 32-value sets, some of them large enough to overflow 16 bits,
// one every 1 to 3 clocks, and checks each saturated sum, its latency
// (log2(N)+2 clocks) and the start_out marking.
module tb_pipe_add;
  import sr_pkg::*;
  import sr_model_pkg::*;
  localparam int N = 32, LAT = 7;
  logic clk = 0, reset = 1;
  always #5 clk = ~clk;
  int checks = 0, failures = 0, sat_seen = 0;
  longint cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  logic si = 0, sti = 0, so, sto;
  pix_t [N-1:0] din;
  pix_t dout;
  pipe_add dut (.clk, .reset, .sync_minor_in(si), .start_in(sti), .data_in(din),
                .sync_minor_out(so), .start_out(sto), .data_out(dout));

  int q[$]; longint tq[$]; bit stq[$];
  always @(posedge clk) if (!reset && so) begin
    checks += 3;
    if (q.size() == 0) begin failures++; $display("unexpected output"); end
    else begin
      int e; longint t; bit st;
      e = q.pop_front(); t = tq.pop_front(); st = stq.pop_front();
      if (int'(dout) != e) begin failures++; $display("got %0d exp %0d", dout, e); end
      if (cyc - t != LAT) begin failures++; $display("latency %0d", cyc - t); end
      if (sto != st) begin failures++; $display("start_out"); end
    end
  end

  initial begin
    din = '0;
    repeat (3) @(negedge clk);
    reset = 0;
    for (int v = 0; v < 200; v++) begin
      longint s;
      int lim;
      s = 0;
      lim = (v % 4 == 0) ? 32000 : 900;
      for (int i = 0; i < N; i++) begin din[i] = pix_t'(rnd(lim)); s += longint'(pix_t'(din[i])); end
      if (sat16(s) != s) sat_seen++;
      si = 1; sti = (v == 1);
      q.push_back(sat16(s)); tq.push_back(cyc); stq.push_back(v == 1);
      @(negedge clk);
      si = 0; sti = 0;
      repeat (v % 3) @(negedge clk);
    end
    repeat (20) @(negedge clk);
    checks += 2;
    if (q.size() != 0) begin failures++; $display("missing outputs"); end
    if (sat_seen == 0) begin failures++; $display("no saturation exercised"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
