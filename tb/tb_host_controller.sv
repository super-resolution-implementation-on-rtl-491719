// tb_host_controller - self-checking testbench of the host controller.
//
// The controller runs against testbench stand-ins: an OCP-BRAM FSM that
// answers each request after a random delay, bram1 holding a random 12 x 10
// image, bram2 capturing writes, and a pipeline that answers pulse p, 50 clocks
// later, with pixel p - 20 of the input times 3 plus 1 (marked by start at
// p = 20). Checked: the load request (direction, address, word count) comes
// first, the sync pulses are exactly MINOR clocks apart and start comes with
// pixel 0, every input pixel is streamed in order, every output pixel lands in
// the right bram2 lane, the store request follows the last output, and
// app_done rises after the store and falls on the next app_go.
module tb_host_controller;
  import sr_pkg::*;
  localparam int W = 12, H = 10, MINOR = 90, NPIX = W*H, DEPTH = NPIX/4, DL = 20, LAT = 50;
  logic clk = 0, reset = 1;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  longint cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  logic app_go = 0, app_done, x_go, x_dir, x_done = 0;
  logic [31:0] in_addr = 32'h100, out_addr = 32'h9000, x_addr;
  logic [$clog2(DEPTH):0] x_nwords;
  logic [$clog2(DEPTH)-1:0] b1_raddr, b2_waddr;
  logic [63:0] b1_rdata, b2_wdata;
  logic [3:0] b2_we;
  logic sr_sync, sr_start, sr_sync_in = 0, sr_start_in = 0;
  pix_t sr_data, sr_data_in = '0;

  host_controller #(.IMG_W(W), .IMG_H(H), .MINOR(MINOR)) dut (.clk, .reset, .app_go, .app_done,
    .in_addr, .out_addr, .x_go, .x_dir, .x_addr, .x_nwords, .x_done, .b1_raddr, .b1_rdata,
    .b2_we, .b2_waddr, .b2_wdata, .sr_sync, .sr_start, .sr_data, .sr_sync_in, .sr_start_in, .sr_data_in);

  logic [63:0] bram1 [DEPTH], bram2 [DEPTH];
  always @(posedge clk) begin
    b1_rdata <= bram1[b1_raddr];
    for (int l = 0; l < 4; l++) if (b2_we[l]) bram2[b2_waddr][16*l +: 16] <= b2_wdata[16*l +: 16];
  end

  // FSM stand-in
  int loads = 0, stores = 0;
  bit ran = 0;
  always @(posedge clk) if (!reset && x_go) begin
    checks += 2;
    if (!x_dir) begin
      loads++;
      if (x_addr != in_addr || x_nwords != DEPTH) begin failures++; $display("load request wrong"); end
      if (ran) begin failures++; $display("load after streaming"); end
    end else begin
      stores++;
      if (x_addr != out_addr || x_nwords != DEPTH) begin failures++; $display("store request wrong"); end
      if (got != NPIX) begin failures++; $display("store before all outputs (%0d)", got); end
    end
    fork begin
      repeat ($urandom_range(40, 5)) @(negedge clk);
      x_done = 1; @(negedge clk); x_done = 0;
    end join_none
  end

  // pipeline stand-in and input checks
  int p = 0, got = 0;
  longint last_sync = -1;
  pix_t inq [$];
  always @(posedge clk) if (!reset && sr_sync) begin
    automatic int pp;
    pp = p;
    ran = 1;
    checks += 2;
    if (last_sync >= 0 && cyc - last_sync != MINOR) begin failures++; $display("sync spacing %0d", cyc - last_sync); end
    if (sr_start != (pp == 0)) begin failures++; $display("start at pulse %0d", pp); end
    if (pp < NPIX) begin
      checks++;
      if (sr_data != pix_t'(bram1[pp / 4][16*(pp % 4) +: 16])) begin failures++; $display("pixel %0d streamed wrong", pp); end
    end
    inq.push_back(sr_data);
    last_sync = cyc;
    p++;
    fork begin
      pix_t v;
      repeat (LAT - 1) @(negedge clk);
      v = (pp >= DL) ? pix_t'(3 * int'(inq[pp - DL]) + 1) : pix_t'(16'h5a5a);
      sr_sync_in = 1; sr_start_in = (pp == DL); sr_data_in = v;
      @(negedge clk);
      sr_sync_in = 0; sr_start_in = 0;
      if (pp >= DL) got++;
    end join_none
  end

  initial begin
    foreach (bram1[i]) bram1[i] = {$urandom, $urandom};
    foreach (bram2[i]) bram2[i] = '0;
    repeat (3) @(negedge clk);
    reset = 0;
    repeat (5) @(negedge clk);
    app_go = 1; @(negedge clk); app_go = 0;
    while (!app_done) @(negedge clk);
    checks += 3;
    if (loads != 1 || stores != 1) begin failures++; $display("loads %0d stores %0d", loads, stores); end
    for (int i = 0; i < NPIX; i++) begin
      checks++;
      if (pix_t'(bram2[i / 4][16*(i % 4) +: 16]) != pix_t'(3 * int'(pix_t'(bram1[i / 4][16*(i % 4) +: 16])) + 1)) begin
        failures++; if (failures < 10) $display("output pixel %0d wrong", i);
      end
    end
    repeat (200) @(negedge clk);
    if (!app_done) begin failures++; $display("app_done did not stay high"); end
    ran = 0;
    app_go = 1; @(negedge clk); app_go = 0; @(negedge clk);
    if (app_done) begin failures++; $display("app_done not cleared by app_go"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (40000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
