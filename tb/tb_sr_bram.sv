// tb_sr_bram - self-checking testbench of the dual-port image buffer.
//
// Writes random words and single lanes into a shadow copy and the RAM, reads
// back random addresses (one clock read latency) and compares.
module tb_sr_bram;
  localparam int DEPTH = 16384, DW = 64;
  logic clk = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic [3:0] we = 0;
  logic [13:0] waddr = 0, raddr = 0;
  logic [DW-1:0] wdata = 0, rdata;
  logic [DW-1:0] shadow [256];

  sr_bram dut (.clk, .we, .waddr, .wdata, .raddr, .rdata);

  initial begin
    // fill 256 words spread over the whole depth
    for (int i = 0; i < 256; i++) begin
      @(negedge clk);
      shadow[i] = {$urandom, $urandom};
      we = 4'hf; waddr = 14'(i * 64 + 3); wdata = shadow[i];
    end
    // lane writes
    for (int n = 0; n < 300; n++) begin
      int i, l;
      @(negedge clk);
      i = $urandom_range(255); l = $urandom_range(3);
      we = 4'(1 << l); waddr = 14'(i * 64 + 3); wdata = {$urandom, $urandom};
      shadow[i][16*l +: 16] = wdata[16*l +: 16];
    end
    @(negedge clk); we = 0;
    for (int n = 0; n < 500; n++) begin
      int i;
      i = $urandom_range(255);
      raddr = 14'(i * 64 + 3);
      @(negedge clk);
      checks++;
      if (rdata !== shadow[i]) begin failures++; $display("word %0d got %h exp %h", i, rdata, shadow[i]); end
    end
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
