// tb_piso - self-checking testbench of the parallel-to-serial converter.
//
// Loads random 64-value words on sync_minor_in, with the tightest allowed
// spacing (N clocks) and looser ones, and checks that value k appears on
// data_out exactly k+1 clocks after the load, that sync_minor_out marks value
// 0 and that start_out follows start_in.
module tb_piso;
  import sr_pkg::*;
  localparam int N = 64;
  logic clk = 0, reset = 1;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic si = 0, sti = 0, so, sto;
  pix_t [N-1:0] din;
  pix_t dout;
  piso dut (.clk, .reset, .sync_minor_in(si), .start_in(sti), .data_in(din),
            .sync_minor_out(so), .start_out(sto), .data_out(dout));

  initial begin
    din = '0;
    repeat (3) @(negedge clk);
    reset = 0;
    for (int v = 0; v < 30; v++) begin
      pix_t [N-1:0] ref_w;
      for (int i = 0; i < N; i++) ref_w[i] = pix_t'($urandom);
      din = ref_w; si = 1; sti = (v == 3);
      @(negedge clk);
      si = 0; sti = 0; din = '0;
      for (int k = 0; k < N; k++) begin
        checks++;
        if (dout !== ref_w[k]) begin failures++; $display("v%0d k%0d got %h exp %h", v, k, dout, ref_w[k]); end
        if (k == 0) begin
          checks += 2;
          if (!so) begin failures++; $display("sync_minor_out missing"); end
          if (sto != (v == 3)) begin failures++; $display("start_out wrong"); end
        end else begin
          checks++;
          if (so) begin failures++; $display("extra sync_minor_out"); end
        end
        if (k != N - 1) @(negedge clk);
      end
      repeat (v % 3) @(negedge clk);
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
