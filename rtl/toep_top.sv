// toep_top - Toeplitz (sliding-window) generator for a K x K convolution.
//
// Pixels of a frame arrive in raster order, one CH-channel pixel per minor
// cycle, sampled on the sync_minor_in pulse; the first one comes with
// start_in. They are written into a line buffer of K image rows (one memory,
// row r kept in slot r mod K). For every output pixel (r, c) the block reads
// the K x K neighbourhood in-(r+i-h, c+j-h), h = (K-1)/2, tap t = i*K + j in
// row-major order, and sends the taps serially, one per clock, on data_out.
// Coordinates outside the image are clamped to the nearest edge pixel, which
// gives the 'same' size, 'replicate' border of the reference algorithm.
//
// Timing: every sync_minor_in pulse is passed on as sync_minor_out 2 clocks
// later, followed by K*K taps, so the minor-cycle rhythm continues downstream
// also between frames (the taps are then meaningless). Window n is sent in the
// minor cycle that starts D = h*IMG_W + h + 1 minor cycles after the one that
// delivered pixel n, i.e. once every pixel it needs is stored; start_out marks
// window 0. The last h*IMG_W + h
// windows need no new input, so sync_minor_in must keep pulsing for D minor
// cycles after the last pixel. sync_minor_in pulses must be at least K*K
// clocks apart, IMG_W must exceed K, and a new frame may start only after the
// previous frame's last window. The buffer organisation and this timing are
// this design's own; the document names the block and its place only.
module toep_top
  import sr_pkg::*;
#(
  parameter int CH    = 1,    // channels per pixel
  parameter int K     = 9,    // window size (odd)
  parameter int IMG_W = 256,
  parameter int IMG_H = 256
) (
  input  logic               clk,
  input  logic               reset,
  input  logic               sync_minor_in,
  input  logic               start_in,
  input  pix_t [CH-1:0]      data_in,
  output logic               sync_minor_out,
  output logic               start_out,
  output pix_t [CH-1:0]      data_out
);
  localparam int H    = (K - 1) / 2;
  localparam int NPIX = IMG_W * IMG_H;
  localparam int D    = H * IMG_W + H + 1;
  localparam int PW   = $clog2(NPIX + D + 2);
  localparam int AW   = $clog2(K * IMG_W);
  localparam int RW   = $clog2(IMG_H + 1);
  localparam int XW   = $clog2(IMG_W + 1);
  localparam int SW   = $clog2(K + 1);
  localparam int TW   = $clog2(K + 1);

  logic [CH*DW-1:0] mem [K * IMG_W];

  // ---------------- write side ----------------
  logic [PW-1:0] p;            // minor cycles since the frame start
  logic          frame;        // a frame is in progress
  logic [RW-1:0] in_row;
  logic [XW-1:0] in_col;
  logic [SW-1:0] in_slot;
  logic          wr_en;
  logic [AW-1:0] wr_addr;
  logic [RW-1:0] wr_row;
  logic [XW-1:0] wr_col;
  logic [SW-1:0] wr_slot;

  always_comb begin
    wr_row  = start_in ? '0 : in_row;
    wr_col  = start_in ? '0 : in_col;
    wr_slot = start_in ? '0 : in_slot;
    wr_en   = sync_minor_in && (start_in || (frame && in_row < RW'(IMG_H)));
    wr_addr = AW'(wr_slot * IMG_W + wr_col);
  end

  always_ff @(posedge clk)
    if (wr_en) mem[wr_addr] <= data_in;

  // ---------------- read side ----------------
  logic [RW-1:0] out_row, cur_row;
  logic [XW-1:0] out_col, cur_col;
  logic [SW-1:0] out_slot, cur_slot;
  logic          emit, rd_busy, cur_first;
  logic [TW-1:0] ti, tj;
  logic [AW-1:0] rd_addr;
  logic [CH*DW-1:0] rd_data;

  assign emit = sync_minor_in && frame && !start_in && p >= PW'(D) && p < PW'(D + NPIX);

  always_ff @(posedge clk) begin
    if (reset) begin
      frame <= 1'b0; p <= '0;
      in_row <= '0; in_col <= '0; in_slot <= '0;
      out_row <= '0; out_col <= '0; out_slot <= '0;
      cur_row <= '0; cur_col <= '0; cur_slot <= '0; cur_first <= 1'b0;
      rd_busy <= 1'b0; ti <= '0; tj <= '0;
    end else begin
      if (sync_minor_in && (start_in || frame)) begin
        // write-side pixel counters
        if (wr_en) begin
          if (wr_col == XW'(IMG_W - 1)) begin
            in_col  <= '0;
            in_row  <= wr_row + 1'b1;
            in_slot <= (wr_slot == SW'(K - 1)) ? '0 : wr_slot + 1'b1;
          end else begin
            in_col  <= wr_col + 1'b1;
            in_row  <= wr_row;
            in_slot <= wr_slot;
          end
        end
        if (start_in) begin
          frame <= 1'b1; p <= PW'(1);
          out_row <= '0; out_col <= '0; out_slot <= '0;
        end else begin
          p <= p + 1'b1;
          if (p == PW'(D + NPIX - 1)) frame <= 1'b0;
        end
      end
      if (sync_minor_in) begin
        // every minor cycle sends K*K taps; they belong to a window only
        // while the frame's windows are due (emit)
        rd_busy <= 1'b1; ti <= '0; tj <= '0;
        cur_first <= emit && (out_row == '0) && (out_col == '0);
        if (emit) begin
          cur_row <= out_row; cur_col <= out_col; cur_slot <= out_slot;
          if (out_col == XW'(IMG_W - 1)) begin
            out_col  <= '0;
            out_row  <= out_row + 1'b1;
            out_slot <= (out_slot == SW'(K - 1)) ? '0 : out_slot + 1'b1;
          end else begin
            out_col <= out_col + 1'b1;
          end
        end
      end else if (rd_busy) begin
        if (tj == TW'(K - 1)) begin
          tj <= '0;
          if (ti == TW'(K - 1)) rd_busy <= 1'b0;
          else ti <= ti + 1'b1;
        end else begin
          tj <= tj + 1'b1;
        end
      end
    end
  end

  // address of tap (ti, tj) of the current window, borders replicated
  always_comb begin
    int r, c, s;
    r = int'(cur_row) + int'(ti) - H;
    c = int'(cur_col) + int'(tj) - H;
    if (r < 0) r = 0;
    if (r > IMG_H - 1) r = IMG_H - 1;
    if (c < 0) c = 0;
    if (c > IMG_W - 1) c = IMG_W - 1;
    s = int'(cur_slot) + (r - int'(cur_row)) + K;
    if (s >= K) s = s - K;
    if (s >= K) s = s - K;
    rd_addr = AW'(s * IMG_W + c);
  end

  always_ff @(posedge clk) begin
    rd_data <= mem[rd_addr];
  end

  always_ff @(posedge clk) begin
    if (reset) begin
      sync_minor_out <= 1'b0; start_out <= 1'b0;
    end else begin
      sync_minor_out <= 1'b0;
      start_out      <= 1'b0;
      if (rd_busy && ti == '0 && tj == '0) begin
        sync_minor_out <= 1'b1;
        start_out      <= cur_first;
      end
    end
  end
  // sync_minor_out is registered together with the memory read: both refer to
  // the tap issued one clock earlier.
  assign data_out = rd_data;

  a_spacing: assert property (@(posedge clk) disable iff (reset) sync_minor_in |-> !rd_busy || (ti == TW'(K - 1) && tj == TW'(K - 1)));
endmodule
