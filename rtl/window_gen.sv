// window_gen: pixel window generation with two line buffers.
//
// After a start pulse it scans the stored image in raster order, reading one
// pixel per clock through an asynchronous read port (rd_row, rd_col ->
// rd_pix). Two line buffers of length L = M keep the previous two rows, so
// the origin pixel of each window and its North, South, West and East
// neighbours are all available without a second memory access. The scan
// runs over (N+1) x (M+1) positions: the extra row and column flush the last
// windows out. Each window is emitted with its origin coordinates on
// win_row/win_col one clock after the pixel that completes it.
//
// Border rule: a neighbour outside the image is replaced by the origin, so no
// brightness flows across the image border (zero-flux boundary). The line
// buffers and the one-pixel-per-clock rate follow the published architecture; the border
// rule and the flush are this design's choices.
//
// Timing: busy from the clock after start until the scan ends; done is a
// one-clock pulse in the same clock as the last win_valid.
module window_gen
  import ad_pkg::*;
#(
  parameter int unsigned N  = 256,
  parameter int unsigned M  = 256,
  parameter int unsigned RW = $clog2(N),
  parameter int unsigned CW = $clog2(M)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          start,
  output logic          busy,
  output logic          done,
  output logic [RW-1:0] rd_row,
  output logic [CW-1:0] rd_col,
  input  code_t         rd_pix,
  output logic          win_valid,
  output logic [RW-1:0] win_row,
  output logic [CW-1:0] win_col,
  output window_t       win
);

  code_t lb1 [M];   // row r-1
  code_t lb2 [M];   // row r-2

  logic [RW:0] r;   // 0..N
  logic [CW:0] c;   // 0..M
  code_t mid_d1, mid_d2, top_d1, bot_d1;
  code_t top, mid;
  logic [CW-1:0] cc;
  logic last_pos;

  assign rd_row   = (r >= (RW+1)'(N)) ? RW'(N - 1) : r[RW-1:0];
  assign cc       = (c >= (CW+1)'(M)) ? CW'(M - 1) : c[CW-1:0];
  assign rd_col   = cc;
  assign top      = lb2[cc];
  assign mid      = lb1[cc];
  assign last_pos = (r == (RW+1)'(N)) && (c == (CW+1)'(M));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy      <= 1'b0;
      done      <= 1'b0;
      r         <= '0;
      c         <= '0;
      win_valid <= 1'b0;
      win_row   <= '0;
      win_col   <= '0;
      win       <= '0;
      mid_d1    <= '0;
      mid_d2    <= '0;
      top_d1    <= '0;
      bot_d1    <= '0;
    end else begin
      done      <= 1'b0;
      win_valid <= 1'b0;
      if (!busy) begin
        if (start) begin
          busy <= 1'b1;
          r    <= '0;
          c    <= '0;
        end
      end else begin
        // emit the window centred on (r-1, c-1)
        if (r != 0 && c != 0) begin
          win_valid <= 1'b1;
          win_row   <= RW'(r - 1'b1);
          win_col   <= CW'(c - 1'b1);
          win.o     <= mid_d1;
          win.n     <= (r == 1)                ? mid_d1 : top_d1;
          win.s     <= (r == (RW+1)'(N))       ? mid_d1 : bot_d1;
          win.w     <= (c == 1)                ? mid_d1 : mid_d2;
          win.e     <= (c == (CW+1)'(M))       ? mid_d1 : mid;
        end
        mid_d1 <= mid;
        mid_d2 <= mid_d1;
        top_d1 <= top;
        bot_d1 <= rd_pix;
        if (last_pos) begin
          busy <= 1'b0;
          done <= 1'b1;
        end else if (c == (CW+1)'(M)) begin
          c <= '0;
          r <= r + 1'b1;
        end else begin
          c <= c + 1'b1;
        end
      end
    end
  end

  // line buffers: shift the column's pixel from row r-1 to r-2
  always_ff @(posedge clk) begin
    if (busy && c < (CW+1)'(M)) begin
      lb2[cc] <= mid;
      lb1[cc] <= rd_pix;
    end
  end

endmodule
