// image_memory: one N x M array of 4-bit quantized pixels ("N x M bit memory").
//
// The engine holds two of these and uses them in turn: one is read to build
// the pixel windows of an iteration while the other receives the image read
// back from the crossbar, a whole row per clock. Ports:
//   * pixel write (we, wrow, wcol, wdata): one pixel per clock, used to load
//     the quantized input image;
//   * row write (row_we, row_addr, row_data): M pixels at once, used by the
//     reconstruction step; a pixel write in the same clock to the same row
//     loses to it;
//   * pixel read (rrow, rcol -> rdata): asynchronous.
// The array has no reset; every word is written before it is read.
module image_memory
  import ad_pkg::*;
#(
  parameter int unsigned N  = 256,
  parameter int unsigned M  = 256,
  parameter int unsigned RW = $clog2(N),
  parameter int unsigned CW = $clog2(M)
) (
  input  logic          clk,
  input  logic          we,
  input  logic [RW-1:0] wrow,
  input  logic [CW-1:0] wcol,
  input  code_t         wdata,
  input  logic          row_we,
  input  logic [RW-1:0] row_addr,
  input  code_t         row_data [M],
  input  logic [RW-1:0] rrow,
  input  logic [CW-1:0] rcol,
  output code_t         rdata
);

  code_t mem [N][M];

  always_ff @(posedge clk) begin
    if (we) mem[wrow][wcol] <= wdata;
    if (row_we)
      for (int j = 0; j < M; j++) mem[row_addr][j] <= row_data[j];
  end

  assign rdata = mem[rrow][rcol];

endmodule
