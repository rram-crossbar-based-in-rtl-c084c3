// lb_fifo: the window store of one word line ("LB FIFO").
//
// Holds the L = M pixel windows of one image row. The window generator writes
// the window of pixel (i, j) at address j; in each pseudo-parallel crossbar
// cycle the memory controller reads the entry of the cell that the cycle
// selects on this word line. The architecture describes it as one that "interprets the
// L 4-bit address and outputs the data contained at this address"; this
// design therefore builds it as a small addressed RAM with one synchronous
// write port and one asynchronous read port. No reset: each entry is written
// before it is read.
module lb_fifo
  import ad_pkg::*;
#(
  parameter int unsigned M  = 256,
  parameter int unsigned CW = $clog2(M)
) (
  input  logic          clk,
  input  logic          we,
  input  logic [CW-1:0] waddr,
  input  window_t       wdata,
  input  logic [CW-1:0] raddr,
  output window_t       rdata
);

  window_t mem [M];

  always_ff @(posedge clk)
    if (we) mem[waddr] <= wdata;

  assign rdata = mem[raddr];

endmodule
