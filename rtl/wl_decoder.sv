// wl_decoder: word-line decoder with an "activate all" mode.
//
// With en high and all low, the word line at addr is selected (one-hot), as
// in a row-by-row read of the crossbar. With en and all high, every word line
// is selected whatever the address: this is the mode the power switches
// (SC) attached to each decoder output provide, and it lets one pulse cycle
// program one cell on every row at once along the selected diagonal. With en
// low no word line is selected. Combinational.
module wl_decoder #(
  parameter int unsigned N  = 256,
  parameter int unsigned RW = $clog2(N)
) (
  input  logic          en,
  input  logic          all,
  input  logic [RW-1:0] addr,
  output logic [N-1:0]  wl_sel
);

  always_comb begin
    wl_sel = '0;
    if (en) begin
      if (all) wl_sel = '1;
      else     wl_sel[addr] = 1'b1;
    end
  end

endmodule
