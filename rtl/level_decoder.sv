// level_decoder: the "Dec (4:16)" of the memory controller.
//
// Turns a 4-bit pixel level code into a one-hot word of 16 bits, bit k set
// for code k. Each one-hot bit closes the switch of one pulse-amplitude rail
// in the level_mux that follows it. When en is low all outputs are low and
// the line is left on no rail. Purely combinational.
module level_decoder
  import ad_pkg::*;
(
  input  logic              en,
  input  code_t             code,
  output logic [LEVELS-1:0] onehot
);

  always_comb begin
    onehot = '0;
    for (int k = 0; k < LEVELS; k++)
      if (en && code == CODE_W'(k)) onehot[k] = 1'b1;
  end

endmodule
