// level_mux: the "MUX (16:1)" that puts one pulse amplitude on a line.
//
// Sixteen rails carry the programming amplitudes, in millivolts, of the
// sixteen pixel levels (0 V to 2.25 V in 0.15 V steps with the default
// linear scheme; a nonlinear amplitude scheme is set by loading other rail
// values). The one-hot select from level_decoder connects one rail to the
// output, like a bank of transmission gates: the output is the OR of the
// selected rails, and 0 V (ground) when none is selected. Combinational.
module level_mux
  import ad_pkg::*;
(
  input  logic [LEVELS-1:0] sel,
  input  volt_t             rails [LEVELS],
  output volt_t             v_out
);

  always_comb begin
    v_out = '0;
    for (int k = 0; k < LEVELS; k++)
      if (sel[k]) v_out = v_out | rails[k];
  end

endmodule
