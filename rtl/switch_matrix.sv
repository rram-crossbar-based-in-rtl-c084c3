// switch_matrix: a row of line switches (the WL or the BL switch matrix).
//
// Each of the L lines has a transmission gate controlled by one bit,
// W_1..W_N for word lines or B_1..B_M for bit lines. A closed gate passes the
// pulse amplitude prepared for that line; an open gate leaves the line tied to
// ground (0 V). line_on reports which lines are driven, which the crossbar
// model needs to tell a driven 0 V line from a grounded one. Amplitudes are
// unsigned millivolt numbers. Combinational.
module switch_matrix
  import ad_pkg::*;
#(
  parameter int unsigned L = 256
) (
  input  volt_t          v_in    [L],
  input  logic [L-1:0]   ctrl,
  output volt_t          v_out   [L],
  output logic [L-1:0]   line_on
);

  always_comb begin
    for (int k = 0; k < L; k++)
      v_out[k] = ctrl[k] ? v_in[k] : '0;
  end

  assign line_on = ctrl;

endmodule
