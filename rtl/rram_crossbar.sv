// rram_crossbar: BEHAVIOURAL MODEL of the N x M RRAM crossbar with one
// selector per cross-point (1S1R). It stands for an analog array and is not
// meant as synthesizable hardware.
//
// Cell (i, j) sits between word line i and bit line j and holds the
// brightness of pixel (i, j) as its conductance state x, modelled as a
// fixed-point level (4 integer bits, STATE_FRAC fraction bits). Pulses act
// on the rising clock edge according to op:
//   OP_PROG  word line at Vo, bit line grounded: the cell is set to the level
//            Vo / VSTEP (multi-level SET by the pulse amplitude).
//   OP_DIFF  word line at Vo, bit line at the neighbour's amplitude: the cell
//            accumulates f(d), d = (Vbl - Vwl) / VSTEP rounded to a level
//            difference, f the nonlinear flux of ad_pkg (grows for small d,
//            falls for large d, so edges are preserved); the state saturates
//            at 0 and 15 levels. A brighter neighbour raises the state.
//   OP_READ  non-destructive read: sense[j] gives the level of the cell that
//            is selected on bit line j. Combinational while op is OP_READ.
//   OP_NONE  nothing.
// Selection: with diag_mode high the selectors of the cells (i, i XOR diag)
// are on (one per row and column, the pseudo-parallel pattern); a cell is
// pulsed only if its word line and its bit line are both driven. With
// diag_mode low, reads use the lowest driven word line and all bit lines
// (row read). Cells have no reset: a cell is programmed before it is read.
//
// The device law is this design's choice: the architecture only gives its shape
// (the conductance moves with the sign of the voltage difference, stays put
// for equal neighbours, and changes nonlinearly), not numbers.
module rram_crossbar
  import ad_pkg::*;
#(
  parameter int unsigned N           = 256,
  parameter int unsigned M           = 256,
  parameter int unsigned VSTEP_MV    = 150,
  parameter int unsigned KAPPA       = 4,
  parameter int unsigned SIGMA_SHIFT = 3,
  parameter int unsigned RW          = $clog2(N)
) (
  input  logic          clk,
  input  pulse_op_e     op,
  input  logic          diag_mode,
  input  logic [RW-1:0] diag,
  input  logic [N-1:0]  wl_on,
  input  volt_t         wl_v  [N],
  input  logic [M-1:0]  bl_on,
  input  volt_t         bl_v  [M],
  output code_t         sense [M]
);

  localparam flux_tab_t FLUX = flux_table(int'(KAPPA), int'(SIGMA_SHIFT));

  state_t x [N][M];

  function automatic code_t volt_level(volt_t v);
    int unsigned l;
    l = (int'(v) + VSTEP_MV / 2) / VSTEP_MV;
    return (l > LEVELS - 1) ? code_t'(LEVELS - 1) : code_t'(l);
  endfunction

  function automatic int level_diff(volt_t vbl, volt_t vwl);
    int dv;
    int d;
    dv = int'(vbl) - int'(vwl);
    d  = (dv >= 0) ? (dv + int'(VSTEP_MV) / 2) / int'(VSTEP_MV)
                   : -((-dv + int'(VSTEP_MV) / 2) / int'(VSTEP_MV));
    if (d >  int'(LEVELS) - 1) d =  int'(LEVELS) - 1;
    if (d < -int'(LEVELS) + 1) d = -int'(LEVELS) + 1;
    return d;
  endfunction

  always_ff @(posedge clk) begin
    for (int i = 0; i < N; i++) begin
      int j;
      int nx;
      j = i ^ int'(diag);
      if (diag_mode && wl_on[i] && j < int'(M) && bl_on[j]) begin
        if (op == OP_PROG) begin
          x[i][j] <= state_t'({volt_level(wl_v[i]), STATE_FRAC'(0)});
        end else if (op == OP_DIFF) begin
          nx = int'(x[i][j]) + FLUX[level_diff(bl_v[j], wl_v[i]) + int'(LEVELS) - 1];
          if (nx < 0) nx = 0;
          if (nx > int'(STATE_MAX)) nx = int'(STATE_MAX);
          x[i][j] <= state_t'(nx);
        end
      end
    end
  end

  always_comb begin
    int row;
    row = 0;
    for (int i = N - 1; i >= 0; i--)
      if (wl_on[i]) row = i;
    for (int j = 0; j < M; j++) begin
      sense[j] = '0;
      if (op == OP_READ && bl_on[j]) begin
        if (diag_mode) begin
          if (wl_on[j ^ int'(diag)]) sense[j] = state_level(x[j ^ int'(diag)][j]);
        end else if (wl_on != '0) begin
          sense[j] = state_level(x[row][j]);
        end
      end
    end
  end

endmodule
