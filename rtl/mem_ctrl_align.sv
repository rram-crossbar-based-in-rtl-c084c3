// mem_ctrl_align: memory controller and alignment between the window stores
// and the crossbar lines.
//
// In crossbar cycle `diag` the cell selected on word line i is the one on bit
// line j = i XOR diag. Over the N cycles of an iteration every cell is
// selected exactly once, and within one cycle every row and every column
// holds exactly one selected cell, so all N cells can be pulsed together
// without two of them sharing a line. (The XOR pattern is the colour pattern
// of the published 4 x 4 example; it needs N = M, a power of two.)
//
// For each lane (word line) i this block
//   * addresses lane i's window store at column i XOR diag (lane_raddr),
//   * picks the origin code for the word line and, by pulse slot, the code
//     for the bit line: ground in the origin slot, then N, S, W, E,
//   * converts each code to an amplitude with a Dec(4:16) + MUX(16:1) pair,
//   * routes lane i's bit-line amplitude to bit line i XOR diag (alignment).
// In read slots, or when active is low, all lines carry 0 V. Combinational:
// the amplitudes are valid in the same clock as diag and slot.
module mem_ctrl_align
  import ad_pkg::*;
#(
  parameter int unsigned N  = 256,
  parameter int unsigned M  = 256,
  parameter int unsigned RW = $clog2(N),
  parameter int unsigned CW = $clog2(M)
) (
  input  logic          active,
  input  logic [RW-1:0] diag,
  input  slot_t         slot,
  input  window_t       lane_win   [N],
  input  volt_t         rails      [LEVELS],
  output logic [CW-1:0] lane_raddr [N],
  output volt_t         wl_v       [N],
  output volt_t         bl_v       [M]
);

  volt_t lane_bl_v [N];
  logic  wr_slot;
  dir_e  dir;

  assign wr_slot = active && !slot_is_read(slot);
  assign dir     = slot_dir(slot);

  for (genvar i = 0; i < N; i++) begin : g_lane
    code_t             wl_code, bl_code;
    logic              bl_en;
    logic [LEVELS-1:0] wl_oh, bl_oh;

    assign lane_raddr[i] = CW'(i) ^ CW'(diag);

    always_comb begin
      wl_code = lane_win[i].o;
      bl_en   = wr_slot;
      case (dir)
        DIR_N:   bl_code = lane_win[i].n;
        DIR_S:   bl_code = lane_win[i].s;
        DIR_W:   bl_code = lane_win[i].w;
        DIR_E:   bl_code = lane_win[i].e;
        default: begin bl_code = '0; bl_en = 1'b0; end
      endcase
    end

    level_decoder u_wl_dec (.en(wr_slot), .code(wl_code), .onehot(wl_oh));
    level_mux     u_wl_mux (.sel(wl_oh), .rails(rails), .v_out(wl_v[i]));
    level_decoder u_bl_dec (.en(bl_en),   .code(bl_code), .onehot(bl_oh));
    level_mux     u_bl_mux (.sel(bl_oh), .rails(rails), .v_out(lane_bl_v[i]));
  end

  // alignment: bit line j carries the neighbour amplitude of lane j XOR diag
  always_comb begin
    for (int j = 0; j < M; j++)
      bl_v[j] = lane_bl_v[RW'(j) ^ diag];
  end

  initial begin
    assert (N == M && (N & (N - 1)) == 0)
      else $error("mem_ctrl_align: the diagonal schedule needs N == M, a power of two");
  end

endmodule
