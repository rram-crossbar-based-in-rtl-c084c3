// ad_rram_top: RRAM-crossbar engine for Perona-Malik anisotropic diffusion.
//
// An 8-bit grey image of N x M pixels is streamed in raster order, quantized
// to 16 levels and stored in memory bank 0. Each iteration then
//   1. scans the current bank through the line-buffer window generator and
//      stores every pixel's origin/N/S/W/E window in the window store of its
//      row (one store per word line);
//   2. runs N pseudo-parallel crossbar cycles: in cycle c the cell
//      (i, i XOR c) of every row i is pulsed, word line i with the origin
//      amplitude and its bit line, in turn, with ground (origin write, first
//      iteration only) and the N, S, W, E neighbour amplitudes. Each cell
//      accumulates a nonlinear function of the neighbour-origin difference,
//      so the crossbar both computes and stores the diffusion update;
//   3. reads the crossbar back row by row into the other bank.
// After n_iter iterations done rises and out_addr = {row, col} reads the
// enhanced 4-bit level of each pixel.
//
// Interface: start (one clock, when idle or done), n_iter, pix_valid /
// pix_ready / pix_data (8-bit pixels, raster order), busy, done, iter_count,
// out_addr -> out_level (asynchronous read, valid while done).
// Timing per iteration at clock 100 MHz: (N+1)(M+1)+2 clocks of window
// generation, 10*N clocks (N cycles of 100 ns) of crossbar pulses and N
// clocks of read-back; loading takes N*M+1 clocks.
// The crossbar is a behavioural model of an analog array; the rest is
// synthesizable. N must equal M and be a power of two (diagonal schedule).
module ad_rram_top
  import ad_pkg::*;
#(
  parameter int unsigned N           = 256,
  parameter int unsigned M           = 256,
  parameter int unsigned VSTEP_MV    = 150,
  parameter int unsigned KAPPA       = 4,
  parameter int unsigned SIGMA_SHIFT = 3,
  parameter int unsigned ITER_W      = 8,
  parameter int unsigned RW          = $clog2(N),
  parameter int unsigned CW          = $clog2(M)
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              start,
  input  logic [ITER_W-1:0] n_iter,
  input  logic              pix_valid,
  output logic              pix_ready,
  input  logic [7:0]        pix_data,
  output logic              busy,
  output logic              done,
  output logic [ITER_W-1:0] iter_count,
  input  logic [RW+CW-1:0]  out_addr,
  output code_t             out_level
);

  // programming amplitudes of the 16 levels: k * VSTEP_MV
  volt_t rails [LEVELS];
  always_comb
    for (int k = 0; k < LEVELS; k++) rails[k] = volt_t'(k * VSTEP_MV);

  // ---------------- quantizer and controller ----------------
  logic  q_valid;
  code_t q_code;

  pixel_quantizer u_quant (
    .clk, .rst_n, .in_valid(pix_valid && pix_ready), .in_pix(pix_data),
    .out_valid(q_valid), .out_code(q_code));

  logic              load_we, win_start, win_done, comp_active, xb_diag_mode;
  logic              wl_en, wl_all, recon_we, bank;
  logic [RW-1:0]     load_row, diag, wl_addr, recon_row;
  logic [CW-1:0]     load_col;
  slot_t             slot;
  pulse_op_e         xb_op;

  ad_controller #(.N(N), .M(M), .ITER_W(ITER_W)) u_ctrl (
    .clk, .rst_n, .start, .n_iter, .pix_valid, .pix_ready, .q_valid,
    .load_we, .load_row, .load_col, .win_start, .win_done, .comp_active,
    .diag, .slot, .xb_op, .xb_diag_mode, .wl_en, .wl_all, .wl_addr,
    .recon_we, .recon_row, .bank, .busy, .done, .iter_count);

  // ---------------- two image memories (ping-pong) ----------------
  logic [RW-1:0] rd_row, wg_row;
  logic [CW-1:0] rd_col, wg_col;
  code_t         rdata0, rdata1, rd_pix;
  code_t         sense [M];

  assign rd_row = done ? out_addr[CW +: RW]  : wg_row;
  assign rd_col = done ? out_addr[CW-1:0]    : wg_col;

  image_memory #(.N(N), .M(M)) u_mem0 (
    .clk, .we(load_we), .wrow(load_row), .wcol(load_col), .wdata(q_code),
    .row_we(recon_we && bank), .row_addr(recon_row), .row_data(sense),
    .rrow(rd_row), .rcol(rd_col), .rdata(rdata0));

  image_memory #(.N(N), .M(M)) u_mem1 (
    .clk, .we(1'b0), .wrow('0), .wcol('0), .wdata('0),
    .row_we(recon_we && !bank), .row_addr(recon_row), .row_data(sense),
    .rrow(rd_row), .rcol(rd_col), .rdata(rdata1));

  assign rd_pix    = bank ? rdata1 : rdata0;
  assign out_level = rd_pix;

  // ---------------- pixel window generation ----------------
  logic          win_valid;
  logic [RW-1:0] win_row;
  logic [CW-1:0] win_col;
  window_t       win;
  logic          wg_busy;

  window_gen #(.N(N), .M(M)) u_wgen (
    .clk, .rst_n, .start(win_start), .busy(wg_busy), .done(win_done),
    .rd_row(wg_row), .rd_col(wg_col), .rd_pix,
    .win_valid, .win_row, .win_col, .win);

  window_t       lane_win   [N];
  logic [CW-1:0] lane_raddr [N];

  for (genvar i = 0; i < N; i++) begin : g_lb
    lb_fifo #(.M(M)) u_lb (
      .clk, .we(win_valid && win_row == RW'(i)), .waddr(win_col), .wdata(win),
      .raddr(lane_raddr[i]), .rdata(lane_win[i]));
  end

  // ---------------- memory controller, switches, decoder ----------------
  volt_t        wl_v [N], bl_v [M], wl_drv [N], bl_drv [M];
  logic [N-1:0] wl_sel, wl_on;
  logic [M-1:0] bl_ctrl, bl_on;

  mem_ctrl_align #(.N(N), .M(M)) u_mca (
    .active(comp_active), .diag, .slot, .lane_win, .rails,
    .lane_raddr, .wl_v, .bl_v);

  wl_decoder #(.N(N)) u_wldec (.en(wl_en), .all(wl_all), .addr(wl_addr), .wl_sel);

  assign bl_ctrl = {M{wl_en}};

  switch_matrix #(.L(N)) u_wl_sw (.v_in(wl_v), .ctrl(wl_sel),  .v_out(wl_drv), .line_on(wl_on));
  switch_matrix #(.L(M)) u_bl_sw (.v_in(bl_v), .ctrl(bl_ctrl), .v_out(bl_drv), .line_on(bl_on));

  // the window stores must not change while the crossbar reads them
  assert property (@(posedge clk) disable iff (!rst_n) wg_busy |-> !comp_active)
    else $error("window generator running during the crossbar phase");

  // ---------------- crossbar ----------------
  rram_crossbar #(.N(N), .M(M), .VSTEP_MV(VSTEP_MV), .KAPPA(KAPPA),
                  .SIGMA_SHIFT(SIGMA_SHIFT)) u_xbar (
    .clk, .op(xb_op), .diag_mode(xb_diag_mode), .diag,
    .wl_on, .wl_v(wl_drv), .bl_on, .bl_v(bl_drv), .sense);

endmodule
