// ad_controller: sequencer of the RRAM anisotropic-diffusion engine.
//
// One operation: LOAD the quantized image into memory bank 0, then per
// iteration
//   WSTART/WIN  start the window generator and wait until it has filled the
//               window stores from the current bank ((N+1)(M+1)+1 clocks);
//   COMP        N pseudo-parallel crossbar cycles of 10 pulse slots each
//               (slot 0 origin write, slots 2/4/6/8 the N/S/W/E neighbour
//               pulses, odd slots reads); all word lines are active and the
//               cycle number is the selected diagonal. The origin is written
//               to the cells only in the first iteration; later iterations
//               leave slot 0 empty so the cells keep their accumulated state;
//   RECON       read the crossbar row by row (one word line per clock) and
//               write each row into the other bank (N clocks);
// then the banks swap. After n_iter iterations (0 counts as 1) it enters
// DONE, where the enhanced image can be read from the current bank, and a
// new start is accepted.
//
// The 10-slot, 100 ns cycle and the "write origin once, then iterate" rule
// follow the published architecture; the state sequence, ping-pong banks and row-by-row
// read-back are this design's choices. MOD counters drive the pixel address,
// the slot and the cycle/row number. Interface: start is a one-clock pulse
// in IDLE or DONE; pixels are accepted while pix_ready and pix_valid are
// high; q_valid marks a quantized pixel arriving one clock later.
module ad_controller
  import ad_pkg::*;
#(
  parameter int unsigned N      = 256,
  parameter int unsigned M      = 256,
  parameter int unsigned ITER_W = 8,
  parameter int unsigned RW     = $clog2(N),
  parameter int unsigned CW     = $clog2(M)
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              start,
  input  logic [ITER_W-1:0] n_iter,
  input  logic              pix_valid,
  output logic              pix_ready,
  input  logic              q_valid,
  output logic              load_we,
  output logic [RW-1:0]     load_row,
  output logic [CW-1:0]     load_col,
  output logic              win_start,
  input  logic              win_done,
  output logic              comp_active,
  output logic [RW-1:0]     diag,
  output slot_t             slot,
  output pulse_op_e         xb_op,
  output logic              xb_diag_mode,
  output logic              wl_en,
  output logic              wl_all,
  output logic [RW-1:0]     wl_addr,
  output logic              recon_we,
  output logic [RW-1:0]     recon_row,
  output logic              bank,
  output logic              busy,
  output logic              done,
  output logic [ITER_W-1:0] iter_count
);

  typedef enum logic [2:0] {
    S_IDLE, S_LOAD, S_WSTART, S_WIN, S_COMP, S_RECON, S_DONE
  } state_e;

  state_e state;
  logic [ITER_W-1:0] n_iter_q;
  logic acc_full;

  logic [RW+CW-1:0] acc_cnt, pix_cnt;
  logic acc_wrap, pix_wrap, slot_wrap, cyc_wrap;
  logic [3:0] slot_cnt;
  logic [RW-1:0] cyc_cnt;
  logic go;

  assign go = start && (state == S_IDLE || state == S_DONE);

  mod_counter #(.MOD(N * M), .W(RW + CW)) u_acc_cnt (
    .clk, .rst_n, .clr(go), .en(pix_valid && pix_ready), .count(acc_cnt), .wrap(acc_wrap));
  mod_counter #(.MOD(N * M), .W(RW + CW)) u_pix_cnt (
    .clk, .rst_n, .clr(go), .en(state == S_LOAD && q_valid), .count(pix_cnt), .wrap(pix_wrap));
  mod_counter #(.MOD(SLOTS), .W(4)) u_slot_cnt (
    .clk, .rst_n, .clr(state != S_COMP), .en(state == S_COMP), .count(slot_cnt), .wrap(slot_wrap));
  mod_counter #(.MOD(N), .W(RW)) u_cyc_cnt (
    .clk, .rst_n, .clr(state != S_COMP && state != S_RECON),
    .en((state == S_COMP && slot_wrap) || state == S_RECON), .count(cyc_cnt), .wrap(cyc_wrap));

  assign pix_ready   = (state == S_LOAD) && !acc_full;
  assign load_we     = (state == S_LOAD) && q_valid;
  assign load_row    = pix_cnt[CW +: RW];
  assign load_col    = pix_cnt[CW-1:0];
  assign win_start   = (state == S_WSTART);
  assign comp_active = (state == S_COMP);
  assign diag        = cyc_cnt;
  assign slot        = slot_t'(slot_cnt);
  assign xb_diag_mode= (state == S_COMP);
  assign wl_en       = (state == S_COMP) || (state == S_RECON);
  assign wl_all      = (state == S_COMP);
  assign wl_addr     = cyc_cnt;
  assign recon_we    = (state == S_RECON);
  assign recon_row   = cyc_cnt;
  assign busy        = (state != S_IDLE) && (state != S_DONE);
  assign done        = (state == S_DONE);

  always_comb begin
    xb_op = OP_NONE;
    if (state == S_COMP) begin
      if (slot_is_read(slot))  xb_op = OP_READ;
      else if (slot == '0)     xb_op = (iter_count == '0) ? OP_PROG : OP_NONE;
      else                     xb_op = OP_DIFF;
    end else if (state == S_RECON) begin
      xb_op = OP_READ;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state      <= S_IDLE;
      n_iter_q   <= '0;
      iter_count <= '0;
      bank       <= 1'b0;
      acc_full   <= 1'b0;
    end else begin
      if (acc_wrap) acc_full <= 1'b1;
      case (state)
        S_IDLE, S_DONE: if (go) begin
          state      <= S_LOAD;
          n_iter_q   <= (n_iter == '0) ? ITER_W'(1) : n_iter;
          iter_count <= '0;
          bank       <= 1'b0;
          acc_full   <= 1'b0;
        end
        S_LOAD:   if (pix_wrap) state <= S_WSTART;
        S_WSTART: state <= S_WIN;
        S_WIN:    if (win_done) state <= S_COMP;
        S_COMP:   if (slot_wrap && cyc_wrap) state <= S_RECON;
        S_RECON:  if (cyc_wrap) begin
          bank       <= ~bank;
          iter_count <= iter_count + 1'b1;
          state      <= (iter_count + 1'b1 == n_iter_q) ? S_DONE : S_WSTART;
        end
        default:  state <= S_IDLE;
      endcase
    end
  end

endmodule
