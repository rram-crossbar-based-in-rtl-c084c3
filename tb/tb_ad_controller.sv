// tb_ad_controller: 4 x 4 image, 3 iterations. Feeds 16 pixels (with the
// quantizer's one-clock delay modelled), answers the window generator start
// after a fixed delay, and checks: load addresses in raster order; pix_ready
// dropping after 16 pixels; 10*N compute clocks per iteration with slots
// 0..9 and diagonals 0..N-1 in order; origin-write pulses only in the first
// iteration (N of them); N read-back clocks per iteration, one row each;
// the bank toggling after each iteration; done after n_iter iterations.
module tb_ad_controller;
  import ad_pkg::*;
  localparam int N = 4, M = 4, IT = 3;
  logic clk = 0, rst_n = 0, start = 0, pix_valid = 0, pix_ready, q_valid = 0;
  logic [7:0] n_iter = 8'(IT);
  logic load_we, win_start, win_done = 0, comp_active, xb_diag_mode, wl_en, wl_all, recon_we, bank, busy, done;
  logic [1:0] load_row, diag, wl_addr, recon_row; logic [1:0] load_col;
  slot_t slot; pulse_op_e xb_op; logic [7:0] iter_count;
  int checks = 0, failures = 0;
  int n_load = 0, n_prog = 0, n_diff = 0, n_read = 0, n_recon = 0, n_swaps = 0;
  int comp_clk = 0, exp_slot = 0, exp_diag = 0, exp_row = 0;
  logic bank_q = 0;

  ad_controller #(.N(N), .M(M)) dut (.*);
  always #5 clk = ~clk;

  always @(posedge clk) begin
    q_valid <= pix_valid && pix_ready;
    if (win_start) fork begin repeat (7) @(posedge clk); win_done <= 1; @(posedge clk); win_done <= 0; end join_none
  end

  always @(negedge clk) if (rst_n) begin
    if (load_we) begin
      checks++; if ({load_row, load_col} != 4'(n_load)) begin failures++; $display("FAIL load addr"); end
      n_load++;
    end
    if (comp_active) begin
      checks += 3;
      if (int'(slot) != exp_slot || int'(diag) != exp_diag) begin failures++; $display("FAIL slot %0d diag %0d exp %0d %0d", slot, diag, exp_slot, exp_diag); end
      if (!wl_en || !wl_all || !xb_diag_mode) failures++;
      if (slot % 2 == 1 && xb_op != OP_READ) failures++;
      if (xb_op == OP_PROG) begin n_prog++; checks++; if (iter_count != 0 || slot != 0) failures++; end
      if (xb_op == OP_DIFF) n_diff++;
      if (xb_op == OP_READ) n_read++;
      comp_clk++;
      exp_slot = (exp_slot + 1) % 10;
      if (exp_slot == 0) exp_diag = (exp_diag + 1) % N;
    end
    if (recon_we) begin
      checks += 2;
      if (int'(recon_row) != exp_row || wl_all || !wl_en || int'(wl_addr) != exp_row || xb_op != OP_READ) begin failures++; $display("FAIL recon row"); end
      if (xb_diag_mode) failures++;
      exp_row = (exp_row + 1) % N;
      n_recon++;
    end
    if (bank != bank_q) n_swaps++;
    bank_q = bank;
  end

  initial begin
    repeat (2) @(negedge clk); rst_n = 1;
    @(negedge clk); start = 1; @(negedge clk); start = 0;
    pix_valid = 1;
    while (n_load < N * M) @(negedge clk);
    checks++; if (pix_ready) begin failures++; $display("FAIL pix_ready after full image"); end
    pix_valid = 0;
    while (!done) @(negedge clk);
    @(negedge clk);
    checks += 7;
    if (comp_clk != IT * 10 * N) begin failures++; $display("FAIL compute clocks %0d", comp_clk); end
    if (n_prog != N) begin failures++; $display("FAIL prog %0d", n_prog); end
    if (n_diff != IT * 4 * N) begin failures++; $display("FAIL diff %0d", n_diff); end
    if (n_read != IT * 5 * N) begin failures++; $display("FAIL read %0d", n_read); end
    if (n_recon != IT * N) begin failures++; $display("FAIL recon %0d", n_recon); end
    if (n_swaps != IT) begin failures++; $display("FAIL swaps %0d", n_swaps); end
    if (iter_count != 8'(IT) || busy) begin failures++; $display("FAIL iter_count"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (2000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
