// tb_ad_rram_top: end-to-end test of the engine at 8 x 8 pixels.
//
// Operation 1: a blocky test image (four flat regions with noise, so that
// both small gradients, which diffuse, and large ones, at the region edges,
// occur) is streamed in with random gaps and run for 5 iterations.
// Operation 2 restarts from DONE with a random image and 1 iteration. After
// each, every output pixel is compared with ad_ref_pkg. Timing checks: 10*N
// crossbar clocks per iteration (N cycles of 10 pulse slots) and an
// iteration period of (N+1)(M+1) + 2 + 11*N clocks. Each mechanism must have
// happened at least once: origin programming pulses, read slots between
// pulses, all-word-line pseudo-parallel mode, neighbour pulses raising and
// lowering a cell, border replication, row-by-row read-back, bank swap
// (6 iterations plus the return to bank 0 at the restart), input
// back-pressure and restart from DONE.
module tb_ad_rram_top;
  import ad_pkg::*;
  import ad_ref_pkg::*;
  localparam int N = 8, M = 8;
  logic clk = 0, rst_n = 0, start = 0, pix_valid = 0, pix_ready, busy, done;
  logic [7:0] n_iter = 0, pix_data = 0, iter_count;
  logic [5:0] out_addr = 0;
  code_t out_level;
  int checks = 0, failures = 0;
  int n_prog = 0, n_rdslot = 0, n_all = 0, n_recon = 0, n_swap = 0, n_bp = 0, n_restart = 0;
  int comp_clk = 0, ws_prev = -1, cyc = 0, n_period = 0;
  logic bank_q = 0;

  ad_rram_top #(.N(N), .M(M)) dut (.*);
  always #5 clk = ~clk;

  always @(posedge clk) begin
    cyc++;
    if (dut.u_ctrl.xb_op == OP_PROG) n_prog++;
    if (dut.u_ctrl.xb_op == OP_READ && dut.u_ctrl.xb_diag_mode) n_rdslot++;
    if (dut.u_ctrl.wl_all) n_all++;
    if (dut.u_ctrl.recon_we) n_recon++;
    if (dut.u_ctrl.comp_active) comp_clk++;
    if (pix_valid && !pix_ready && busy) n_bp++;
    if (dut.u_ctrl.bank != bank_q) n_swap++;
    bank_q <= dut.u_ctrl.bank;
    if (dut.u_ctrl.win_start) begin
      if (ws_prev >= 0) begin
        checks++; n_period++;
        if (cyc - ws_prev != (N + 1) * (M + 1) + 2 + 11 * N) begin
          failures++; $display("FAIL iteration period %0d", cyc - ws_prev);
        end
      end
      ws_prev = cyc;
    end
  end

  task automatic run_op(int img[], int iters, int gaps);
    ad_ref r;
    int k, c0;
    r = new(N, M);
    r.run(img, iters);
    @(negedge clk); n_iter = 8'(iters); start = 1;
    @(negedge clk); start = 0;
    k = 0; c0 = comp_clk; ws_prev = -1;
    while (k < N * M) begin
      pix_valid = gaps ? ($urandom % 3 != 0) : 1'b1;
      pix_data = 8'(img[k]);
      @(posedge clk);
      if (pix_valid && pix_ready) k++;
      @(negedge clk);
    end
    pix_valid = 1;   // keep offering: must be held off
    repeat (3) @(negedge clk);
    pix_valid = 0;
    while (!done) @(negedge clk);
    checks++;
    if (comp_clk - c0 != iters * 10 * N) begin failures++; $display("FAIL compute clocks %0d", comp_clk - c0); end
    checks++;
    if (int'(iter_count) != iters) begin failures++; $display("FAIL iter_count %0d", iter_count); end
    for (int a = 0; a < N * M; a++) begin
      out_addr = 6'(a); #1; checks++;
      if (int'(out_level) != r.q[a]) begin
        failures++; $display("FAIL pixel (%0d,%0d) got %0d exp %0d", a / M, a % M, out_level, r.q[a]);
      end
    end
    checks += 3;
    if (r.n_pos == 0) begin failures++; $display("FAIL no raising pulse"); end
    if (r.n_neg == 0) begin failures++; $display("FAIL no lowering pulse"); end
    if (r.n_border == 0) begin failures++; $display("FAIL no border window"); end
    $display("op: iters=%0d pos=%0d neg=%0d zero=%0d border=%0d", iters, r.n_pos, r.n_neg, r.n_zero, r.n_border);
  endtask

  initial begin
    int img[];
    repeat (3) @(negedge clk); rst_n = 1;
    img = new[N * M];
    for (int i = 0; i < N; i++) for (int j = 0; j < M; j++) begin
      automatic int base = (i < N / 2) ? ((j < M / 2) ? 40 : 200) : ((j < M / 2) ? 120 : 250);
      automatic int v = base + int'($urandom % 41) - 20;
      img[i * M + j] = v < 0 ? 0 : v > 255 ? 255 : v;
    end
    run_op(img, 5, 1);
    for (int k = 0; k < N * M; k++) img[k] = int'($urandom % 256);
    n_restart++;
    run_op(img, 1, 0);
    checks += 9;
    if (n_rdslot != 6 * 5 * N) begin failures++; $display("FAIL read slots %0d", n_rdslot); end
    if (n_prog != 2 * N)  begin failures++; $display("FAIL origin pulses %0d", n_prog); end
    if (n_all == 0)       begin failures++; $display("FAIL all-WL mode never used"); end
    if (n_recon != 6 * N) begin failures++; $display("FAIL read-back rows %0d", n_recon); end
    if (n_swap != 7)      begin failures++; $display("FAIL bank swaps %0d", n_swap); end
    if (n_bp == 0)        begin failures++; $display("FAIL no back-pressure"); end
    if (n_restart == 0)   failures++;
    if (n_period == 0)    begin failures++; $display("FAIL no iteration period measured"); end
    if (busy)             failures++;
    $display("mechanisms: prog=%0d readslots=%0d allwl=%0d recon=%0d swaps=%0d backpressure=%0d restart=%0d periods=%0d",
             n_prog, n_rdslot, n_all, n_recon, n_swap, n_bp, n_restart, n_period);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (20000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
