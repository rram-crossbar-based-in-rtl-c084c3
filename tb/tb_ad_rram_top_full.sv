// tb_ad_rram_top_full: one complete operation of the engine at its default
// size (256 x 256 pixels): a smooth gradient image with added noise and a
// bright square is loaded, one diffusion iteration is run, and all 65,536
// output levels are compared with ad_ref_pkg. Also checks the crossbar time,
// 10 * 256 clocks, and that origin writes, raising and lowering neighbour
// pulses and border windows all occurred.
module tb_ad_rram_top_full;
  import ad_pkg::*;
  import ad_ref_pkg::*;
  localparam int N = 256, M = 256;
  logic clk = 0, rst_n = 0, start = 0, pix_valid = 0, pix_ready, busy, done;
  logic [7:0] n_iter = 8'd1, pix_data = 0, iter_count;
  logic [15:0] out_addr = 0;
  code_t out_level;
  int checks = 0, failures = 0, comp_clk = 0, n_prog = 0;

  ad_rram_top dut (.*);
  always #5 clk = ~clk;

  always @(posedge clk) begin
    if (dut.u_ctrl.comp_active) comp_clk++;
    if (dut.u_ctrl.xb_op == OP_PROG) n_prog++;
  end

  initial begin
    int img[];
    int k, bad;
    ad_ref r;
    img = new[N * M];
    for (int i = 0; i < N; i++) for (int j = 0; j < M; j++) begin
      automatic int v = (i + j) / 2 + int'($urandom % 31) - 15;
      if (i >= 96 && i < 160 && j >= 96 && j < 160) v = 230 + int'($urandom % 21) - 10;
      img[i * M + j] = v < 0 ? 0 : v > 255 ? 255 : v;
    end
    r = new(N, M);
    r.run(img, 1);
    repeat (3) @(negedge clk); rst_n = 1;
    @(negedge clk); start = 1;
    @(negedge clk); start = 0;
    k = 0;
    pix_valid = 1;
    while (k < N * M) begin
      pix_data = 8'(img[k]);
      @(posedge clk);
      if (pix_ready) k++;
      @(negedge clk);
    end
    pix_valid = 0;
    while (!done) @(negedge clk);
    bad = 0;
    for (int a = 0; a < N * M; a++) begin
      out_addr = 16'(a); #1; checks++;
      if (int'(out_level) != r.q[a]) begin
        failures++;
        if (bad++ < 10) $display("FAIL pixel (%0d,%0d) got %0d exp %0d", a / M, a % M, out_level, r.q[a]);
      end
    end
    checks += 5;
    if (comp_clk != 10 * N) begin failures++; $display("FAIL compute clocks %0d", comp_clk); end
    if (n_prog != N) begin failures++; $display("FAIL origin pulses %0d", n_prog); end
    if (r.n_pos == 0 || r.n_neg == 0 || r.n_border == 0) begin failures++; $display("FAIL mechanism missing"); end
    if (iter_count != 8'd1) failures++;
    if (busy) failures++;
    $display("updates: raise=%0d lower=%0d equal=%0d border=%0d", r.n_pos, r.n_neg, r.n_zero, r.n_border);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (400000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
