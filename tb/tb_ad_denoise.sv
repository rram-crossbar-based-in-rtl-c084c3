// tb_ad_denoise: image-enhancement workload on a 64 x 64 engine.
//
// A clean test image of flat regions (a dark background, a bright square and
// a mid-grey bar, with edges of 6 to 12 levels) is corrupted by additive
// noise of standard deviation about 30 grey levels (sum of uniform samples),
// then filtered for 12 iterations. Checks: every output pixel equals the
// reference model; the mean squared error to the clean quantized image falls
// below 0.6 times that of the noisy input; the square's 12-level edge keeps
// at least 60 % of its contrast (mean level just inside minus just outside).
// Perona-Malik diffusion slows, but does not stop, flux across an edge, so
// some contrast is lost over the iterations.
module tb_ad_denoise;
  import ad_pkg::*;
  import ad_ref_pkg::*;
  localparam int N = 64, M = 64, IT = 12;
  logic clk = 0, rst_n = 0, start = 0, pix_valid = 0, pix_ready, busy, done;
  logic [7:0] n_iter = 8'(IT), pix_data = 0, iter_count;
  logic [11:0] out_addr = 0;
  code_t out_level;
  int checks = 0, failures = 0;

  ad_rram_top #(.N(N), .M(M)) dut (.*);
  always #5 clk = ~clk;

  function automatic int clean_px(int i, int j);
    if (i >= 16 && i < 48 && j >= 16 && j < 48) return 216;  // level 13
    if (i >= 52 && i < 60) return 120;                        // level 7
    return 24;                                                // level 1
  endfunction

  initial begin
    int img[], cln[];
    int k, bad;
    real mse_in, mse_out, in_side, out_side;
    ad_ref r;
    img = new[N * M];
    cln = new[N * M];
    for (int i = 0; i < N; i++) for (int j = 0; j < M; j++) begin
      automatic int nz = 0;
      automatic int v;
      for (int u = 0; u < 12; u++) nz += int'($urandom % 31) - 15;   // sd ~ 31
      cln[i * M + j] = clean_px(i, j) >> 4;
      v = clean_px(i, j) + nz;
      img[i * M + j] = v < 0 ? 0 : v > 255 ? 255 : v;
    end
    r = new(N, M);
    r.run(img, IT);
    repeat (3) @(negedge clk); rst_n = 1;
    @(negedge clk); start = 1;
    @(negedge clk); start = 0;
    k = 0; pix_valid = 1;
    while (k < N * M) begin
      pix_data = 8'(img[k]);
      @(posedge clk);
      if (pix_ready) k++;
      @(negedge clk);
    end
    pix_valid = 0;
    while (!done) @(negedge clk);
    bad = 0; mse_in = 0; mse_out = 0; in_side = 0; out_side = 0;
    for (int a = 0; a < N * M; a++) begin
      out_addr = 12'(a); #1; checks++;
      if (int'(out_level) != r.q[a]) begin
        failures++;
        if (bad++ < 10) $display("FAIL pixel (%0d,%0d) got %0d exp %0d", a / M, a % M, out_level, r.q[a]);
      end
      mse_in  += real'(((img[a] >> 4) - cln[a]) ** 2);
      mse_out += real'((int'(out_level) - cln[a]) ** 2);
      // one pixel inside and one outside the square's left border
      if (a % M == 16 && a / M >= 20 && a / M < 44) in_side  += real'(out_level);
      if (a % M == 15 && a / M >= 20 && a / M < 44) out_side += real'(out_level);
    end
    mse_in /= N * M; mse_out /= N * M; in_side /= 24; out_side /= 24;
    $display("MSE in levels^2: noisy %0.3f, filtered %0.3f; border means inside %0.2f outside %0.2f",
             mse_in, mse_out, in_side, out_side);
    checks += 3;
    if (!(mse_out < 0.6 * mse_in)) begin failures++; $display("FAIL noise not reduced"); end
    if (in_side - out_side < 0.6 * 12.0) begin failures++; $display("FAIL edge contrast lost"); end
    if (in_side < out_side) begin failures++; $display("FAIL edge inverted"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (200000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
