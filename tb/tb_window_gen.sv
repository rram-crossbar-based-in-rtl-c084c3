// tb_window_gen: a 6 x 8 image held in a testbench array is scanned twice
// (a second frame with new contents checks that stale line-buffer data never
// leaks). Every emitted window is compared with the origin and its four
// neighbours computed directly, border neighbours replaced by the origin;
// each pixel must be emitted exactly once, and the scan must take
// (N+1)(M+1) clocks.
module tb_window_gen;
  import ad_pkg::*;
  localparam int N = 6, M = 8;
  logic clk = 0, rst_n = 0, start = 0, busy, done, win_valid;
  logic [2:0] rd_row, win_row;
  logic [2:0] rd_col, win_col;
  code_t rd_pix;
  window_t win;
  code_t img [N][M];
  int seen [N][M];
  int checks = 0, failures = 0, border = 0;

  window_gen #(.N(N), .M(M)) dut (.*);
  always #5 clk = ~clk;
  assign rd_pix = img[rd_row][rd_col];

  function automatic code_t px(int i, int j, int oi, int oj);
    if (i < 0 || i >= N || j < 0 || j >= M) return img[oi][oj];
    return img[i][j];
  endfunction

  always @(posedge clk) if (rst_n && win_valid) begin
    int i, j; window_t exp;
    i = int'(win_row); j = int'(win_col);
    exp.o = img[i][j];
    exp.n = px(i - 1, j, i, j); exp.s = px(i + 1, j, i, j);
    exp.w = px(i, j - 1, i, j); exp.e = px(i, j + 1, i, j);
    if (i == 0 || j == 0 || i == N - 1 || j == M - 1) border++;
    checks++;
    if (win != exp) begin failures++; $display("FAIL (%0d,%0d) %h exp %h", i, j, win, exp); end
    seen[i][j]++;
  end

  initial begin
    int t0, t1;
    repeat (2) @(negedge clk); rst_n = 1;
    for (int frame = 0; frame < 2; frame++) begin
      for (int i = 0; i < N; i++) for (int j = 0; j < M; j++) begin img[i][j] = code_t'($urandom); seen[i][j] = 0; end
      @(negedge clk); start = 1; @(negedge clk); start = 0;
      t0 = $time;
      while (!done) @(negedge clk);
      t1 = $time;
      @(posedge clk); #1;
      checks++;
      if ((t1 - t0) / 10 != (N + 1) * (M + 1)) begin failures++; $display("FAIL scan took %0d clocks", (t1 - t0) / 10); end
      for (int i = 0; i < N; i++) for (int j = 0; j < M; j++) begin
        checks++; if (seen[i][j] != 1) begin failures++; $display("FAIL (%0d,%0d) emitted %0d times", i, j, seen[i][j]); end
      end
      @(negedge clk); checks++; if (busy) failures++;
    end
    checks++; if (border == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (5000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
