// tb_rram_crossbar: 8 x 8 crossbar model. Programs every cell through the
// diagonal pattern (origin pulses), checks a diagonal read and a row read,
// then applies random neighbour pulses and compares each cell with a
// reference state (accumulated flux, saturated); cells off the selected
// diagonal and cells whose bit line is off must not change. The flux values
// are checked against hand-computed numbers for kappa = 4, sigma = 1/8:
// f(1) = 30, f(4) = 64, f(15) = 31 (in 1/256 level).
module tb_rram_crossbar;
  import ad_pkg::*;
  localparam int N = 8, M = 8;
  logic clk = 0;
  pulse_op_e op = OP_NONE; logic diag_mode = 0; logic [2:0] diag = 0;
  logic [N-1:0] wl_on = '0; logic [M-1:0] bl_on = '0;
  volt_t wl_v [N], bl_v [M]; code_t sense [M];
  int ref_x [N][M];
  int checks = 0, failures = 0, n_pos = 0, n_neg = 0, n_sat = 0;

  rram_crossbar #(.N(N), .M(M)) dut (.*);
  always #5 clk = ~clk;

  function automatic int lvl(int x);
    int r = (x + 128) >> 8;
    return r > 15 ? 15 : r;
  endfunction

  task automatic pulse();
    @(negedge clk); #1;
  endtask

  initial begin
    int f1, f4, f15;
    for (int i = 0; i < N; i++) wl_v[i] = '0;
    for (int j = 0; j < M; j++) bl_v[j] = '0;
    f1 = flux(1, 4, 3); f4 = flux(4, 4, 3); f15 = flux(15, 4, 3);
    checks += 4;
    if (f1 != 30 || f4 != 64 || f15 != 31 || flux(-4, 4, 3) != -64) begin failures++; $display("FAIL flux %0d %0d %0d", f1, f4, f15); end
    // program all cells, diagonal by diagonal
    @(negedge clk);
    for (int d = 0; d < N; d++) begin
      diag_mode = 1; diag = 3'(d); op = OP_PROG; wl_on = '1; bl_on = '1;
      for (int i = 0; i < N; i++) begin
        automatic int l = int'($urandom % 16);
        wl_v[i] = volt_t'(150 * l); ref_x[i][i ^ d] = l << 8;
      end
      pulse();
    end
    // diagonal read
    op = OP_READ; diag = 3'd5; #1;
    for (int j = 0; j < M; j++) begin
      checks++; if (int'(sense[j]) != lvl(ref_x[j ^ 5][j])) begin failures++; $display("FAIL diag read col %0d", j); end
    end
    // row read
    diag_mode = 0; wl_on = 8'b0000_1000; #1;
    for (int j = 0; j < M; j++) begin
      checks++; if (int'(sense[j]) != lvl(ref_x[3][j])) begin failures++; $display("FAIL row read col %0d", j); end
    end
    // neighbour pulses
    for (int p = 0; p < 400; p++) begin
      automatic int d = int'($urandom % N);
      diag_mode = 1; diag = 3'(d); op = OP_DIFF; wl_on = '1; bl_on = M'($urandom) | M'(8'h0F);
      for (int i = 0; i < N; i++) begin
        wl_v[i] = volt_t'(150 * ($urandom % 16));
        bl_v[i] = volt_t'(150 * ($urandom % 16));
      end
      pulse();
      for (int i = 0; i < N; i++) begin
        automatic int j = i ^ d;
        if (bl_on[j]) begin
          automatic int dl = (int'(bl_v[j]) - int'(wl_v[i])) / 150;
          automatic int nx = ref_x[i][j] + flux(dl, 4, 3);
          if (dl > 0) n_pos++; if (dl < 0) n_neg++;
          if (nx < 0 || nx > 3840) n_sat++;
          ref_x[i][j] = nx < 0 ? 0 : nx > 3840 ? 3840 : nx;
        end
      end
      if (p % 50 == 49) begin
        op = OP_READ; diag_mode = 0; bl_on = '1;
        for (int r = 0; r < N; r++) begin
          wl_on = N'(1) << r; #1;
          for (int j = 0; j < M; j++) begin
            checks++;
            if (int'(sense[j]) != lvl(ref_x[r][j])) begin failures++; $display("FAIL cell (%0d,%0d) %0d exp %0d", r, j, sense[j], lvl(ref_x[r][j])); end
            checks++;
            if (int'(dut.x[r][j]) != ref_x[r][j]) begin failures++; $display("FAIL state (%0d,%0d) %0d exp %0d", r, j, dut.x[r][j], ref_x[r][j]); end
          end
        end
        op = OP_NONE;
        pulse();
      end
    end
    checks += 2; if (n_pos == 0 || n_neg == 0) failures++; if (n_sat == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (5000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
