// tb_image_memory: 8 x 16 memory; random pixel writes and row writes against
// a shadow array, then every address read back; also checks that a row write
// wins over a pixel write to the same row in the same clock.
module tb_image_memory;
  import ad_pkg::*;
  localparam int N = 8, M = 16;
  logic clk = 0, we = 0, row_we = 0;
  logic [2:0] wrow = 0, row_addr = 0, rrow = 0;
  logic [3:0] wcol = 0, rcol = 0;
  code_t wdata = 0, rdata;
  code_t row_data [M];
  code_t shadow [N][M];
  int checks = 0, failures = 0;

  image_memory #(.N(N), .M(M)) dut (.*);
  always #5 clk = ~clk;

  task automatic check_all();
    for (int i = 0; i < N; i++) for (int j = 0; j < M; j++) begin
      rrow = 3'(i); rcol = 4'(j); #1;
      checks++;
      if (rdata != shadow[i][j]) begin failures++; $display("FAIL (%0d,%0d) %0d exp %0d", i, j, rdata, shadow[i][j]); end
    end
  endtask

  initial begin
    for (int j = 0; j < M; j++) row_data[j] = '0;
    for (int i = 0; i < N; i++) for (int j = 0; j < M; j++) begin
      @(negedge clk); we = 1; wrow = 3'(i); wcol = 4'(j); wdata = code_t'($urandom); shadow[i][j] = wdata;
    end
    @(negedge clk); we = 0;
    check_all();
    for (int k = 0; k < 20; k++) begin
      @(negedge clk);
      row_we = 1; row_addr = 3'($urandom);
      for (int j = 0; j < M; j++) begin row_data[j] = code_t'($urandom); shadow[row_addr][j] = row_data[j]; end
      we = 1; wrow = (k % 2) ? row_addr : 3'(row_addr + 1); wcol = 4'($urandom); wdata = code_t'($urandom);
      if (wrow != row_addr) shadow[wrow][wcol] = wdata;
      @(negedge clk); row_we = 0; we = 0;
      check_all();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (100000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
