// tb_lb_fifo: writes random windows to all 16 entries in random order,
// reads them back at random addresses, and checks a later overwrite.
module tb_lb_fifo;
  import ad_pkg::*;
  localparam int M = 16;
  logic clk = 0, we = 0;
  logic [3:0] waddr = 0, raddr = 0;
  window_t wdata = '0, rdata;
  window_t shadow [M];
  int checks = 0, failures = 0;

  lb_fifo #(.M(M)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    for (int round = 0; round < 4; round++) begin
      for (int k = 0; k < M; k++) begin
        @(negedge clk); we = 1; waddr = 4'((k * 5 + round) % M); wdata = window_t'($urandom); shadow[waddr] = wdata;
      end
      @(negedge clk); we = 0;
      for (int k = 0; k < 3 * M; k++) begin
        raddr = 4'($urandom); #1; checks++;
        if (rdata != shadow[raddr]) begin failures++; $display("FAIL addr %0d", raddr); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (10000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
