// tb_pixel_quantizer: checks the 8-bit to 16-level mapping (floor(p/16)) and
// the one-clock latency, with the example intensities 80, 100 and 240
// (levels 5, 6 and 15) and random pixels with random gaps.
module tb_pixel_quantizer;
  import ad_pkg::*;
  logic clk = 0, rst_n = 0, in_valid = 0;
  logic [7:0] in_pix = 0;
  logic out_valid;
  code_t out_code;
  int checks = 0, failures = 0;

  pixel_quantizer dut (.*);
  always #5 clk = ~clk;

  task automatic send(input logic [7:0] p, input int exp);
    @(negedge clk); in_valid = 1; in_pix = p;
    @(negedge clk); in_valid = 0;
    checks++;
    if (!out_valid || out_code != code_t'(exp)) begin
      failures++; $display("FAIL pix=%0d got v=%0b code=%0d exp %0d", p, out_valid, out_code, exp);
    end
  endtask

  initial begin
    repeat (2) @(negedge clk); rst_n = 1;
    send(8'd80, 5); send(8'd100, 6); send(8'd240, 15); send(8'd0, 0); send(8'd255, 15); send(8'd15, 0); send(8'd16, 1);
    for (int k = 0; k < 300; k++) begin
      automatic logic [7:0] p = 8'($urandom);
      send(p, int'(p) / 16);
      @(negedge clk); checks++;
      if (out_valid) begin failures++; $display("FAIL valid without input"); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (20000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
