// tb_mod_counter: runs a MOD-10 and a MOD-7 counter with random enable and
// clear against a reference count, checking count and wrap every clock.
module tb_mod_counter;
  logic clk = 0, rst_n = 0, clr = 0, en = 0;
  logic [3:0] c10; logic w10;
  logic [2:0] c7;  logic w7;
  int r10 = 0, r7 = 0, checks = 0, failures = 0, wraps = 0;

  mod_counter #(.MOD(10)) u10 (.clk, .rst_n, .clr, .en, .count(c10), .wrap(w10));
  mod_counter #(.MOD(7))  u7  (.clk, .rst_n, .clr, .en, .count(c7),  .wrap(w7));
  always #5 clk = ~clk;

  initial begin
    repeat (2) @(negedge clk); rst_n = 1;
    for (int k = 0; k < 2000; k++) begin
      @(negedge clk);
      en  = ($urandom % 4) != 0;
      clr = ($urandom % 50) == 0;
      #1;
      checks += 4;
      if (c10 != 4'(r10)) begin failures++; $display("FAIL c10 %0d exp %0d", c10, r10); end
      if (c7  != 3'(r7))  begin failures++; $display("FAIL c7 %0d exp %0d", c7, r7); end
      if (w10 != (en && r10 == 9)) begin failures++; $display("FAIL w10"); end
      if (w7  != (en && r7 == 6))  begin failures++; $display("FAIL w7"); end
      if (w10) wraps++;
      @(posedge clk);
      if (clr) begin r10 = 0; r7 = 0; end
      else if (en) begin r10 = (r10 + 1) % 10; r7 = (r7 + 1) % 7; end
    end
    checks++; if (wraps == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (100000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
