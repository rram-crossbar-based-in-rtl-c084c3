// tb_level_decoder: exhaustive check of the 4:16 decoder with en high and low.
module tb_level_decoder;
  import ad_pkg::*;
  logic en; code_t code; logic [LEVELS-1:0] onehot;
  int checks = 0, failures = 0;
  level_decoder dut (.*);
  initial begin
    for (int e = 0; e < 2; e++) for (int c = 0; c < LEVELS; c++) begin
      en = e[0]; code = code_t'(c); #1; checks++;
      if (onehot != (e ? (16'(1) << c) : 16'(0))) begin failures++; $display("FAIL en=%0d code=%0d -> %b", e, c, onehot); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    #10000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
