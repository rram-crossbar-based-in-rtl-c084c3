// tb_level_mux: with random rail amplitudes, selects each rail in turn and
// checks the output; an empty select must give 0 V.
module tb_level_mux;
  import ad_pkg::*;
  logic [LEVELS-1:0] sel; volt_t rails [LEVELS]; volt_t v_out;
  int checks = 0, failures = 0;
  level_mux dut (.*);
  initial begin
    for (int r = 0; r < 20; r++) begin
      for (int k = 0; k < LEVELS; k++) rails[k] = volt_t'($urandom);
      for (int k = 0; k < LEVELS; k++) begin
        sel = 16'(1) << k; #1; checks++;
        if (v_out != rails[k]) begin failures++; $display("FAIL sel %0d: %0d exp %0d", k, v_out, rails[k]); end
      end
      sel = '0; #1; checks++;
      if (v_out != '0) begin failures++; $display("FAIL empty select"); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    #100000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
