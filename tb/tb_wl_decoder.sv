// tb_wl_decoder: 16 word lines; every address in single mode, the
// activate-all mode, and the disabled decoder.
module tb_wl_decoder;
  localparam int N = 16;
  logic en, all; logic [3:0] addr; logic [N-1:0] wl_sel;
  int checks = 0, failures = 0;
  wl_decoder #(.N(N)) dut (.*);
  initial begin
    for (int e = 0; e < 2; e++) for (int a = 0; a < 2; a++) for (int k = 0; k < N; k++) begin
      en = e[0]; all = a[0]; addr = 4'(k); #1; checks++;
      if (wl_sel != (!e ? 16'(0) : a ? 16'hFFFF : 16'(1) << k)) begin
        failures++; $display("FAIL en=%0d all=%0d addr=%0d -> %h", e, a, k, wl_sel);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    #10000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
