// tb_switch_matrix: 12 lines, random amplitudes and controls; a closed switch
// passes the amplitude, an open one grounds the line.
module tb_switch_matrix;
  import ad_pkg::*;
  localparam int L = 12;
  volt_t v_in [L], v_out [L]; logic [L-1:0] ctrl, line_on;
  int checks = 0, failures = 0;
  switch_matrix #(.L(L)) dut (.*);
  initial begin
    for (int r = 0; r < 200; r++) begin
      for (int k = 0; k < L; k++) v_in[k] = volt_t'($urandom);
      ctrl = L'($urandom); #1;
      for (int k = 0; k < L; k++) begin
        checks++;
        if (v_out[k] != (ctrl[k] ? v_in[k] : volt_t'(0))) begin failures++; $display("FAIL line %0d", k); end
      end
      checks++; if (line_on != ctrl) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    #100000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
