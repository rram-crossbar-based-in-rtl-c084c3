// tb_mem_ctrl_align: 8 lanes with random windows. For every diagonal and
// every pulse slot it checks the window-store addresses (i XOR diag), the
// word-line amplitudes (origin level x 150 mV in write slots, 0 otherwise)
// and the bit-line amplitudes (0 in the origin slot, the neighbour of the
// slot's direction routed to column i XOR diag).
module tb_mem_ctrl_align;
  import ad_pkg::*;
  localparam int N = 8, M = 8;
  logic active; logic [2:0] diag; slot_t slot;
  window_t lane_win [N]; volt_t rails [LEVELS];
  logic [2:0] lane_raddr [N]; volt_t wl_v [N], bl_v [M];
  int checks = 0, failures = 0;

  mem_ctrl_align #(.N(N), .M(M)) dut (.*);

  function automatic code_t pick(window_t w, int s);
    case (s / 2)
      1: return w.n; 2: return w.s; 3: return w.w; 4: return w.e; default: return '0;
    endcase
  endfunction

  initial begin
    for (int k = 0; k < LEVELS; k++) rails[k] = volt_t'(150 * k);
    for (int r = 0; r < 4; r++) begin
      for (int i = 0; i < N; i++) lane_win[i] = window_t'($urandom);
      for (int a = 0; a < 2; a++) for (int d = 0; d < N; d++) for (int s = 0; s < 10; s++) begin
        active = a[0]; diag = 3'(d); slot = slot_t'(s); #1;
        for (int i = 0; i < N; i++) begin
          int j; int ewl, ebl;
          j = i ^ d;
          ewl = (a && s % 2 == 0) ? 150 * int'(lane_win[i].o) : 0;
          ebl = (a && s % 2 == 0 && s != 0) ? 150 * int'(pick(lane_win[i], s)) : 0;
          checks += 3;
          if (lane_raddr[i] != 3'(j)) begin failures++; $display("FAIL raddr lane %0d", i); end
          if (int'(wl_v[i]) != ewl) begin failures++; $display("FAIL wl %0d d%0d s%0d: %0d exp %0d", i, d, s, wl_v[i], ewl); end
          if (int'(bl_v[j]) != ebl) begin failures++; $display("FAIL bl %0d d%0d s%0d: %0d exp %0d", j, d, s, bl_v[j], ebl); end
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    #100000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
