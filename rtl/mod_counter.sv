// mod_counter: clocked MOD-N counter (the "MOD Counter" that steps addresses).
//
// Counts 0, 1, ..., MOD-1, 0, ... on every clock where en is high. clr
// returns it to 0 and wins over en. wrap is high in the clock where the
// counter holds MOD-1 and en is high, i.e. the count is about to return to 0.
// One clock drives the whole sequence; the architecture uses such a counter to
// address the memory banks, and this design also uses it for the pulse slot,
// crossbar cycle and row sequencing. Asynchronous active-low reset to 0.
module mod_counter #(
  parameter int unsigned MOD = 16,
  parameter int unsigned W   = (MOD > 1) ? $clog2(MOD) : 1
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         clr,
  input  logic         en,
  output logic [W-1:0] count,
  output logic         wrap
);

  assign wrap = en && (count == W'(MOD - 1));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)      count <= '0;
    else if (clr)    count <= '0;
    else if (wrap)   count <= '0;
    else if (en)     count <= count + 1'b1;
  end

endmodule
