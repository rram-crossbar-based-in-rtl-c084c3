// pixel_quantizer: the "signal processing" stage in front of the image memories.
//
// Each accepted 8-bit grey level p in [0, 255] is mapped to one of the
// 16 sample levels (L_samp = 2^4) as floor(p / 16), i.e. the four most
// significant bits. Level k is later programmed with k * 0.15 V, so e.g.
// p = 100 gives level 6 and 0.90 V and p = 80 gives level 5 and 0.75 V.
// The 16-level quantization and the 0.15 V step follow the published architecture; the
// truncating rule is this design's choice.
//
// Interface: in_valid/in_pix in, out_valid/out_code out. Latency one clock,
// one pixel per clock, no back-pressure.
module pixel_quantizer
  import ad_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  logic       in_valid,
  input  logic [7:0] in_pix,
  output logic       out_valid,
  output code_t      out_code
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      out_code  <= '0;
    end else begin
      out_valid <= in_valid;
      if (in_valid) out_code <= in_pix[7 -: CODE_W];
    end
  end

endmodule
