// decoupleur: splits a correspondent word into its two displacements.
//
// A 16-bit correspondent word holds delta_u in bits 15..8 and delta_v in bits
// 7..0, each 8 bits in sign-magnitude form: bit 7 clear is a positive
// displacement, bit 7 set a negative one, bits 6..0 the magnitude. The
// displacements are registered when `en` is high and held otherwise
// (one cycle of latency). The 8-bit sign-magnitude coding is the source's;
// the byte order is this design's reading of it.
module decoupleur
  import rectif_pkg::*;
(
  input  logic              clk,
  input  logic              en,
  input  logic [WORD_W-1:0] my_data_in,
  output disp_t             delta_u,
  output disp_t             delta_v
);

  corr_word_t w;
  assign w = corr_word_t'(my_data_in);

  always_ff @(posedge clk) begin
    if (en) begin
      delta_u <= w.du;
      delta_v <= w.dv;
    end
  end

endmodule
