// address_shift_manager: serialises the three write addresses of a pixel.
//
// On `load` the three 15-bit addresses are fused into one 45-bit word
// {ad3, ad2, ad1}; adresse_mem is always its low 15 bits. Each `rotate`
// (the writing clock) rotates the word right by 15 bits, so ad2 becomes the
// first address, ad3 the second and ad1 the third: successive writes see
// ad1, ad2, ad3. load has priority over rotate. The fusion and rotation are
// the source's; the bit order and the synchronous reset are this design's.
module address_shift_manager
  import rectif_pkg::*;
(
  input  logic              clk,
  input  logic              rst,
  input  logic              load,
  input  logic [ADDR_W-1:0] ad1,
  input  logic [ADDR_W-1:0] ad2,
  input  logic [ADDR_W-1:0] ad3,
  input  logic              rotate,
  output logic [ADDR_W-1:0] adresse_mem
);

  logic [N_CORR*ADDR_W-1:0] block_adresse;

  always_ff @(posedge clk) begin
    if (rst)
      block_adresse <= '0;
    else if (load)
      block_adresse <= {ad3, ad2, ad1};
    else if (rotate)
      block_adresse <= {block_adresse[ADDR_W-1:0], block_adresse[N_CORR*ADDR_W-1:ADDR_W]};
  end

  assign adresse_mem = block_adresse[ADDR_W-1:0];

endmodule
