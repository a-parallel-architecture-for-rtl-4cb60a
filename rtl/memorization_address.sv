// memorization_address: address of a corrected pixel in the image memory.
//
// The corrected image is stored line by line, so pixel (U, V) is at
// U * W + V, a 15-bit address (W = 123 reduced columns by default, which
// keeps 164 x 123 = 20172 pixels below 2^15). Purely combinational. The
// source gives only the ports (U, V in, 15-bit address out); the row-major
// layout is this design's choice.
module memorization_address
  import rectif_pkg::*;
#(
  parameter int unsigned W = rectif_pkg::W_RED
) (
  input  logic [COORD_W-1:0] U_in,
  input  logic [COORD_W-1:0] V_in,
  output logic [ADDR_W-1:0]  adresse
);

  assign adresse = ADDR_W'(U_in) * ADDR_W'(W) + ADDR_W'(V_in);

endmodule
