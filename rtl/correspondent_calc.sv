// correspondent_calc: position of a correspondent in the corrected image.
//
// U = i_reduit + delta_u and V = j_reduit + delta_v, where each delta is an
// 8-bit sign-magnitude displacement: its magnitude is added when the sign bit
// is clear and subtracted when set. Results are 8 bits (the corrected image
// is a reduced image whose sides are below 256) and wrap modulo 256.
// Purely combinational. Function and widths follow the source.
module correspondent_calc
  import rectif_pkg::*;
(
  input  logic [COORD_W-1:0] i_reduit,
  input  logic [COORD_W-1:0] j_reduit,
  input  disp_t              delta_u,
  input  disp_t              delta_v,
  output logic [COORD_W-1:0] U,
  output logic [COORD_W-1:0] V
);

  always_comb begin
    U = delta_u.neg ? i_reduit - COORD_W'(delta_u.mag) : i_reduit + COORD_W'(delta_u.mag);
    V = delta_v.neg ? j_reduit - COORD_W'(delta_v.mag) : j_reduit + COORD_W'(delta_v.mag);
  end

endmodule
