// window_detector: the image reduction module.
//
// It finds, for each camera pixel, whether it is the retained pixel of its
// F_L x F_C window (sampling_pulse_gen) and, if so, holds the window's reduced
// position, the pixel's grey value and its order in the frame
// (reduced_coord_blocker and the pixels counter). Outputs: `sample_o`, the
// combinational sampling impulse in the cycle of the retained pixel, and
// `red`, the held retained pixel, whose `valid` strobe rises one cycle later.
// `red.index` (15 bits) is the address of the pixel's word in the address
// table. Structure follows the source's window detector.
module window_detector
  import rectif_pkg::*;
#(
  parameter int unsigned NL = rectif_pkg::N_L,
  parameter int unsigned NC = rectif_pkg::N_C,
  parameter int unsigned FL = rectif_pkg::F_L,
  parameter int unsigned FC = rectif_pkg::F_C
) (
  input  logic              clk,
  input  logic              rst,
  input  logic              frame_start,
  input  logic              pix_valid,
  input  logic [LINE_W-1:0] line,
  input  logic [COL_W-1:0]  col,
  input  logic [PIX_W-1:0]  grey,
  output logic              sample_o,
  output red_pix_t          red
);

  logic [ADDR_W-1:0] pixel_index;

  sampling_pulse_gen #(
    .NC(NC), .F(FL * FC), .SAMPLE_PHASE(FL * FC - 1)
  ) u_sampling (
    .clk, .rst, .frame_start, .pix_valid, .line, .col,
    .sample(sample_o), .pixel_index
  );

  reduced_coord_blocker #(
    .FL(FL), .FC(FC)
  ) u_blocker (
    .clk, .rst, .sample(sample_o), .line, .col, .grey,
    .u_red(red.u_red), .v_red(red.v_red), .grey_held(red.grey), .valid(red.valid)
  );

  assign red.index = pixel_index;

  // Rows above NL are never produced by the counters.
  initial assert (NL <= (1 << LINE_W)) else $error("NL does not fit LINE_W");

endmodule
