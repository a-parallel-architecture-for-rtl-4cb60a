// sampling_pulse_gen: sampling impulse and pixels counter of the window
// detector (non-regular sampling).
//
// The position of the present pixel in the image vector is P = line*NC + col
// (a multiplier and an adder). P is divided by F; when the remainder equals
// SAMPLE_PHASE (F-1, i.e. P = F*a + F - 1) the pixel is retained and the
// one-cycle impulse `sample` is raised, combinationally, in the same cycle
// as the pixel. With NC*F_L a multiple of F and NC itself not, exactly one
// pixel of every F_L x F_C window is retained, and in a continuous stream the
// impulse comes once every F cycles. Each impulse advances a pixels counter;
// pixel_index is that counter minus one, so the k-th retained pixel of a
// frame (k from 0) gets index k and is held until the next impulse.
// The multiplier/divider structure, the phase and the "minus one" follow the
// source; the remainder is taken as the low bits of P since F is a power of
// two, and the counter restarts at frame_start (this design's choice).
module sampling_pulse_gen #(
  parameter int unsigned NC           = rectif_pkg::N_C,
  parameter int unsigned F            = rectif_pkg::F,
  parameter int unsigned SAMPLE_PHASE = F - 1,
  parameter int unsigned LINE_W       = rectif_pkg::LINE_W,
  parameter int unsigned COL_W        = rectif_pkg::COL_W,
  parameter int unsigned ADDR_W       = rectif_pkg::ADDR_W
) (
  input  logic              clk,
  input  logic              rst,
  input  logic              frame_start,
  input  logic              pix_valid,
  input  logic [LINE_W-1:0] line,
  input  logic [COL_W-1:0]  col,
  output logic              sample,
  output logic [ADDR_W-1:0] pixel_index
);

  localparam int unsigned P_W = LINE_W + COL_W;

  logic [P_W-1:0]    pos;        // vector position P
  logic [P_W-1:0]    remainder;  // P mod F
  logic [ADDR_W-1:0] pix_cnt;    // retained pixels so far in this frame

  always_comb begin
    pos       = P_W'(line) * P_W'(NC) + P_W'(col);
    remainder = pos % P_W'(F);
    sample    = pix_valid && (remainder == P_W'(SAMPLE_PHASE));
  end

  // Pixels counter, clocked by the impulse.
  always_ff @(posedge clk) begin
    if (rst) begin
      pix_cnt <= '0;
    end else if (sample) begin
      pix_cnt <= frame_start ? ADDR_W'(1) : pix_cnt + 1'b1;
    end else if (frame_start) begin
      pix_cnt <= '0;
    end
  end

  assign pixel_index = pix_cnt - 1'b1;

endmodule
