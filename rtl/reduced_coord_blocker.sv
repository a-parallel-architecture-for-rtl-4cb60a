// reduced_coord_blocker: dividers by F_L / F_C and the blockers that hold the
// reduced position of the retained pixel.
//
// The line and column of the present pixel are divided by the reduction
// factors (a right shift for the factor 4 of the source) every principal
// cycle. The blockers load the quotients, and the grey value of the pixel,
// only on the sampling impulse, so (u_red, v_red) change once per treatment
// cycle (every 16 principal cycles) and stay stable while the later stages
// work on them. `valid` is high for the one cycle after a load. Holding the
// grey value with the position, and the synchronous reset, are this design's
// choices; the dividers and blockers follow the source.
module reduced_coord_blocker #(
  parameter int unsigned FL      = rectif_pkg::F_L,
  parameter int unsigned FC      = rectif_pkg::F_C,
  parameter int unsigned LINE_W  = rectif_pkg::LINE_W,
  parameter int unsigned COL_W   = rectif_pkg::COL_W,
  parameter int unsigned COORD_W = rectif_pkg::COORD_W,
  parameter int unsigned PIX_W   = rectif_pkg::PIX_W
) (
  input  logic               clk,
  input  logic               rst,
  input  logic               sample,
  input  logic [LINE_W-1:0]  line,
  input  logic [COL_W-1:0]   col,
  input  logic [PIX_W-1:0]   grey,
  output logic [COORD_W-1:0] u_red,
  output logic [COORD_W-1:0] v_red,
  output logic [PIX_W-1:0]   grey_held,
  output logic               valid
);

  logic [LINE_W-1:0] line_div;
  logic [COL_W-1:0]  col_div;

  // Dividers, running on the principal clock's data.
  always_comb begin
    line_div = line / LINE_W'(FL);
    col_div  = col / COL_W'(FC);
  end

  // Blockers, loaded by the sampling impulse.
  always_ff @(posedge clk) begin
    if (rst) begin
      u_red     <= '0;
      v_red     <= '0;
      grey_held <= '0;
      valid     <= 1'b0;
    end else begin
      valid <= sample;
      if (sample) begin
        u_red     <= COORD_W'(line_div);
        v_red     <= COORD_W'(col_div);
        grey_held <= grey;
      end
    end
  end

endmodule
