// line_column_counter: column and line counters of the incoming camera image.
//
// Each valid pixel advances the column counter; at column NC-1 it wraps to 0
// and advances the line counter, which wraps at NL-1. frame_start marks pixel
// (0,0) of a frame: that pixel is reported at line 0 / column 0 whatever the
// counters held. The outputs are combinational and describe the pixel present
// on the inputs this cycle (0-based line i-1 and column j-1 of the source's
// 1-based notation). The two counters are the source architecture's; the
// frame_start / pix_valid framing and the synchronous reset are this design's.
module line_column_counter #(
  parameter int unsigned NL     = rectif_pkg::N_L,
  parameter int unsigned NC     = rectif_pkg::N_C,
  parameter int unsigned LINE_W = rectif_pkg::LINE_W,
  parameter int unsigned COL_W  = rectif_pkg::COL_W
) (
  input  logic              clk,
  input  logic              rst,
  input  logic              frame_start,
  input  logic              pix_valid,
  output logic [LINE_W-1:0] line,
  output logic [COL_W-1:0]  col
);

  logic [LINE_W-1:0] line_q;
  logic [COL_W-1:0]  col_q;

  // Position of the present pixel.
  always_comb begin
    line = frame_start ? '0 : line_q;
    col  = frame_start ? '0 : col_q;
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      line_q <= '0;
      col_q  <= '0;
    end else if (pix_valid) begin
      if (col == COL_W'(NC - 1)) begin
        col_q  <= '0;
        line_q <= (line == LINE_W'(NL - 1)) ? '0 : line + 1'b1;
      end else begin
        col_q  <= col + 1'b1;
        line_q <= line;
      end
    end else if (frame_start) begin
      line_q <= '0;
      col_q  <= '0;
    end
  end

endmodule
