// corrected_image_memory: the single memory holding the corrected image.
//
// One grey value per pixel of the reduced corrected image (DEPTH = 164 x 123
// words by default). The treatment writes it serially, one correspondent per
// cycle (we, waddr, wdata); writes at or beyond DEPTH are dropped. A second
// port reads the image out: rdata is the word at raddr one cycle later.
// The single write port is the source's; the read port, 8-bit grey and the
// initial clearing are this design's choices.
module corrected_image_memory #(
  parameter int unsigned DEPTH  = rectif_pkg::IMG_DEPTH,
  parameter int unsigned PIX_W  = rectif_pkg::PIX_W,
  parameter int unsigned ADDR_W = rectif_pkg::ADDR_W
) (
  input  logic              clk,
  input  logic              we,
  input  logic [ADDR_W-1:0] waddr,
  input  logic [PIX_W-1:0]  wdata,
  input  logic [ADDR_W-1:0] raddr,
  output logic [PIX_W-1:0]  rdata
);

  logic [PIX_W-1:0] mem [DEPTH];

  initial begin
    for (int i = 0; i < int'(DEPTH); i++) mem[i] = '0;
  end

  always_ff @(posedge clk) begin
    if (we && (32'(waddr) < DEPTH)) mem[waddr] <= wdata;
    rdata <= (32'(raddr) < DEPTH) ? mem[raddr] : '0;
  end

endmodule
