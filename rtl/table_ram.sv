// table_ram: single-port synchronous RAM holding a pre-calculated table.
//
// Ports as the source's library RAMs: data, wren, address, clock, q. A write
// stores wdata at addr on the rising edge; a read returns the word at addr on
// q one cycle after the address is presented (registered output). With
// we high, q returns the old word. Contents are cleared at time zero so a
// simulator starts from a known table.
module table_ram #(
  parameter int unsigned WIDTH  = rectif_pkg::WORD_W,
  parameter int unsigned DEPTH  = rectif_pkg::DEPTH_G,
  parameter int unsigned ADDR_W = $clog2(DEPTH)
) (
  input  logic              clk,
  input  logic              we,
  input  logic [ADDR_W-1:0] addr,
  input  logic [WIDTH-1:0]  wdata,
  output logic [WIDTH-1:0]  rdata
);

  logic [WIDTH-1:0] mem [DEPTH];

  initial begin
    for (int i = 0; i < int'(DEPTH); i++) mem[i] = '0;
  end

  always_ff @(posedge clk) begin
    if (we) mem[addr] <= wdata;
    rdata <= mem[addr];
  end

endmodule
