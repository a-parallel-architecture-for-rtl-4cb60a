// correspondents_tables: the three correspondents memories MEM1..MEM3.
//
// A pixel has at most three correspondents in the corrected image; they are
// stored at the same address in three physical memories so that all three are
// read in one cycle. A pixel with fewer than three distinct correspondents
// repeats its last one. rd_en with `addr` in cycle t gives the three words on
// `corr` in cycle t+1 (held until the next read). ld_we[k] writes ld_data at
// ld_addr into memory k+1; loads must not coincide with a read. The three
// memories and their shared address follow the source; the loading port is
// this design's.
module correspondents_tables
  import rectif_pkg::*;
#(
  parameter int unsigned DEPTH = rectif_pkg::DEPTH_C
) (
  input  logic                    clk,
  input  logic                    rd_en,
  input  logic [CADDR_W-1:0]      addr,
  input  logic [N_CORR-1:0]       ld_we,
  input  logic [CADDR_W-1:0]      ld_addr,
  input  logic [WORD_W-1:0]       ld_data,
  output logic [N_CORR-1:0][WORD_W-1:0] corr
);

  localparam int unsigned A_W = $clog2(DEPTH);

  logic [CADDR_W-1:0] a;
  logic [N_CORR-1:0][WORD_W-1:0] q;

  assign a = (|ld_we) ? ld_addr : addr;

  for (genvar k = 0; k < int'(N_CORR); k++) begin : g_mem
    table_ram #(.WIDTH(WORD_W), .DEPTH(DEPTH)) u_mem (
      .clk, .we(ld_we[k]), .addr(a[A_W-1:0]), .wdata(ld_data), .rdata(q[k])
    );
  end

  // Hold the words read until the next read.
  logic rd_q;
  logic [N_CORR-1:0][WORD_W-1:0] hold;
  always_ff @(posedge clk) begin
    rd_q <= rd_en;
    if (rd_q) hold <= q;
  end
  assign corr = rd_q ? q : hold;

  assert property (@(posedge clk) !(|ld_we && rd_en));

endmodule
