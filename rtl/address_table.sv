// address_table: the data decoder, i.e. the address-table management.
//
// The address table holds one 16-bit word per retained pixel. It is built of
// two RAMs: RAM_G (16384 words, 14-bit address) and RAM_P (4096 words, 12-bit
// address). Bit 14 of the 15-bit pixel index selects the RAM (0: G, 1: P),
// the low bits address it. Timing: rd_en with `index` in cycle t reads both
// RAMs; the select bit is delayed one cycle (the "retard" that gives the RAM
// data time to arrive) and, with sel_en in cycle t+1, the multiplexer's word
// is registered, so `active` (word bit 15) and `corr_addr` (bits 13..0) are
// valid from cycle t+2 and held until the next sel_en. A table load (ld_we)
// writes ld_data at ld_addr into the RAM chosen by ld_addr[14]; it must not
// coincide with a read. The two-RAM split and the select bit follow the
// source; the word layout (bit 15 active, bits 13..0 address) is this
// design's reading of it.
module address_table
  import rectif_pkg::*;
#(
  parameter int unsigned DEPTH_G_P = rectif_pkg::DEPTH_G,
  parameter int unsigned DEPTH_P_P = rectif_pkg::DEPTH_P
) (
  input  logic               clk,
  input  logic               rst,
  input  logic               rd_en,
  input  logic [ADDR_W-1:0]  index,
  input  logic               sel_en,
  input  logic               ld_we,
  input  logic [ADDR_W-1:0]  ld_addr,
  input  logic [WORD_W-1:0]  ld_data,
  output logic               active,
  output logic [CADDR_W-1:0] corr_addr
);

  localparam int unsigned AG_W = $clog2(DEPTH_G_P);
  localparam int unsigned AP_W = $clog2(DEPTH_P_P);

  logic [ADDR_W-1:0] a;          // address presented to the RAMs
  logic              select_bit; // bit 14 of the address
  logic              sel_q;      // delayed select bit
  logic              we_g, we_p;
  logic [WORD_W-1:0] q_g, q_p;
  addr_word_t        word;

  always_comb begin
    a          = ld_we ? ld_addr : index;
    select_bit = a[ADDR_W-1];
    we_g       = ld_we && !select_bit;
    we_p       = ld_we &&  select_bit;
  end

  table_ram #(.WIDTH(WORD_W), .DEPTH(DEPTH_G_P)) ram_g (
    .clk, .we(we_g), .addr(a[AG_W-1:0]), .wdata(ld_data), .rdata(q_g)
  );

  table_ram #(.WIDTH(WORD_W), .DEPTH(DEPTH_P_P)) ram_p (
    .clk, .we(we_p), .addr(a[AP_W-1:0]), .wdata(ld_data), .rdata(q_p)
  );

  // Delay of the select bit, aligned with the RAM output.
  always_ff @(posedge clk) begin
    if (rst)        sel_q <= 1'b0;
    else if (rd_en) sel_q <= select_bit;
  end

  // multiplexeur2data and the output register.
  always_ff @(posedge clk) begin
    if (rst)         word <= '0;
    else if (sel_en) word <= addr_word_t'(sel_q ? q_p : q_g);
  end

  assign active    = word.active;
  assign corr_addr = word.corr_addr;

  // A load and a read must not share a cycle.
  assert property (@(posedge clk) disable iff (rst) !(ld_we && rd_en));

endmodule
