// correction_channel: real-time radial-distortion correction of one camera.
//
// The camera stream (one pixel per principal clock, framed by frame_start and
// pix_valid) is reduced on the fly: one pixel of every F_L x F_C window is
// retained, once every F = 16 cycles. For each retained pixel the address
// table says whether it is active and where its correspondents are; the
// three correspondents are read in parallel, turned into three positions
// (U, V) of the corrected image and three memory addresses, and the pixel's
// grey value is written serially to those three addresses. Passive pixels
// write nothing.
//
// Pipeline, in principal cycles after the sampling impulse (cycle 0):
//   1  blockers hold (u_red, v_red, grey, index); address-table read
//   2  address-table multiplexer registered (active bit, correspondents addr)
//   3  three correspondents tables read
//   4  three decoupleurs register (delta_u, delta_v)
//   5  three adders and address calculations; 45-bit address word loaded
//   6-8 three writes (wr_en), rotating the address word after each
// The treatment thus spans 9 cycles of the 16-cycle treatment cycle.
//
// Tables are loaded through ld_* (ld_sel: 0 address table, 1..3 MEM1..3)
// while no frame is streaming. The corrected image is read through
// img_raddr / img_rdata (one cycle latency). wr_en / wr_addr / wr_data show
// the writes of the corrected image. The block structure follows the source's
// synoptic scheme; single-clock enables in place of derived clocks and the
// load / read ports are this design's.
module correction_channel
  import rectif_pkg::*;
#(
  parameter int unsigned NL = rectif_pkg::N_L,
  parameter int unsigned NC = rectif_pkg::N_C
) (
  input  logic              clk,
  input  logic              rst,
  input  logic              frame_start,
  input  logic              pix_valid,
  input  logic [PIX_W-1:0]  grey,
  input  logic              ld_we,
  input  ld_sel_e           ld_sel,
  input  logic [ADDR_W-1:0] ld_addr,
  input  logic [WORD_W-1:0] ld_data,
  input  logic [ADDR_W-1:0] img_raddr,
  output logic [PIX_W-1:0]  img_rdata,
  output logic              sample,
  output logic              wr_en,
  output logic [ADDR_W-1:0] wr_addr,
  output logic [PIX_W-1:0]  wr_data
);

  localparam int unsigned WR = NC / F_C;
  localparam int unsigned HR = NL / F_L;

  logic [LINE_W-1:0] line;
  logic [COL_W-1:0]  col;
  red_pix_t          red;
  logic [4:0]        stage;

  // Columns and lines counters.
  line_column_counter #(.NL(NL), .NC(NC)) u_counters (
    .clk, .rst, .frame_start, .pix_valid, .line, .col
  );

  // Reduction.
  window_detector #(.NL(NL), .NC(NC)) u_window (
    .clk, .rst, .frame_start, .pix_valid, .line, .col, .grey,
    .sample_o(sample), .red
  );

  // Delay modules.
  treatment_delay_chain #(.N_STAGES(5)) u_delays (
    .clk, .rst, .start(red.valid), .stage
  );

  // Data decoder: address table.
  logic               active;
  logic [CADDR_W-1:0] corr_addr;

  address_table u_addr_table (
    .clk, .rst,
    .rd_en(red.valid), .index(red.index), .sel_en(stage[0]),
    .ld_we(ld_we && ld_sel == LD_ADDR_TABLE), .ld_addr, .ld_data,
    .active, .corr_addr
  );

  // Correspondents tables.
  logic [N_CORR-1:0]             corr_ld_we;
  logic [N_CORR-1:0][WORD_W-1:0] corr;

  always_comb begin
    corr_ld_we    = '0;
    corr_ld_we[0] = ld_we && ld_sel == LD_MEM1;
    corr_ld_we[1] = ld_we && ld_sel == LD_MEM2;
    corr_ld_we[2] = ld_we && ld_sel == LD_MEM3;
  end

  correspondents_tables u_corr_tables (
    .clk, .rd_en(stage[1]), .addr(corr_addr),
    .ld_we(corr_ld_we), .ld_addr(ld_addr[CADDR_W-1:0]), .ld_data, .corr
  );

  // Decoupleurs, adders and memorisation addresses, one per correspondent.
  logic [N_CORR-1:0][ADDR_W-1:0] ad;

  for (genvar k = 0; k < int'(N_CORR); k++) begin : g_corr
    disp_t              du, dv;
    logic [COORD_W-1:0] u_c, v_c;

    decoupleur u_dec (
      .clk, .en(stage[2]), .my_data_in(corr[k]), .delta_u(du), .delta_v(dv)
    );

    correspondent_calc u_calc (
      .i_reduit(red.u_red), .j_reduit(red.v_red), .delta_u(du), .delta_v(dv),
      .U(u_c), .V(v_c)
    );

    memorization_address #(.W(WR)) u_maddr (
      .U_in(u_c), .V_in(v_c), .adresse(ad[k])
    );
  end

  // Shift management and writing authorisation.
  logic wa_rot, wa_busy;

  address_shift_manager u_shift (
    .clk, .rst, .load(stage[3]), .ad1(ad[0]), .ad2(ad[1]), .ad3(ad[2]),
    .rotate(wa_rot), .adresse_mem(wr_addr)
  );

  writing_authorization #(.N(N_CORR)) u_write_auth (
    .clk, .rst, .start(stage[4]), .active, .we(wr_en), .rot(wa_rot), .busy(wa_busy)
  );

  assign wr_data = red.grey;

  // Corrected image.
  corrected_image_memory #(.DEPTH(HR * WR)) u_image (
    .clk, .we(wr_en), .waddr(wr_addr), .wdata(wr_data), .raddr(img_raddr), .rdata(img_rdata)
  );

  // The held pixel must not change while its treatment is in progress.
  assert property (@(posedge clk) disable iff (rst) wa_busy |-> !red.valid);

endmodule
