// stereo_correction_top: real-time correction of a stereo pair of images.
//
// Two identical correction channels, index 0 for the left camera and 1 for
// the right, run on one principal clock. Each has its own address table,
// correspondents tables (built for its own camera's calibration) and
// corrected-image memory. The loading port is shared: ld_we[c] selects the
// channel written. The corrected images are read at the same address
// img_raddr, with one cycle of latency, on img_rdata[0] and img_rdata[1].
// Duplicating the single-image architecture for the two images follows the
// source; the shared load and read ports are this design's.
module stereo_correction_top
  import rectif_pkg::*;
#(
  parameter int unsigned NL = rectif_pkg::N_L,
  parameter int unsigned NC = rectif_pkg::N_C
) (
  input  logic                        clk,
  input  logic                        rst,
  input  logic [1:0]                  frame_start,
  input  logic [1:0]                  pix_valid,
  input  logic [1:0][PIX_W-1:0]       grey,
  input  logic [1:0]                  ld_we,
  input  ld_sel_e                     ld_sel,
  input  logic [ADDR_W-1:0]           ld_addr,
  input  logic [WORD_W-1:0]           ld_data,
  input  logic [ADDR_W-1:0]           img_raddr,
  output logic [1:0][PIX_W-1:0]       img_rdata,
  output logic [1:0]                  sample,
  output logic [1:0]                  wr_en,
  output logic [1:0][ADDR_W-1:0]      wr_addr,
  output logic [1:0][PIX_W-1:0]       wr_data
);

  for (genvar c = 0; c < 2; c++) begin : g_channel
    correction_channel #(.NL(NL), .NC(NC)) u_channel (
      .clk, .rst,
      .frame_start(frame_start[c]), .pix_valid(pix_valid[c]), .grey(grey[c]),
      .ld_we(ld_we[c]), .ld_sel, .ld_addr, .ld_data,
      .img_raddr, .img_rdata(img_rdata[c]),
      .sample(sample[c]), .wr_en(wr_en[c]), .wr_addr(wr_addr[c]), .wr_data(wr_data[c])
    );
  end

endmodule
