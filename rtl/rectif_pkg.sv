// rectif_pkg: shared constants and types of the real-time stereo image
// correction pipeline.
//
// The camera delivers an N_L x N_C image, one pixel per principal clock.
// One pixel of every F = F_L*F_C is retained (non-regular sampling), giving a
// reduced image of H_RED x W_RED pixels. Each retained ("distorted") pixel has
// a 16-bit word in the address table: bit 15 says whether the pixel is active,
// bits 13..0 point at its up to three correspondents, each a 16-bit word of
// two 8-bit sign-magnitude displacements. Reduction factors, the 15-bit table
// address, the 16-bit table words, the 8-bit displacements and 8-bit corrected
// coordinates follow the source architecture; the image size 656 x 492 and the
// 8-bit grey value are this design's choice (656*492/16 = 20172, the size of
// the address table).
package rectif_pkg;

  localparam int unsigned N_L     = 656;          // lines of the camera image
  localparam int unsigned N_C     = 492;          // columns of the camera image
  localparam int unsigned F_L     = 4;            // line reduction factor
  localparam int unsigned F_C     = 4;            // column reduction factor
  localparam int unsigned F       = F_L * F_C;    // total reduction factor
  localparam int unsigned H_RED   = N_L / F_L;    // reduced lines (164)
  localparam int unsigned W_RED   = N_C / F_C;    // reduced columns (123)

  localparam int unsigned LINE_W  = 10;           // line counter width
  localparam int unsigned COL_W   = 9;            // column counter width
  localparam int unsigned PIX_W   = 8;            // grey value width
  localparam int unsigned COORD_W = 8;            // reduced / corrected coordinate
  localparam int unsigned ADDR_W  = 15;           // address-table and image address
  localparam int unsigned WORD_W  = 16;           // table word width
  localparam int unsigned CADDR_W = 14;           // correspondents table address
  localparam int unsigned N_CORR  = 3;            // correspondents per pixel
  localparam int unsigned DEPTH_G = 16384;        // address-table RAM "G"
  localparam int unsigned DEPTH_P = 4096;         // address-table RAM "P"
  localparam int unsigned DEPTH_C = 16384;        // each correspondents table
  localparam int unsigned IMG_DEPTH = H_RED * W_RED;  // corrected image (20172)

  // Address-table word: one active bit, one spare, the correspondents address.
  typedef struct packed {
    logic               active;
    logic               spare;
    logic [CADDR_W-1:0] corr_addr;
  } addr_word_t;

  // Sign-magnitude displacement: bit 7 set means negative.
  typedef struct packed {
    logic       neg;
    logic [6:0] mag;
  } disp_t;

  // Correspondent word: delta_u in the upper byte, delta_v in the lower byte.
  typedef struct packed {
    disp_t du;
    disp_t dv;
  } corr_word_t;

  // A retained pixel as held by the window detector's blockers.
  typedef struct packed {
    logic               valid;   // one-cycle strobe when newly loaded
    logic [COORD_W-1:0] u_red;
    logic [COORD_W-1:0] v_red;
    logic [PIX_W-1:0]   grey;
    logic [ADDR_W-1:0]  index;
  } red_pix_t;

  // Table selectors of the loading port.
  typedef enum logic [1:0] {
    LD_ADDR_TABLE = 2'd0,
    LD_MEM1       = 2'd1,
    LD_MEM2       = 2'd2,
    LD_MEM3       = 2'd3
  } ld_sel_e;

endpackage
