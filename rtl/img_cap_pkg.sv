// img_cap_pkg: types and constants shared by the image acquisition core.
//
// Holds the register map of the Avalon-MM slave (word offsets and bit masks),
// the fixed-point colour conversion coefficients and the pixel types that
// travel between the pipeline stages.
//
// From the design source: control GO bit = 0x01, status FRAME_DONE = 0x01,
// WRITE_DONE = 0x02, a 32-bit write_address register, and the YUV coefficients
// written as the decimal coefficients multiplied by 128.  BUSY is placed at
// mask 0x04 (the next free status bit); the continuous-capture bit, the
// current-address and window registers and all word offsets are this design's
// own choices.
package img_cap_pkg;

  // ---------------- Avalon-MM slave register map (word offsets) ------------
  localparam int unsigned REG_ADDR_W   = 3;
  localparam logic [REG_ADDR_W-1:0] REG_CONTROL   = 3'd0;
  localparam logic [REG_ADDR_W-1:0] REG_STATUS    = 3'd1;
  localparam logic [REG_ADDR_W-1:0] REG_WRITE_ADR = 3'd2;
  localparam logic [REG_ADDR_W-1:0] REG_CUR_ADR   = 3'd3;
  localparam logic [REG_ADDR_W-1:0] REG_WIN_X     = 3'd4;
  localparam logic [REG_ADDR_W-1:0] REG_WIN_Y     = 3'd5;
  localparam logic [REG_ADDR_W-1:0] REG_WIN_W     = 3'd6;
  localparam logic [REG_ADDR_W-1:0] REG_WIN_H     = 3'd7;

  // CONTROL bits
  localparam logic [31:0] CMOS_GO_BIT         = 32'h01;
  localparam logic [31:0] CMOS_CONT_BIT       = 32'h02;
  // STATUS bits
  localparam logic [31:0] CMOS_FRAME_DONE_BIT = 32'h01;
  localparam logic [31:0] CMOS_WRITE_DONE_BIT = 32'h02;
  localparam logic [31:0] CMOS_BUSY_BIT       = 32'h04;

  // ---------------- Geometry ------------------------------------------------
  localparam int unsigned COORD_W = 11;  // row/column counters (up to 2047)
  localparam int unsigned FLEN_W  = 20;  // words per frame (up to 1M)

  typedef logic [COORD_W-1:0] coord_t;

  typedef struct packed {
    coord_t x;   // first sensor column of the window
    coord_t y;   // first sensor row of the window
    coord_t w;   // window width in sensor pixels
    coord_t h;   // window height in sensor rows
  } window_t;

  // ---------------- Pixel types ---------------------------------------------
  typedef struct packed {
    logic [7:0] r;
    logic [7:0] g;
    logic [7:0] b;
  } rgb_t;

  typedef struct packed {
    logic [7:0] y;
    logic [7:0] u;
    logic [7:0] v;
  } yuv_t;

  // ---------------- Colour conversion (coefficient x 128, rounded) ----------
  // Y =  0.299 R + 0.587 G + 0.114 B
  // U = -0.169 R - 0.332 G + 0.500 B
  // V =  0.500 R - 0.419 G - 0.0813 B
  localparam int COEF_SHIFT = 7;
  localparam int C_YR =  38, C_YG =  75, C_YB =  15;
  localparam int C_UR = -22, C_UG = -42, C_UB =  64;
  localparam int C_VR =  64, C_VG = -54, C_VB = -10;

endpackage
