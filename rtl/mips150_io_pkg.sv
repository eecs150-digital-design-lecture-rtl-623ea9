// Shared constants and types of the MIPS150 I/O subsystem (video frame
// buffer, line-drawing engine, SRAM port and Ethernet packet buffers).
//
// The frame buffer is 800 x 600 pixels. The CPU addresses it as a
// 1024 x 1024 grid of 32-bit words starting at 0x8000_0000: address bits
// [21:12] are the row Y and bits [11:2] the column X, so one store word is
// one pixel. In the external SRAM the pixels are packed in pixel-number
// order, PN = X + 800*Y, two 16-bit pixels per 32-bit SRAM word.
// The line engine's registers sit at 0x8040_0040 .. 0x8040_0064. The
// Ethernet buffer addresses (0x8050_0000 receive, 0x8050_1000 transmit)
// and the 16-bit pixel slot are this design's own choices.
package mips150_io_pkg;

  // Screen and frame buffer geometry
  localparam int unsigned SCREEN_W    = 800;
  localparam int unsigned SCREEN_H    = 600;
  localparam int unsigned COORD_W     = 10;   // Y[9:0], X[9:0]
  localparam int unsigned PIXEL_W     = 16;   // two pixels per SRAM word
  localparam int unsigned FRAME_WORDS = SCREEN_W * SCREEN_H / 2;  // 240000

  // External SRAM word and address
  localparam int unsigned SRAM_AW = 19;
  localparam int unsigned SRAM_DW = 32;
  localparam int unsigned SRAM_BW = SRAM_DW / 8;

  // CPU memory map
  localparam logic [31:0] FB_BASE      = 32'h8000_0000;  // 4 MB window
  localparam logic [31:0] LE_BASE      = 32'h8040_0000;  // line engine page
  localparam logic [31:0] ETH_RX_BASE  = 32'h8050_0000;
  localparam logic [31:0] ETH_TX_BASE  = 32'h8050_1000;

  // Line engine register offsets within LE_BASE
  localparam logic [7:0] LE_X0      = 8'h40;  // non-trigger
  localparam logic [7:0] LE_Y0      = 8'h44;
  localparam logic [7:0] LE_X1      = 8'h48;
  localparam logic [7:0] LE_Y1      = 8'h4C;
  localparam logic [7:0] LE_X0_GO   = 8'h50;  // trigger
  localparam logic [7:0] LE_Y0_GO   = 8'h54;
  localparam logic [7:0] LE_X1_GO   = 8'h58;
  localparam logic [7:0] LE_Y1_GO   = 8'h5C;
  localparam logic [7:0] LE_COLOR   = 8'h60;
  localparam logic [7:0] LE_READY   = 8'h64;  // read-only

  typedef logic [COORD_W-1:0] coord_t;
  typedef logic [PIXEL_W-1:0] pixel_t;

  // One pixel write on its way to the frame buffer
  typedef struct packed {
    coord_t y;
    coord_t x;
    pixel_t color;
  } fb_write_t;

endpackage
