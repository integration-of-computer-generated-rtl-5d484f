// Shared types and timing constants of the video overlay frame buffer.
//
// The frame buffer stores one bit per colour (eight colours), so a pixel is a
// packed red/green/blue triple. The default numbers below are those of the
// PRO-350 / RS-170 system: a 35.8 MHz master clock from the MC1378 overlay IC,
// divided by 2275 for the RS-170 line and down to a 15.4 MHz pixel rate, a
// 10.9 us horizontal sync, a 12 us vertical-blank threshold, a write every
// eighth RGB field, and an overlay starting at line 121. Memory is organised
// as 4K x 4 chips addressed by {line[7:0], pixel_block[7:0]}.
package sph_pkg;

  typedef struct packed {
    logic r;
    logic g;
    logic b;
  } rgb_t;

  localparam rgb_t RGB_BLACK = '{r: 1'b0, g: 1'b0, b: 1'b0};

  // Master clock periods per RS-170 line (35.8 MHz / 2275 = 15.74 kHz).
  localparam int unsigned H_DIV_DEFAULT        = 2275;
  // Horizontal sync width: 10.9 us at 35.8 MHz.
  localparam int unsigned HSYNC_WIDTH_DEFAULT  = 390;
  // Pixel rate as a fraction of the master clock: 15.4 / 35.8.
  localparam int unsigned PIX_NUM_DEFAULT      = 154;
  localparam int unsigned PIX_DEN_DEFAULT      = 358;
  // Vertical-blank threshold: a sync pulse high for 12 us (430 clocks).
  localparam int unsigned VBLANK_MIN_DEFAULT   = 430;
  // Field count that selects the write field (counter bits ANDed: 3'b111).
  localparam int unsigned FIELD_BITS_DEFAULT   = 3;
  // First line shown from / written to the video memory.
  localparam int unsigned OVERLAY_LINE_DEFAULT = 121;
  // 4K x 4 chips per colour (see the memory notes in the README).
  localparam int unsigned NUM_BANKS_DEFAULT    = 8;

endpackage
