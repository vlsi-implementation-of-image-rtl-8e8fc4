// rlgcd_pkg: types and sizes shared by the reversible-logic image cipher.
//
// A pixel is one 8-bit grey (or colour-plane) value, split into an upper and
// a lower nibble that each pass through their own chain of reversible gates.
// The key is the 4-bit state of a linear feedback shift register; the same
// key is applied to both nibbles. The 8-bit pixel, 4-bit key and 128x128
// image follow the source design; nothing here is timing related.
package rlgcd_pkg;
  localparam int unsigned PIXEL_W = 8;
  localparam int unsigned KEY_W   = 4;
  localparam int unsigned NIB_W   = PIXEL_W / 2;
  localparam int unsigned IMG_ROWS = 128;
  localparam int unsigned IMG_COLS = 128;
  localparam int unsigned IMG_PIXELS = IMG_ROWS * IMG_COLS;

  typedef logic [PIXEL_W-1:0] pixel_t;
  typedef logic [KEY_W-1:0]   key_t;
  typedef logic [NIB_W-1:0]   nibble_t;
endpackage
