// rlgcd_pkg: sizes shared by the reversible-logic image cipher (RLGCD).
//
// An image is a 128 x 128 array of 8-bit grey-scale pixels, stored and
// processed as one linear stream of 16,384 words. The key comes from a 4-bit
// LFSR. The watermark constants describe the LSB scheme: every fifth pixel
// carries two watermark bits in its bits 2 and 3; the first eight carriers
// hold a 16-bit character count, the rest hold 8-bit characters, so at most
// 817 characters fit. These numbers are the document's; the packaging into a
// package is this design's own.
package rlgcd_pkg;

  localparam int unsigned PIXEL_W    = 8;
  localparam int unsigned KEY_W      = 4;
  localparam int unsigned IMG_W      = 128;
  localparam int unsigned IMG_H      = 128;
  localparam int unsigned IMG_DEPTH  = IMG_W * IMG_H;        // 16,384 pixels
  localparam int unsigned ADDR_W     = $clog2(IMG_DEPTH);     // 14 bits

  localparam int unsigned WM_GAP        = 5;                  // carrier pixel stride
  localparam int unsigned WM_LEN_PIXELS = 8;                  // carriers holding the length
  localparam int unsigned WM_LEN_W      = 2 * WM_LEN_PIXELS;  // 16-bit length field
  localparam int unsigned WM_CHAR_W     = 8;
  localparam int unsigned WM_PIX_PER_CHAR = WM_CHAR_W / 2;    // 4 carriers per character
  // (16384 / 5 - 8) * 2 / 8 = 817
  localparam int unsigned WM_MAX_CHARS  =
      ((IMG_DEPTH / WM_GAP) - WM_LEN_PIXELS) * 2 / WM_CHAR_W;
  localparam int unsigned WM_ADDR_W     = $clog2(WM_MAX_CHARS);

  typedef logic [PIXEL_W-1:0] pixel_t;
  typedef logic [KEY_W-1:0]   key_t;

endpackage
