// lcd_pkg: constants shared by the 260k-colour TFT LCD source/gate driver logic.
//
// The panel is 176 pixels x 3 sub-pixels (528 source outputs, S1..S528) by 228 gate
// lines (G0..G227). Each pixel is 18 bits (6 bits each of R, G and B, i.e. 2^18 = 262,144
// "260k" colours). The graphic memory therefore holds 176 x 228 x 18 = 722,304 bits and is
// split into 16 macro-blocks. Those numbers follow the chip described; the pixel word
// layout {R[5:0],G[5:0],B[5:0]} and the address widths are this design's choice.
package lcd_pkg;
  localparam int unsigned COLS      = 176;  // pixels per gate line
  localparam int unsigned ROWS      = 228;  // gate lines
  localparam int unsigned PIX_BITS  = 18;   // bits per pixel (6 per colour)
  localparam int unsigned MACROS    = 16;   // memory macro-blocks

  typedef logic [PIX_BITS-1:0] pixel_t;
endpackage
