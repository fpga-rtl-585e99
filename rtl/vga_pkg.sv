// vga_pkg: timing constants shared by the SimpleVGA blocks.
//
// The numbers describe an 800x600 picture sent with a 50 MHz pixel clock,
// one pixel per clock. A line is 1040 pixel times: 800 visible, a front
// porch up to 856, a horizontal sync pulse from 856 to 975 and a back porch
// up to 1039. A frame is 666 lines: 600 visible, a front porch up to 637,
// a vertical sync pulse on lines 637 to 642 and a back porch up to 665.
// 50 MHz / (1040 * 666) gives a refresh rate of about 72.2 Hz.
// The colour pattern is a checkerboard of 32x32 pixel squares, selected by
// bit 5 of the pixel and line counters. All of these numbers are the
// original design's; only the grouping into a package is this design's.
package vga_pkg;

  // Horizontal timing, in pixel clocks.
  localparam int unsigned H_VISIBLE    = 800;
  localparam int unsigned H_SYNC_START = 856;
  localparam int unsigned H_SYNC_END   = 976;   // first pixel after the pulse
  localparam int unsigned H_TOTAL      = 1040;

  // Vertical timing, in lines.
  localparam int unsigned V_VISIBLE    = 600;
  localparam int unsigned V_SYNC_START = 637;
  localparam int unsigned V_SYNC_END   = 643;   // first line after the pulse
  localparam int unsigned V_TOTAL      = 666;

  // Counter widths: 11 bits hold 0..2047, 10 bits hold 0..1023.
  localparam int unsigned X_WIDTH = 11;
  localparam int unsigned Y_WIDTH = 10;

  // Counter bit that alternates the squares: 2**5 = 32 pixels per square.
  localparam int unsigned SQUARE_BIT = 5;

endpackage
