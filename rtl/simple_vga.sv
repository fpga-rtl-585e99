// simple_vga: VGA video generator drawing a red and blue checkerboard.
//
// The circuit turns a 50 MHz clock into an 800x600 VGA signal at about
// 72 Hz, one pixel per clock. Three parts work in parallel on the same clock:
//   h_timing     counts the pixels of a line (0..1039) and makes hsync,
//   v_timing     counts the lines of a frame (0..665), advancing on the last
//                pixel of each line, and makes vsync,
//   checkerboard registers one bit each of red, green and blue for the
//                current pixel: 32x32 red and blue squares in the visible
//                area, black elsewhere.
// hsync and vsync are active low. Each colour pin drives the monitor through
// a series resistor on the board that scales 3.3 V to the 0.7 V VGA level,
// so a colour is either off or at full intensity.
//
// Timing: hsync and vsync follow the counters combinationally; the colours
// are registered and so lag the syncs by one pixel clock. The circuit has no
// reset: all registers start at 0 at power-up. The interface (clk, hsync,
// vsync, red, green, blue), the timing numbers and the colour equations are
// those of the original design; its split into three sub-modules and the
// parameters are this design's.
module simple_vga #(
  parameter int unsigned H_VISIBLE    = vga_pkg::H_VISIBLE,
  parameter int unsigned H_SYNC_START = vga_pkg::H_SYNC_START,
  parameter int unsigned H_SYNC_END   = vga_pkg::H_SYNC_END,
  parameter int unsigned H_TOTAL      = vga_pkg::H_TOTAL,
  parameter int unsigned V_VISIBLE    = vga_pkg::V_VISIBLE,
  parameter int unsigned V_SYNC_START = vga_pkg::V_SYNC_START,
  parameter int unsigned V_SYNC_END   = vga_pkg::V_SYNC_END,
  parameter int unsigned V_TOTAL      = vga_pkg::V_TOTAL,
  parameter int unsigned SQUARE_BIT   = vga_pkg::SQUARE_BIT
) (
  input  logic clk,
  output logic hsync,
  output logic vsync,
  output logic red,
  output logic green,
  output logic blue
);

  localparam int unsigned XW = vga_pkg::X_WIDTH;
  localparam int unsigned YW = vga_pkg::Y_WIDTH;

  logic [XW-1:0] xpos;
  logic [YW-1:0] ypos;
  logic          line_end;
  logic          frame_end;

  h_timing #(
    .H_VISIBLE   (H_VISIBLE),
    .H_SYNC_START(H_SYNC_START),
    .H_SYNC_END  (H_SYNC_END),
    .H_TOTAL     (H_TOTAL),
    .X_WIDTH     (XW)
  ) u_h (
    .clk     (clk),
    .xpos    (xpos),
    .line_end(line_end),
    .hsync   (hsync)
  );

  v_timing #(
    .V_VISIBLE   (V_VISIBLE),
    .V_SYNC_START(V_SYNC_START),
    .V_SYNC_END  (V_SYNC_END),
    .V_TOTAL     (V_TOTAL),
    .Y_WIDTH     (YW)
  ) u_v (
    .clk      (clk),
    .line_end (line_end),
    .ypos     (ypos),
    .frame_end(frame_end),
    .vsync    (vsync)
  );

  checkerboard #(
    .H_VISIBLE (H_VISIBLE),
    .V_VISIBLE (V_VISIBLE),
    .SQUARE_BIT(SQUARE_BIT),
    .X_WIDTH   (XW),
    .Y_WIDTH   (YW)
  ) u_colour (
    .clk  (clk),
    .xpos (xpos),
    .ypos (ypos),
    .red  (red),
    .green(green),
    .blue (blue)
  );

  // frame_end is kept for observation in simulation (a frame boundary
  // marker); nothing on the VGA connector needs it.
  logic unused_frame_end;
  assign unused_frame_end = frame_end;

endmodule
