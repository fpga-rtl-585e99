// fpga_examples_top: the three example circuits side by side.
//
// The circuits are independent and share only the 50 MHz board clock:
//   simple_vga        VGA generator (clk -> hsync, vsync, red, green, blue),
//   or_xor_schematic  combinational x = (a | b) ^ (c | d),
//   pixel_reg         clocked register, pixel <= draw at each rising clk.
// Each keeps its own pins. The VGA colour pins are meant to reach the VGA
// connector through 270 ohm series resistors, which are board parts and not
// logic. Timing is that of each sub-module. Putting the three examples in
// one top level is this design's choice, so that they can be built and
// simulated together; the VGA timing parameters keep the original numbers.
module fpga_examples_top #(
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
  // VGA generator
  output logic hsync,
  output logic vsync,
  output logic red,
  output logic green,
  output logic blue,
  // gate-level example
  input  logic a,
  input  logic b,
  input  logic c,
  input  logic d,
  output logic x,
  // register example
  input  logic draw,
  output logic pixel
);

  simple_vga #(
    .H_VISIBLE   (H_VISIBLE),
    .H_SYNC_START(H_SYNC_START),
    .H_SYNC_END  (H_SYNC_END),
    .H_TOTAL     (H_TOTAL),
    .V_VISIBLE   (V_VISIBLE),
    .V_SYNC_START(V_SYNC_START),
    .V_SYNC_END  (V_SYNC_END),
    .V_TOTAL     (V_TOTAL),
    .SQUARE_BIT  (SQUARE_BIT)
  ) u_vga (
    .clk  (clk),
    .hsync(hsync),
    .vsync(vsync),
    .red  (red),
    .green(green),
    .blue (blue)
  );

  or_xor_schematic u_gates (
    .a(a),
    .b(b),
    .c(c),
    .d(d),
    .x(x)
  );

  pixel_reg u_pixel (
    .clk  (clk),
    .draw (draw),
    .pixel(pixel)
  );

endmodule
