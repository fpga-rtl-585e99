// checkerboard: colour generator of the VGA generator, a red and blue
// checkerboard inside the visible area and black around it.
//
// At each rising clk edge the block registers the colour of pixel
// (xpos, ypos). Inside the visible area (xpos < H_VISIBLE and
// ypos < V_VISIBLE) the square is chosen by bit SQUARE_BIT of each counter:
// red = ~xpos[SQUARE_BIT] ^ ypos[SQUARE_BIT], blue = its complement, so the
// top-left square is red and squares of 2**SQUARE_BIT pixels alternate in
// both directions. Green is never lit. Outside the visible area all three
// colours are 0, as VGA requires during blanking.
//
// Timing: the outputs are registers, so they show the colour of the pixel
// the counters held one clock earlier. The syncs of h_timing and v_timing are
// combinational, so the picture lags the syncs by one pixel; the original
// design is built this way and it is kept. The registers power up at 0.
// The equations and the one-clock register follow the original design.
module checkerboard #(
  parameter int unsigned H_VISIBLE  = vga_pkg::H_VISIBLE,
  parameter int unsigned V_VISIBLE  = vga_pkg::V_VISIBLE,
  parameter int unsigned SQUARE_BIT = vga_pkg::SQUARE_BIT,
  parameter int unsigned X_WIDTH    = vga_pkg::X_WIDTH,
  parameter int unsigned Y_WIDTH    = vga_pkg::Y_WIDTH
) (
  input  logic               clk,
  input  logic [X_WIDTH-1:0] xpos,
  input  logic [Y_WIDTH-1:0] ypos,
  output logic               red,
  output logic               green,
  output logic               blue
);

  localparam logic [X_WIDTH-1:0] XVIS = X_WIDTH'(H_VISIBLE);
  localparam logic [Y_WIDTH-1:0] YVIS = Y_WIDTH'(V_VISIBLE);

  logic visible;
  logic square;   // 0: red square, 1: blue square

  assign visible = (xpos < XVIS) && (ypos < YVIS);
  assign square  = xpos[SQUARE_BIT] ^ ypos[SQUARE_BIT];

  logic red_q = 1'b0, green_q = 1'b0, blue_q = 1'b0;

  always_ff @(posedge clk) begin
    if (visible) begin
      red_q   <= ~square;
      green_q <= 1'b0;
      blue_q  <= square;
    end else begin
      red_q   <= 1'b0;
      green_q <= 1'b0;
      blue_q  <= 1'b0;
    end
  end

  assign red   = red_q;
  assign green = green_q;
  assign blue  = blue_q;

  initial begin
    assert (SQUARE_BIT < X_WIDTH && SQUARE_BIT < Y_WIDTH) else $error("SQUARE_BIT outside the counters");
  end

endmodule
