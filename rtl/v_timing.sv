// v_timing: vertical line counter and vertical sync of the VGA generator.
//
// ypos counts the lines of a frame, 0 to V_TOTAL-1, and wraps to 0. It moves
// on only at the rising clk edge where line_end is high, the last pixel of a
// line, so it changes together with the horizontal counter's wrap to 0.
// vsync is low while ypos lies in [V_SYNC_START, V_SYNC_END) and high
// otherwise (negative polarity). frame_end is high on the last pixel of the
// last line of the frame.
//
// Timing: ypos is a register; vsync and frame_end are combinational. The
// counter powers up at 0 through its declaration's initial value; there is no
// reset input. The counting rule and the sync comparison follow the original
// design; the frame_end output is this design's addition.
module v_timing #(
  parameter int unsigned V_VISIBLE    = vga_pkg::V_VISIBLE,
  parameter int unsigned V_SYNC_START = vga_pkg::V_SYNC_START,
  parameter int unsigned V_SYNC_END   = vga_pkg::V_SYNC_END,
  parameter int unsigned V_TOTAL      = vga_pkg::V_TOTAL,
  parameter int unsigned Y_WIDTH      = vga_pkg::Y_WIDTH
) (
  input  logic               clk,
  input  logic               line_end,
  output logic [Y_WIDTH-1:0] ypos,
  output logic               frame_end,
  output logic               vsync
);

  localparam logic [Y_WIDTH-1:0] YLAST  = Y_WIDTH'(V_TOTAL - 1);
  localparam logic [Y_WIDTH-1:0] YSYNC0 = Y_WIDTH'(V_SYNC_START);
  localparam logic [Y_WIDTH-1:0] YSYNC1 = Y_WIDTH'(V_SYNC_END);

  logic [Y_WIDTH-1:0] count = '0;

  always_ff @(posedge clk) begin
    if (line_end) begin
      if (count == YLAST) count <= '0;
      else                count <= count + 1'b1;
    end
  end

  assign ypos      = count;
  assign frame_end = line_end && (count == YLAST);
  assign vsync     = (count < YSYNC0) || (count >= YSYNC1);

  initial begin
    assert (V_TOTAL <= (1 << Y_WIDTH)) else $error("V_TOTAL does not fit in Y_WIDTH bits");
    assert (V_VISIBLE <= V_SYNC_START && V_SYNC_START < V_SYNC_END && V_SYNC_END <= V_TOTAL)
      else $error("inconsistent vertical timing");
  end

  a_ypos_range: assert property (@(posedge clk) count <= YLAST);

endmodule
