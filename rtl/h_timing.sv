// h_timing: horizontal pixel counter and horizontal sync of the VGA generator.
//
// xpos counts the pixel clocks of a line, 0 to H_TOTAL-1, and wraps to 0.
// hsync is low while xpos lies in [H_SYNC_START, H_SYNC_END) and high
// otherwise (negative sync polarity). line_end is high during the last pixel
// of a line, xpos == H_TOTAL-1; it is the enable of the vertical counter.
//
// Timing: xpos is a register that changes on every rising clk edge; hsync and
// line_end are combinational from it, so they change with xpos. The counter
// starts from 0 at power-up through its declaration's initial value, as an
// FPGA register does; there is no reset input. The counting rule and the sync
// comparison follow the original design; bringing the end-of-line compare out
// as line_end, instead of repeating it in the vertical counter, is this
// design's choice and does not change any output.
module h_timing #(
  parameter int unsigned H_VISIBLE    = vga_pkg::H_VISIBLE,
  parameter int unsigned H_SYNC_START = vga_pkg::H_SYNC_START,
  parameter int unsigned H_SYNC_END   = vga_pkg::H_SYNC_END,
  parameter int unsigned H_TOTAL      = vga_pkg::H_TOTAL,
  parameter int unsigned X_WIDTH      = vga_pkg::X_WIDTH
) (
  input  logic               clk,
  output logic [X_WIDTH-1:0] xpos,
  output logic               line_end,
  output logic               hsync
);

  localparam logic [X_WIDTH-1:0] XLAST  = X_WIDTH'(H_TOTAL - 1);
  localparam logic [X_WIDTH-1:0] XSYNC0 = X_WIDTH'(H_SYNC_START);
  localparam logic [X_WIDTH-1:0] XSYNC1 = X_WIDTH'(H_SYNC_END);

  logic [X_WIDTH-1:0] count = '0;

  always_ff @(posedge clk) begin
    if (count == XLAST) count <= '0;
    else                count <= count + 1'b1;
  end

  assign xpos     = count;
  assign line_end = (count == XLAST);
  assign hsync    = (count < XSYNC0) || (count >= XSYNC1);

  // The counter never leaves its range, and the sync pulse must fit in the
  // blanking part of the line.
  initial begin
    assert (H_TOTAL <= (1 << X_WIDTH)) else $error("H_TOTAL does not fit in X_WIDTH bits");
    assert (H_VISIBLE <= H_SYNC_START && H_SYNC_START < H_SYNC_END && H_SYNC_END <= H_TOTAL)
      else $error("inconsistent horizontal timing");
  end

  a_xpos_range: assert property (@(posedge clk) count <= XLAST);

endmodule
