// pixel_reg: one-bit clocked register, the smallest example of hardware
// described in an HDL.
//
// At each rising edge of clk, pixel becomes 1 if draw is high and 0
// otherwise, and holds that value until the next edge. pixel therefore shows
// draw delayed by one clock, sampled at the edge. The register starts at 0 at
// power-up (this design's choice; the original example does not say). The
// behaviour on each edge follows the original example.
module pixel_reg (
  input  logic clk,
  input  logic draw,
  output logic pixel
);

  logic pixel_q = 1'b0;

  always_ff @(posedge clk) begin
    pixel_q <= draw;
  end

  assign pixel = pixel_q;

endmodule
