// pixel_reg_tb: self-checking test of the one-bit pixel register.
//
// Drives draw with random values between clock edges and checks after each
// rising edge that pixel equals the draw value sampled at that edge, and
// that pixel does not move between edges.
module pixel_reg_tb;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic draw = 1'b0;
  logic pixel;

  pixel_reg dut (.clk(clk), .draw(draw), .pixel(pixel));

  int checks = 0, failures = 0;
  int ones = 0;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL: %s", what);
    end
  endtask

  initial begin
    logic sampled;
    #1;
    check(pixel == 1'b0, "power-up 0");
    repeat (500) begin
      @(negedge clk);
      draw = 1'($urandom);
      sampled = draw;
      @(posedge clk); #1;
      check(pixel == sampled, "pixel after edge");
      if (pixel) ones++;
      draw = ~draw;       // change draw between edges
      #2;
      check(pixel == sampled, "pixel held between edges");
    end
    check(ones > 0 && ones < 500, "both values seen");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
