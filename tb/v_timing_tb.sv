// v_timing_tb: self-checking test of the vertical counter and sync.
//
// Drives line_end with pulses at random spacing (1 to 4 clocks, sometimes
// back to back) instead of a full 1040-clock line, so that two whole frames
// of 666 lines pass quickly. A line counter in the testbench, advanced on
// the same pulses, gives the expected ypos; each clock the test checks ypos,
// vsync (low on lines 637 to 642) and frame_end, and at the end the number
// of vsync pulses and their length in lines.
module v_timing_tb;
  localparam int V_TOTAL = 666;
  localparam int V_SYNC_START = 637;
  localparam int V_SYNC_END = 643;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic line_end = 1'b0;
  logic [9:0] ypos;
  logic frame_end, vsync;

  v_timing dut (.clk(clk), .line_end(line_end), .ypos(ypos), .frame_end(frame_end), .vsync(vsync));

  int checks = 0, failures = 0;
  int exp_y = 0;
  int lines = 0;
  int vsync_falls = 0, frames = 0, low_lines = 0;
  logic vsync_d = 1'b1;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL line %0d: %s", lines, what);
    end
  endtask

  initial begin
    int gap;
    #1;
    check(ypos == 0 && vsync && !frame_end, "power-up state");
    while (lines < 2 * V_TOTAL + 5) begin
      gap = $urandom_range(0, 3);
      repeat (gap) begin
        @(negedge clk);
        line_end = 1'b0;
        @(posedge clk); #1;
        check(ypos == 10'(exp_y), "ypos held without line_end");
      end
      @(negedge clk);
      line_end = 1'b1;
      #1;
      check(frame_end == (exp_y == V_TOTAL - 1), "frame_end");
      if (frame_end) frames++;
      if (!vsync) low_lines++;
      @(posedge clk); #1;
      exp_y = (exp_y + 1) % V_TOTAL;
      lines++;
      check(ypos == 10'(exp_y), $sformatf("ypos=%0d expected %0d", ypos, exp_y));
      check(vsync == !(exp_y >= V_SYNC_START && exp_y < V_SYNC_END), "vsync level");
      if (vsync_d && !vsync) vsync_falls++;
      vsync_d = vsync;
    end
    @(negedge clk);
    line_end = 1'b0;
    check(frames == 2, $sformatf("%0d frame ends, expected 2", frames));
    check(vsync_falls == 2, $sformatf("%0d vsync pulses, expected 2", vsync_falls));
    check(low_lines == 2 * (V_SYNC_END - V_SYNC_START), $sformatf("vsync low for %0d lines", low_lines));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
