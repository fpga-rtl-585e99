// fpga_examples_top_tb: end-to-end test of the three examples at full size.
//
// The top is built with its default parameters, i.e. the real 800x600
// timing at one pixel per clock (1040 x 666 clocks per frame), and runs for
// one complete frame plus a few lines. Every clock the testbench checks the
// VGA outputs against a position model (x = n mod 1040, y = n div 1040 mod
// 666, colours delayed one clock), and it reproduces the reference hsync log
// of the original design: in a time unit of half a clock with the first
// rising edge at 1, the k-th hsync falling edge comes at 2*(856 +
// 1040*(k-1)) - 1, i.e. 1711, 3791, 5871, ..., 1384911 for k = 666.
// Meanwhile it drives the gate example and the pixel register with random
// inputs and checks them. Each mechanism is counted and must be seen at
// least once: hsync pulses, vsync pulses, line wraps, frame wraps, red,
// blue and blanked pixels, both values of the gate output and the register.
module fpga_examples_top_tb;
  localparam int HT = 1040, VT = 666;

  // Starts high so that the first edge is a falling one: the loop below
  // drives the inputs on a falling edge and samples after the rising edge.
  logic clk = 1'b1;
  always #5 clk = ~clk;

  logic hsync, vsync, red, green, blue;
  logic a = 0, b = 0, c = 0, d = 0, x;
  logic draw = 0, pixel;

  fpga_examples_top dut (
    .clk(clk), .hsync(hsync), .vsync(vsync), .red(red), .green(green), .blue(blue),
    .a(a), .b(b), .c(c), .d(d), .x(x), .draw(draw), .pixel(pixel)
  );

  int checks = 0, failures = 0;
  int n = 0;
  int h_falls = 0, v_falls = 0, line_wraps = 0, frame_wraps = 0;
  int n_red = 0, n_blue = 0, n_black_vis = 0, n_blank = 0;
  int x_ones = 0, x_zeros = 0, pix_ones = 0, pix_zeros = 0;
  int h_time[$];
  logic hs_d = 1'b1, vs_d = 1'b1;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL clock %0d: %s r%0b b%0b", n, what, red, blue);
    end
  endtask

  initial begin
    int xx, yy, px, py;
    bit vis, er, eb, draw_s, exp_x;
    #1;
    check(hsync && vsync && !red && !green && !blue && !pixel, "power-up state");
    repeat (HT * VT + 3 * HT) begin
      @(negedge clk);
      {a, b, c, d} = 4'($urandom);
      draw = 1'($urandom);
      draw_s = draw;
      #1;
      exp_x = ((a | b) != (c | d));
      check(x == exp_x, "gate output");
      if (x) x_ones++; else x_zeros++;
      @(posedge clk); #1;
      n++;
      check(pixel == draw_s, "pixel register");
      if (pixel) pix_ones++; else pix_zeros++;
      xx = n % HT;        yy = (n / HT) % VT;
      px = (n - 1) % HT;  py = ((n - 1) / HT) % VT;
      vis = (px < 800) && (py < 600);
      er = vis && ((px / 32 + py / 32) % 2 == 0);
      eb = vis && ((px / 32 + py / 32) % 2 == 1);
      check(hsync == !(xx >= 856 && xx < 976), "hsync");
      check(vsync == !(yy >= 637 && yy < 643), "vsync");
      check(red == er && blue == eb && !green, $sformatf("colour of (%0d,%0d)", px, py));
      if (hs_d && !hsync) begin
        h_falls++;
        h_time.push_back(2 * n - 1);
      end
      if (vs_d && !vsync) v_falls++;
      hs_d = hsync; vs_d = vsync;
      if (xx == 0) line_wraps++;
      if (xx == 0 && yy == 0) frame_wraps++;
      if (red) n_red++;
      else if (blue) n_blue++;
      else if (vis) n_black_vis++;
      else n_blank++;
    end
    // Reference log of the original design, in half-clock units.
    if (h_time.size() >= 666) begin
      check(h_time[0] == 1711, $sformatf("hsync 1 at %0d", h_time[0]));
      check(h_time[1] == 3791, $sformatf("hsync 2 at %0d", h_time[1]));
      check(h_time[2] == 5871, $sformatf("hsync 3 at %0d", h_time[2]));
      check(h_time[663] == 1380751, $sformatf("hsync 664 at %0d", h_time[663]));
      check(h_time[664] == 1382831, $sformatf("hsync 665 at %0d", h_time[664]));
      check(h_time[665] == 1384911, $sformatf("hsync 666 at %0d", h_time[665]));
      // The reference run stops at 1385280 = 2 * 1040 * 666: one frame.
      check(h_time[665] < 1385280 && h_time[666] > 1385280, "666 hsync pulses in one frame");
    end else check(0, $sformatf("only %0d hsync pulses", h_time.size()));
    // One frame of 800x600 visible pixels plus the 800 visible pixels of
    // each of the three lines run into the next frame.
    check(n_red + n_blue == 800 * 600 + 3 * 800, $sformatf("lit pixels %0d", n_red + n_blue));
    check(n_black_vis == 0, "no black pixel in the visible area");
    // Mechanisms seen.
    check(h_falls > 0, "hsync pulse seen");
    check(v_falls == 1, $sformatf("%0d vsync pulses", v_falls));
    check(line_wraps == VT + 3, $sformatf("%0d line wraps", line_wraps));
    check(frame_wraps == 1, "frame wrap seen");
    check(n_red > 0 && n_blue > 0 && n_blank > 0, "red, blue and blanking seen");
    check(x_ones > 0 && x_zeros > 0, "gate output both values");
    check(pix_ones > 0 && pix_zeros > 0, "register both values");
    $display("hsync %0d vsync %0d lines %0d frames %0d red %0d blue %0d blank %0d",
             h_falls, v_falls, line_wraps, frame_wraps, n_red, n_blue, n_blank);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (HT * VT + 4 * HT) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
