// simple_vga_tb: self-checking test of the VGA generator on a small raster.
//
// The generator is built with a reduced timing (56 x 26 clocks, 40 x 20
// visible, squares of 4 pixels) so that three whole frames take under 5000
// clocks; the full 1040 x 666 timing is exercised by the top-level test.
// From the number of clocks since power-up the testbench computes the pixel
// position (x = n mod 56, y = (n div 56) mod 26) and from it the expected
// hsync and vsync, and, one clock later, the expected colours. It checks all
// five outputs every clock, and at the end the number of hsync and vsync
// pulses and the number of red, blue and black pixels per frame.
module simple_vga_tb;
  localparam int HV = 40, HS0 = 44, HS1 = 50, HT = 56;
  localparam int VV = 20, VS0 = 22, VS1 = 24, VT = 26;
  localparam int SB = 2;
  localparam int FRAMES = 3;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic hsync, vsync, red, green, blue;

  simple_vga #(
    .H_VISIBLE(HV), .H_SYNC_START(HS0), .H_SYNC_END(HS1), .H_TOTAL(HT),
    .V_VISIBLE(VV), .V_SYNC_START(VS0), .V_SYNC_END(VS1), .V_TOTAL(VT),
    .SQUARE_BIT(SB)
  ) dut (.clk(clk), .hsync(hsync), .vsync(vsync), .red(red), .green(green), .blue(blue));

  int checks = 0, failures = 0;
  int n = 0;
  int h_pulses = 0, v_pulses = 0, n_red = 0, n_blue = 0, n_black = 0;
  logic hs_d = 1'b1, vs_d = 1'b1;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL clock %0d: %s", n, what);
    end
  endtask

  initial begin
    int x, y, px, py;
    bit vis, er, eb;
    #1;
    check(hsync && vsync && !red && !green && !blue, "power-up state");
    repeat (FRAMES * HT * VT) begin
      @(posedge clk); #1;
      n++;
      x = n % HT;        y = (n / HT) % VT;
      px = (n - 1) % HT; py = ((n - 1) / HT) % VT;
      vis = (px < HV) && (py < VV);
      er = vis && ((px / (1 << SB) + py / (1 << SB)) % 2 == 0);
      eb = vis && ((px / (1 << SB) + py / (1 << SB)) % 2 == 1);
      check(hsync == !(x >= HS0 && x < HS1), $sformatf("hsync at x=%0d", x));
      check(vsync == !(y >= VS0 && y < VS1), $sformatf("vsync at y=%0d", y));
      check(red == er && blue == eb && !green, $sformatf("colour of (%0d,%0d)", px, py));
      if (hs_d && !hsync) h_pulses++;
      if (vs_d && !vsync) v_pulses++;
      hs_d = hsync; vs_d = vsync;
      if (red) n_red++; else if (blue) n_blue++; else n_black++;
    end
    check(h_pulses == FRAMES * VT, $sformatf("%0d hsync pulses", h_pulses));
    check(v_pulses == FRAMES, $sformatf("%0d vsync pulses", v_pulses));
    // 40x20 visible with 4-pixel squares: 10x5 squares, 25 red and 25 blue.
    check(n_red == FRAMES * 25 * 16, $sformatf("%0d red pixels", n_red));
    check(n_blue == FRAMES * 25 * 16, $sformatf("%0d blue pixels", n_blue));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (FRAMES * HT * VT + 100) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
