// checkerboard_tb: self-checking test of the colour generator.
//
// Applies pixel positions to the checkerboard: first the corners and edges
// of the visible area and of the squares (0, 31, 32, 63, 64, 799, 800 by
// 0, 31, 32, 599, 600, 665), then random positions over the whole 1040x666
// raster. For each it checks, one clock later, the colour expected from the
// pattern: inside 800x600, red on squares where (x/32 + y/32) is even and
// blue where it is odd; green never; black outside.
module checkerboard_tb;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic [10:0] xpos = '0;
  logic [9:0]  ypos = '0;
  logic red, green, blue;

  checkerboard dut (.clk(clk), .xpos(xpos), .ypos(ypos), .red(red), .green(green), .blue(blue));

  int checks = 0, failures = 0;
  int n_red = 0, n_blue = 0, n_black = 0;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL: %s", what);
    end
  endtask

  task automatic apply(input int x, input int y);
    bit vis, exp_r, exp_b;
    @(negedge clk);
    xpos = 11'(x);
    ypos = 10'(y);
    @(posedge clk); #1;
    vis   = (x < 800) && (y < 600);
    exp_r = vis && (((x / 32) + (y / 32)) % 2 == 0);
    exp_b = vis && (((x / 32) + (y / 32)) % 2 == 1);
    check(red == exp_r && blue == exp_b && green == 1'b0,
          $sformatf("(%0d,%0d): r%0b g%0b b%0b expected r%0b b%0b", x, y, red, green, blue, exp_r, exp_b));
    if (exp_r) n_red++;
    else if (exp_b) n_blue++;
    else n_black++;
  endtask

  int xs[] = '{0, 1, 31, 32, 33, 63, 64, 95, 96, 767, 768, 798, 799, 800, 801, 855, 856, 1039};
  int ys[] = '{0, 1, 31, 32, 63, 64, 575, 576, 598, 599, 600, 601, 637, 665};

  initial begin
    #1;
    check(!red && !green && !blue, "power-up black");
    foreach (xs[i]) foreach (ys[j]) apply(xs[i], ys[j]);
    repeat (3000) apply($urandom_range(0, 1039), $urandom_range(0, 665));
    check(n_red > 0 && n_blue > 0 && n_black > 0, "all three cases seen");
    $display("red %0d blue %0d black %0d", n_red, n_blue, n_black);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
