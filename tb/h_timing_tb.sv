// h_timing_tb: self-checking test of the horizontal counter and sync.
//
// Runs h_timing at its default 800x600 timing for three full lines and a
// bit. A cycle counter in the testbench gives the expected pixel position,
// cycle mod 1040; every clock it checks xpos, line_end and hsync against
// that, then checks the period of the sync pulse (1040 clocks), its width
// (976 - 856 = 120 clocks) and that the first falling edge comes after 856
// clocks. A watchdog stops the run if it hangs.
module h_timing_tb;
  localparam int H_TOTAL = 1040;
  localparam int H_SYNC_START = 856;
  localparam int H_SYNC_END = 976;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic [10:0] xpos;
  logic line_end, hsync;

  h_timing dut (.clk(clk), .xpos(xpos), .line_end(line_end), .hsync(hsync));

  int checks = 0, failures = 0;
  int cycle = 0;                 // rising edges seen so far
  int fall_cycle[$];
  int rise_cycle[$];
  logic hsync_d = 1'b1;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL cycle %0d: %s", cycle, what);
    end
  endtask

  always @(posedge clk) begin
    #1;
    cycle++;
    begin
      int exp_x;
      exp_x = cycle % H_TOTAL;
      check(xpos == 11'(exp_x), $sformatf("xpos=%0d expected %0d", xpos, exp_x));
      check(line_end == (exp_x == H_TOTAL - 1), "line_end");
      check(hsync == !(exp_x >= H_SYNC_START && exp_x < H_SYNC_END), "hsync level");
    end
    if (hsync_d && !hsync) fall_cycle.push_back(cycle);
    if (!hsync_d && hsync) rise_cycle.push_back(cycle);
    hsync_d = hsync;
  end

  initial begin
    #1;
    check(xpos == 0 && hsync == 1'b1 && !line_end, "power-up state");
    wait (cycle == 3 * H_TOTAL + 10);
    check(fall_cycle.size() == 3, $sformatf("%0d sync pulses, expected 3", fall_cycle.size()));
    check(rise_cycle.size() == 3, "sync pulse ends");
    if (fall_cycle.size() == 3 && rise_cycle.size() == 3) begin
      check(fall_cycle[0] == H_SYNC_START, $sformatf("first pulse at cycle %0d", fall_cycle[0]));
      for (int i = 1; i < 3; i++)
        check(fall_cycle[i] - fall_cycle[i-1] == H_TOTAL, "line period");
      for (int i = 0; i < 3; i++)
        check(rise_cycle[i] - fall_cycle[i] == H_SYNC_END - H_SYNC_START, "pulse width");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10 * H_TOTAL) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
