// or_xor_schematic_tb: exhaustive test of x = (a | b) ^ (c | d).
//
// Applies all 16 input combinations and compares x with a truth table
// worked out in the testbench: x is 1 exactly when one of the pairs (a, b)
// and (c, d) has a 1 in it and the other has none.
module or_xor_schematic_tb;
  logic a, b, c, d, x;

  or_xor_schematic dut (.a(a), .b(b), .c(c), .d(d), .x(x));

  int checks = 0, failures = 0;
  int ones = 0;

  initial begin
    for (int v = 0; v < 16; v++) begin
      bit pair_ab, pair_cd, exp_x;
      {a, b, c, d} = 4'(v);
      #1;
      pair_ab = (v & 32'hC) != 0;
      pair_cd = (v & 32'h3) != 0;
      exp_x = (pair_ab != pair_cd);
      checks++;
      if (x != exp_x) begin
        failures++;
        $display("FAIL: a%0b b%0b c%0b d%0b -> x%0b expected %0b", a, b, c, d, x, exp_x);
      end
      if (x) ones++;
    end
    // 3 combinations light (a|b), 3 light (c|d): 3*1 + 1*3 = 6 give x = 1.
    checks++;
    if (ones != 6) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
