// tb_aoms_agc: exhaustive check of the A-OMS address generator.
// For all 32 input digits the expected address, shift and RESET are derived
// from the arithmetic meaning (APC mapping, then odd part and trailing-zero
// count), not from the gate equations. It also checks that the addressed odd
// multiple, shifted, rebuilds the APC magnitude.
module tb_aoms_agc;
  import aoms_pkg::*;

  logic [4:0] x;
  logic [3:0] d;
  shift_t     s;
  logic       reset;
  int checks = 0, failures = 0;

  aoms_agc dut (.x(x), .d(d), .s(s), .reset(reset));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s: x=%b d=%b s=%0d reset=%b", what, x, d, s, reset);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 32; v++) begin
      int xl, xp, tz, odd, mag, exp_d, exp_s, word_mult;
      x = 5'(v);
      #1;
      xl = v & 15;
      xp = (v >= 16) ? xl : ((16 - xl) & 15);     // eq. (1)
      if (xl == 0) begin
        exp_s = 3;
        exp_d = 8;
      end else begin
        tz = 0;
        while (((xp >> tz) & 1) == 0) tz++;
        odd   = xp >> tz;
        exp_s = tz;
        exp_d = (odd - 1) / 2;
      end
      check(int'(d) == exp_d, "address");
      check(int'(s) == exp_s, "shift");
      check(reset == (v == 16), "reset");
      // the word at d, shifted by s, must equal the APC magnitude
      mag = (v >= 16) ? xl : (16 - xl);
      word_mult = (d[3]) ? 2 : (2 * int'(d[2:0]) + 1);
      if (!reset) check((word_mult << s) == mag, "rebuilds magnitude");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
