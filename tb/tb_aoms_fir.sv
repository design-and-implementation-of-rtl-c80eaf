// tb_aoms_fir: checks the A-OMS FIR filter in three sizes of the latency
// table: N = 8 taps with 8-, 16- and 32-bit samples, whose first full
// output must come after 13, 14 and 15 cycles. Each size runs two random
// coefficient sets, directed digit values and random samples against a
// direct convolution (see fir_check_harness).
module tb_aoms_fir;
  logic clk = 0;
  int c [3], f [3];
  bit d [3];
  int checks, failures;

  always #5 clk = ~clk;

  fir_check_harness #(.N(8), .L(8),  .W(8),  .EXP_LAT(13)) h8  (.clk(clk), .checks(c[0]), .failures(f[0]), .done(d[0]));
  fir_check_harness #(.N(8), .L(16), .W(8),  .EXP_LAT(14)) h16 (.clk(clk), .checks(c[1]), .failures(f[1]), .done(d[1]));
  fir_check_harness #(.N(8), .L(32), .W(10), .EXP_LAT(15)) h32 (.clk(clk), .checks(c[2]), .failures(f[2]), .done(d[2]));

  initial begin
    #100000;
    $display("TB_RESULT checks=%0d failures=%0d", c[0] + c[1] + c[2], f[0] + f[1] + f[2] + 1);
    $finish;
  end

  initial begin
    wait (d[0] && d[1] && d[2]);
    checks   = c[0] + c[1] + c[2];
    failures = f[0] + f[1] + f[2];
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
