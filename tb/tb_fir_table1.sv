// tb_fir_table1: runs the filter at further sizes of the latency table,
// N = 16 and 32 taps with 8- and 16-bit samples (the 8-tap sizes are in
// tb_aoms_fir). For each size the first full output must appear after
// N + 5 (8-bit) and N + 6 (16-bit) cycles.
// Each size also streams random samples through one random coefficient set
// and compares every output with a direct convolution.
module tb_fir_table1;
  localparam int NN = 2;
  localparam int NL = 2;
  localparam int TAPS [NN] = '{16, 32};
  localparam int BITS [NL] = '{8, 16};

  logic clk = 0;
  int c [NN][NL], f [NN][NL];
  bit d [NN][NL];

  always #5 clk = ~clk;

  for (genvar i = 0; i < NN; i++) begin : g_n
    for (genvar j = 0; j < NL; j++) begin : g_l
      fir_check_harness #(.N(TAPS[i]), .L(BITS[j]), .W(8), .EXP_LAT(TAPS[i] + 5 + j),
                          .NS(TAPS[i] + 24), .PHASES(1))
        u (.clk(clk), .checks(c[i][j]), .failures(f[i][j]), .done(d[i][j]));
    end
  end

  function automatic int total(input bit fails);
    int t = 0;
    for (int i = 0; i < NN; i++)
      for (int j = 0; j < NL; j++) t += fails ? f[i][j] : c[i][j];
    return t;
  endfunction

  function automatic bit all_done();
    for (int i = 0; i < NN; i++)
      for (int j = 0; j < NL; j++) if (!d[i][j]) return 0;
    return 1;
  endfunction

  initial begin
    #200000;
    $display("TB_RESULT checks=%0d failures=%0d", total(0), total(1) + 1);
    $finish;
  end

  initial begin
    do @(posedge clk); while (!all_done());
    $display("TB_RESULT checks=%0d failures=%0d", total(0), total(1));
    $finish;
  end
endmodule
