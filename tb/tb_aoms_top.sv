// tb_aoms_top: end-to-end test of aoms_top at its default parameters
// (16-tap filter, 8-bit samples, 8-bit coefficients; 5-bit multiplier).
//
// Filter: for two coefficient sets, it loads all 16 coefficients, flushes
// and streams 200 samples, one per cycle. Every output is compared with a
// direct convolution. It also checks that the first full output (y[15])
// appears on the 21st edge, counting the edge that takes x[0] as the first.
// Multipliers (A-OMS and APC-only): every input 0..31 times the reset
// coefficient and several loaded coefficients.
// Mechanism counters, read from the filter's pipeline: LUT RESET
// (digit 10000), the ninth word (2A), each shift count 0..3, sign reversal
// and pass-through, coefficient reload. A mechanism that never occurs
// counts as a failure.
module tb_aoms_top;
  localparam int N = 16, L = 8, W = 8, MW = 5, M_INIT = 11;
  localparam int D = 6;        // edges from a sample to its output (P = 2)
  localparam int NS = 200;

  logic                          clk = 0, rst;
  logic [L-1:0]                  fir_x;
  logic                          fir_coef_we;
  logic [$clog2(N)-1:0]          fir_coef_idx;
  logic signed [W-1:0]           fir_coef_data;
  logic signed [L+W+$clog2(N)-1:0] fir_y;
  logic                          mul_load;
  logic signed [MW-1:0]          mul_coef;
  logic [4:0]                    mul_x;
  logic signed [MW+4:0]          mul_ax, apc_ax;

  aoms_top dut (
    .clk(clk), .rst(rst),
    .fir_x(fir_x), .fir_coef_we(fir_coef_we), .fir_coef_idx(fir_coef_idx),
    .fir_coef_data(fir_coef_data), .fir_y(fir_y),
    .mul_load(mul_load), .mul_coef(mul_coef), .mul_x(mul_x), .mul_ax(mul_ax), .apc_ax(apc_ax));

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int n_reset = 0, n_word8 = 0, n_negate = 0, n_pass = 0, n_reload = 0;
  int n_shift [4] = '{0, 0, 0, 0};

  // mechanism counters, sampled where the filter's LUT read is registered
  always @(posedge clk) begin
    if (!rst) begin
      for (int p = 0; p < 2; p++) begin
        if (dut.u_fir.lrst_r[p]) n_reset++;
        if (dut.u_fir.w_r[p][8] && !dut.u_fir.lrst_r[p]) n_word8++;
        n_shift[dut.u_fir.s_rr[p]]++;
        if (dut.u_fir.x4_rr[p]) n_pass++; else n_negate++;
      end
    end
  end

  initial begin
    #2000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  longint h [N];
  longint xs [NS];

  function automatic longint yref(input int n);
    longint acc = 0;
    for (int k = 0; k < N; k++)
      if (n - k >= 0) acc += h[k] * xs[n - k];
    return acc;
  endfunction

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  task automatic mult_sweep(input int a);
    for (int v = 0; v < 32; v++) begin
      mul_x = 5'(v);
      #1;
      check(int'(mul_ax) == v * a, $sformatf("multiplier %0d * %0d = %0d", v, a, mul_ax));
      check(int'(apc_ax) == v * a, $sformatf("APC multiplier %0d * %0d = %0d", v, a, apc_ax));
    end
  endtask

  initial begin
    rst = 1; fir_x = '0; fir_coef_we = 0; fir_coef_idx = '0; fir_coef_data = '0;
    mul_load = 0; mul_coef = '0; mul_x = '0;
    repeat (2) @(posedge clk);
    #1 rst = 0;

    // ---- stand-alone multiplier
    mult_sweep(M_INIT);
    foreach (h[i]) h[i] = 0;
    for (int a = -16; a < 16; a += 5) begin
      mul_coef = MW'(a); mul_load = 1;
      @(posedge clk); #1 mul_load = 0;
      mult_sweep(a);
    end

    // ---- filter, two coefficient sets
    for (int ph = 0; ph < 2; ph++) begin
      for (int k = 0; k < N; k++) begin
        h[k] = longint'($signed(W'($urandom)));
        fir_coef_we = 1; fir_coef_idx = 4'(k); fir_coef_data = W'(h[k]);
        @(posedge clk); #1;
      end
      fir_coef_we = 0;
      if (ph > 0) n_reload++;
      repeat (N + D) @(posedge clk);
      #1;
      // directed values first (digit 10000, zero, each shift count), then random
      for (int n = 0; n < NS; n++) xs[n] = longint'($urandom_range(255));
      xs[0] = 16; xs[1] = 0; xs[2] = 8; xs[3] = 4; xs[4] = 2; xs[5] = 255; xs[6] = 48;
      for (int e = 1; e <= NS; e++) begin
        fir_x = L'(xs[e - 1]);
        @(posedge clk); #1;
        if (e - D >= 0) begin
          check(longint'(fir_y) == yref(e - D),
                $sformatf("phase %0d y[%0d] = %0d, expected %0d", ph, e - D, fir_y, yref(e - D)));
          if (e - D == N - 1) check(e == 21, $sformatf("latency %0d, expected 21", e));
        end
      end
      fir_x = '0;
    end

    $display("mechanisms: reset=%0d word8=%0d shift0=%0d shift1=%0d shift2=%0d shift3=%0d negate=%0d pass=%0d reload=%0d",
             n_reset, n_word8, n_shift[0], n_shift[1], n_shift[2], n_shift[3], n_negate, n_pass, n_reload);
    check(n_reset > 0,  "LUT RESET never used");
    check(n_word8 > 0,  "ninth word never used");
    for (int i = 0; i < 4; i++) check(n_shift[i] > 0, $sformatf("shift %0d never used", i));
    check(n_negate > 0, "sign reversal never used");
    check(n_pass > 0,   "sign pass-through never used");
    check(n_reload > 0, "coefficient reload never used");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
