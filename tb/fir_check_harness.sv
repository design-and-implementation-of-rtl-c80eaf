// fir_check_harness: drives one aoms_fir and checks it against a direct
// convolution y[n] = sum_k h[k] x[n-k] computed in 64-bit integers.
//
// For each of PHASES coefficient sets it loads N random coefficients, lets
// zeros flush the pipeline and then streams NS random samples (one per
// cycle). The first DIR samples of each phase are directed values that hit
// every digit class: 0, 16 (the RESET case), 31 and each trailing-zero
// count. Every output is compared with the reference at a fixed offset of
// 4 + ceil(log2 P) edges. The latency of the first full output (N - 1 plus
// that offset, counting the edge that takes x[0] as one) is compared with
// EXP_LAT. Results are reported through checks/failures when done rises.
module fir_check_harness #(
  parameter int N       = 8,
  parameter int L       = 8,
  parameter int W       = 8,
  parameter int EXP_LAT = 13,
  parameter int NS      = 64,
  parameter int PHASES  = 2
) (
  input  logic clk,
  output int   checks,
  output int   failures,
  output bit   done
);
  localparam int P  = (L + 4) / 5;
  localparam int T  = (P > 1) ? $clog2(P) : 0;
  localparam int D  = 5 + T;                 // edges from sample to its output
  localparam int YW = L + W + $clog2(N);

  logic                  rst;
  logic [L-1:0]          x_in;
  logic                  coef_we;
  logic [$clog2(N)-1:0]  coef_idx;
  logic signed [W-1:0]   coef_data;
  logic signed [YW-1:0]  y;

  aoms_fir #(.N(N), .L(L), .W(W)) dut (
    .clk(clk), .rst(rst), .x_in(x_in), .coef_we(coef_we), .coef_idx(coef_idx),
    .coef_data(coef_data), .y(y));

  longint h [N];
  longint xs [NS];

  function automatic longint yref(input int n);
    longint acc = 0;
    for (int k = 0; k < N; k++)
      if (n - k >= 0) acc += h[k] * xs[n - k];
    return acc;
  endfunction

  function automatic longint sample(input int n);
    logic [63:0] r = {$urandom, $urandom};
    // directed digit classes first, then random
    case (n)
      0: return 16;
      1: return 0;
      2: return 31;
      3: return (1 << (L - 1)) | 1;
      4: return 8;
      5: return 4;
      6: return 2;
      7: return 24;
      8: return (L > 5) ? ((1 << L) - 1) : 31;
      default: return longint'(r & ((64'd1 << L) - 1));
    endcase
  endfunction

  initial begin
    checks = 0; failures = 0; done = 0;
    rst = 1; x_in = '0; coef_we = 0; coef_idx = '0; coef_data = '0;
    repeat (2) @(posedge clk);
    #1 rst = 0;
    for (int ph = 0; ph < PHASES; ph++) begin
      for (int k = 0; k < N; k++) begin
        h[k] = longint'($signed(W'($urandom)));
        if (ph == 0 && k == 0) h[k] = -(longint'(1) << (W - 1));   // most negative
        coef_we = 1; coef_idx = $clog2(N)'(k); coef_data = W'(h[k]);
        @(posedge clk); #1;
      end
      coef_we = 0;
      repeat (N + D) @(posedge clk);
      #1;
      for (int n = 0; n < NS; n++) xs[n] = sample(n);
      // edge e (e = 1 takes x[0]) is followed by output y[e - D]
      for (int e = 1; e <= NS; e++) begin
        x_in = L'(xs[e - 1]);
        @(posedge clk); #1;
        if (e - D >= 0) begin
          checks++;
          if (longint'(y) != yref(e - D)) begin
            failures++;
            $display("FAIL N=%0d L=%0d phase %0d y[%0d] = %0d, expected %0d",
                     N, L, ph, e - D, y, yref(e - D));
          end
          if (e - D == N - 1) begin
            checks++;
            if (e != EXP_LAT) begin
              failures++;
              $display("FAIL N=%0d L=%0d latency %0d, expected %0d", N, L, e, EXP_LAT);
            end
          end
        end
      end
      x_in = '0;
    end
    done = 1;
  end
endmodule
