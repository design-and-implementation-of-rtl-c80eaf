// aoms_fir: N-tap transposed-form FIR filter whose multipliers are A-OMS
// look-up tables (combined antisymmetric product coding and odd-multiple
// storage), with one input sample per clock cycle.
//
// Structure:
//  * The L-bit unsigned sample is cut into P = ceil(L/5) five-bit digits.
//    Each digit has one address generator (aoms_agc) and one 4-to-9 decoder
//    (aoms_decoder). These are shared by all N taps, so the filter needs N
//    times fewer decoders than N separate LUT multipliers.
//  * The memory core holds one nine-word LUT (aoms_lut) per tap, each with P
//    read ports, filled with the odd multiples of that tap's coefficient.
//  * For every tap and digit, the LUT word is shifted back to its even
//    multiple (aoms_barrel_shifter), sign-reversed when the digit's top bit
//    is 0 (aoms_sign_mod) and added to 16*h[k]. This gives digit*h[k].
//  * An SA cell (aoms_sa_cell) merges a tap's P digit products into x*h[k].
//  * The AS cells form the transposed adder-delay chain:
//    acc[k] <= x*h[k] + acc[k+1], with y = acc[0].
// The transposed structure, the shared address generation and decoding,
// the memory core and the SA/AS cells follow the document.
//
// Timing. Registers sit after the input, after address generation and
// decoding, after the memory read, after the +16h adder, after each SA tree
// level and in the AS chain. A sample taken at clock edge n therefore
// contributes to the output after edge n + 4 + ceil(log2 P). The first output
// that covers all N taps appears N + 4 + ceil(log2 P) edges after the first
// sample, counting that edge as the first. This is 13 for N = 8 and L = 8,
// and 21 for N = 16, matching the document's latency table. The cut into
// these stages is this design's choice, made to match that table.
//
// Coefficients. h[k] is two's complement, W bits. Writing it (coef_we,
// coef_idx, coef_data) refills tap k's LUT in one cycle. A synchronous rst
// clears all coefficients and the pipeline. Outputs already in flight when a
// coefficient changes mix the old and new values.
module aoms_fir
  import aoms_pkg::*;
#(
  parameter int unsigned N  = 16,   // taps
  parameter int unsigned L  = 8,    // input sample width (unsigned)
  parameter int unsigned W  = 8,    // coefficient width (two's complement)
  parameter int unsigned P  = (L + DIGIT_W - 1) / DIGIT_W,   // input digits
  parameter int unsigned YW = L + W + $clog2(N)              // output width
) (
  input  logic                       clk,
  input  logic                       rst,
  input  logic [L-1:0]               x_in,
  input  logic                       coef_we,
  input  logic [$clog2(N)-1:0]       coef_idx,
  input  logic signed [W-1:0]        coef_data,
  output logic signed [YW-1:0]       y
);

  localparam int unsigned XW = DIGIT_W * P;      // sample width padded to whole digits
  localparam int unsigned OW = XW + W;           // SA cell output width

  // ---- stage 1: input register
  logic [XW-1:0] x_r;
  always_ff @(posedge clk) begin
    if (rst) x_r <= '0;
    else     x_r <= XW'(x_in);
  end

  // ---- stage 2: shared address generation and decoding, one per digit
  logic [P-1:0][ADDR_W-1:0] d;
  shift_t [P-1:0]           s;
  logic [P-1:0]             lrst;
  logic [P-1:0][NWORDS-1:0] w;

  logic [P-1:0][NWORDS-1:0] w_r;
  shift_t [P-1:0]           s_r, s_rr;
  logic [P-1:0]             lrst_r, x4_r, x4_rr;

  for (genvar p = 0; p < P; p++) begin : g_digit
    aoms_agc u_agc (.x(x_r[p*DIGIT_W +: DIGIT_W]), .d(d[p]), .s(s[p]), .reset(lrst[p]));
    aoms_decoder u_dec (.d(d[p]), .w(w[p]));
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      w_r <= '0; s_r <= '0; lrst_r <= '0; x4_r <= '0;
      s_rr <= '0; x4_rr <= '0;
    end else begin
      w_r    <= w;
      s_r    <= s;
      lrst_r <= lrst;
      for (int unsigned p = 0; p < P; p++) x4_r[p] <= x_r[p*DIGIT_W + DIGIT_W - 1];
      s_rr   <= s_r;
      x4_rr  <= x4_r;
    end
  end

  // ---- stage 3: memory core read
  logic signed [N-1:0][P-1:0][W+3:0] word, word_r;
  logic signed [N-1:0][W-1:0]        h, h_r;

  for (genvar k = 0; k < N; k++) begin : g_core
    aoms_lut #(.W(W), .NRD(P), .INIT_A(0)) u_lut (
      .clk(clk), .rst(rst),
      .load(coef_we && (coef_idx == $clog2(N)'(k))), .coef(coef_data),
      .w(w_r), .reset(lrst_r), .q(word[k]), .coef_q(h[k])
    );
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      word_r <= '0; h_r <= '0;
    end else begin
      word_r <= word;
      h_r    <= h;
    end
  end

  // ---- stage 4: shift, sign modification and +16h per tap and digit
  logic signed [N-1:0][P-1:0][W+4:0] shifted, signed_word, pd_r;

  for (genvar k = 0; k < N; k++) begin : g_tap
    for (genvar p = 0; p < P; p++) begin : g_dig
      aoms_barrel_shifter #(.W(W)) u_bsh (.din(word_r[k][p]), .s(s_rr[p]), .dout(shifted[k][p]));
      aoms_sign_mod #(.WD(W+5)) u_sgn (.din(shifted[k][p]), .x4(x4_rr[p]), .dout(signed_word[k][p]));
      always_ff @(posedge clk) begin
        if (rst) pd_r[k][p] <= '0;
        else     pd_r[k][p] <= ((W+5)'($signed(h_r[k])) <<< 4) + signed_word[k][p];
      end
    end
  end

  // ---- stage 5: SA cells (ceil(log2 P) register levels)
  logic signed [N-1:0][OW-1:0] prod;

  for (genvar k = 0; k < N; k++) begin : g_sa
    aoms_sa_cell #(.W(W), .P(P), .OW(OW)) u_sa (.clk(clk), .rst(rst), .pd(pd_r[k]), .sum(prod[k]));
  end

  // ---- stage 6: AS cells, transposed adder-delay chain
  logic signed [YW-1:0] acc [N+1];

  assign acc[N] = '0;
  for (genvar k = 0; k < N; k++) begin : g_as
    always_ff @(posedge clk) begin
      if (rst) acc[k] <= '0;
      else     acc[k] <= YW'($signed(prod[k])) + acc[k+1];
    end
  end

  assign y = acc[0];

endmodule
