// aoms_top: the A-OMS look-up-table arithmetic, as a filter and as a
// stand-alone multiplier.
//
//  * u_fir (aoms_fir): N-tap transposed FIR filter with one input sample per
//    cycle. Its tap multipliers share the address generators and decoders,
//    and each tap has its own nine-word odd-multiple LUT. Ports fir_*.
//  * u_mult (aoms_lut_mult): a single 5-bit by W-bit A-OMS LUT multiplier
//    (combinational from mul_x to mul_ax, coefficient held in its LUT).
//    Ports mul_*.
//  * u_apc (apc_lut_mult): the same product from a LUT that uses
//    antisymmetric product coding alone (15 stored words instead of 9).
//    It shares the mul_* inputs and drives apc_ax.
// The filter and the multipliers share only the clock and the synchronous reset. Defaults: a
// 16-tap filter for 8-bit samples, the filter size the document compares
// against, and a multiplier with W = 5, the word size of the document's
// LUT multipliers. The 8-bit filter coefficient width and the multiplier's
// reset coefficient are this design's choice.
module aoms_top
  import aoms_pkg::*;
#(
  parameter int unsigned N      = 16,   // filter taps
  parameter int unsigned L      = 8,    // filter sample width
  parameter int unsigned W      = 8,    // filter coefficient width
  parameter int unsigned MW     = 5,    // multiplier coefficient width
  parameter int signed   M_INIT = 11    // multiplier coefficient after rst
) (
  input  logic                              clk,
  input  logic                              rst,
  // filter
  input  logic [L-1:0]                      fir_x,
  input  logic                              fir_coef_we,
  input  logic [$clog2(N)-1:0]              fir_coef_idx,
  input  logic signed [W-1:0]               fir_coef_data,
  output logic signed [L+W+$clog2(N)-1:0]   fir_y,
  // stand-alone multiplier
  input  logic                              mul_load,
  input  logic signed [MW-1:0]              mul_coef,
  input  logic [DIGIT_W-1:0]                mul_x,
  output logic signed [MW+4:0]              mul_ax,
  output logic signed [MW+4:0]              apc_ax
);

  aoms_fir #(.N(N), .L(L), .W(W)) u_fir (
    .clk(clk), .rst(rst), .x_in(fir_x),
    .coef_we(fir_coef_we), .coef_idx(fir_coef_idx), .coef_data(fir_coef_data),
    .y(fir_y)
  );

  aoms_lut_mult #(.W(MW), .INIT_A(M_INIT)) u_mult (
    .clk(clk), .rst(rst), .load(mul_load), .coef(mul_coef),
    .x(mul_x), .ax(mul_ax)
  );

  apc_lut_mult #(.W(MW), .INIT_A(M_INIT)) u_apc (
    .clk(clk), .rst(rst), .load(mul_load), .coef(mul_coef),
    .x(mul_x), .ax(apc_ax)
  );

endmodule
