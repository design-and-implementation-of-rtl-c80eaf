// aoms_lut_mult: A-OMS memory-based multiplier of a 5-bit unsigned input
// digit X by a W-bit two's complement coefficient A.
//
// The datapath is address generation (aoms_agc), then the 4-to-9 decoder
// (aoms_decoder), the nine-word LUT (aoms_lut), the barrel shifter
// (aoms_barrel_shifter), sign modification (aoms_sign_mod), and finally an
// adder that adds 16A:
//      AX = 16A + (x4 ? +1 : -1) * (LUT word << s).
// The result is W+5 bits wide, two's complement. That is enough for X*A with
// X in 0..31, so the modular add is exact. The chain and its widths follow
// the document. The LUT's storage and load port are this design's choice: a
// synchronous rst loads INIT_A, and a load pulse loads a new coefficient,
// used from the next cycle. From x to ax the path is purely combinational.
module aoms_lut_mult
  import aoms_pkg::*;
#(
  parameter int unsigned W      = 5,    // coefficient width
  parameter int signed   INIT_A = 11    // coefficient after rst
) (
  input  logic                  clk,
  input  logic                  rst,
  input  logic                  load,
  input  logic signed [W-1:0]   coef,
  input  logic [DIGIT_W-1:0]    x,
  output logic signed [W+4:0]   ax
);

  logic [ADDR_W-1:0]   d;
  shift_t              s;
  logic                lut_reset;
  logic [NWORDS-1:0]   w;
  logic signed [W+3:0] word;
  logic signed [W+4:0] shifted, signed_word;
  logic signed [W-1:0] a;

  aoms_agc u_agc (.x(x), .d(d), .s(s), .reset(lut_reset));

  aoms_decoder u_dec (.d(d), .w(w));

  aoms_lut #(.W(W), .NRD(1), .INIT_A(INIT_A)) u_lut (
    .clk(clk), .rst(rst), .load(load), .coef(coef),
    .w(w), .reset(lut_reset), .q(word), .coef_q(a)
  );

  aoms_barrel_shifter #(.W(W)) u_bsh (.din(word), .s(s), .dout(shifted));

  aoms_sign_mod #(.WD(W+5)) u_sgn (.din(shifted), .x4(x[4]), .dout(signed_word));

  assign ax = ((W+5)'(a) <<< 4) + signed_word;

endmodule
