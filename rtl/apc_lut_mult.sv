// apc_lut_mult: memory-based multiplier using antisymmetric product coding
// alone (no odd-multiple storage). A 5-bit unsigned input X = {x4, X_L} is
// multiplied by a W-bit two's complement coefficient A.
//
// Because X*A = 16A + X_L*A for x4 = 1 and 16A - (16 - X_L)*A for x4 = 0,
// a LUT addressed by the 4-bit word X' is enough. X' = X_L when x4 = 1, and
// X' = the 4-bit two's complement of X_L when x4 = 0. The LUT holds
// j*A (W+4 bits) for j = 1..15. The word for X' = 0000 is not stored: the
// LUT output is forced to zero instead. A +/- cell controlled by x4 adds the
// LUT word to 16A, or subtracts it. This is half the 32 words of a plain
// LUT multiplier. The address mapping, the LUT width, the zero by reset and
// the +/- cell follow the document. One case is this design's choice:
// X = 00000 maps to X' = 0000 with x4 = 0, which would give 16A, so for that
// input the +/- cell also drops the 16A term. The A-OMS multiplier avoids
// this with its ninth word.
// Storage and load port as in aoms_lut: a synchronous rst loads the
// multiples of INIT_A, and a load pulse those of coef, used from the next
// cycle. From x to ax the path is combinational. The result is W+5 bits,
// two's complement.
module apc_lut_mult
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

  logic signed [W+3:0] mem [1:15];
  logic signed [W-1:0] a;
  logic [3:0]          xp;          // APC address X'
  logic signed [W+3:0] word;
  logic signed [W+4:0] a16;

  always_ff @(posedge clk) begin
    if (rst) begin
      a <= W'(INIT_A);
      for (int j = 1; j < 16; j++) mem[j] <= (W+4)'(INIT_A * j);
    end else if (load) begin
      a <= coef;
      for (int j = 1; j < 16; j++) mem[j] <= (W+4)'(32'($signed(coef)) * j);
    end
  end

  always_comb begin
    // address mapping, eq. (1)
    xp   = x[4] ? x[3:0] : 4'(-x[3:0]);
    // LUT read; address 0000 reads as zero
    word = (xp == 4'd0) ? '0 : mem[xp];
    // +/- cell
    a16  = (x == 5'd0) ? '0 : ((W+5)'(a) <<< 4);
    ax   = x[4] ? a16 + (W+5)'(word) : a16 - (W+5)'(word);
  end

endmodule
