// aoms_sign_mod: selective sign reversal of the shifted LUT output.
//
// Passes the (W+5)-bit two's complement word unchanged when x4 = 1 and
// returns its two's complement (negation) when x4 = 0. The caller adds the
// result to 16A, which gives X*A = 16A + X_L*A for x4 = 1 and
// 16A - X_L'*A for x4 = 0. The document names the block and its control bit.
// Building it as an XOR with x4 inverted plus a carry-in of one is this
// design's choice. Purely combinational.
module aoms_sign_mod #(
  parameter int unsigned WD = 10   // data width (W+5)
) (
  input  logic signed [WD-1:0] din,
  input  logic                 x4,
  output logic signed [WD-1:0] dout
);

  logic negate;

  always_comb begin
    negate = ~x4;
    dout   = (din ^ {WD{negate}}) + WD'(negate);
  end

endmodule
