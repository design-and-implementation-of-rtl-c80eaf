// aoms_barrel_shifter: restores an even multiple from the stored odd multiple.
//
// Shifts the (W+4)-bit two's complement LUT word left by s = {s1, s0}
// (0 to 3 places) and returns it sign-extended to W+5 bits, the "coded
// output" width of the document. The largest result, 2A shifted by three,
// is 16A, which fits in W+5 bits. Built as two mux stages (shift by 1, then
// by 2). Purely combinational.
module aoms_barrel_shifter
  import aoms_pkg::*;
#(
  parameter int unsigned W = 5   // coefficient width
) (
  input  logic signed [W+3:0] din,
  input  shift_t              s,
  output logic signed [W+4:0] dout
);

  logic signed [W+4:0] st1;

  always_comb begin
    st1  = s[0] ? ((W+5)'(din) <<< 1) : (W+5)'(din);
    dout = s[1] ? (st1 <<< 2) : st1;
  end

endmodule
