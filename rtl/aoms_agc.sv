// aoms_agc: address generation and control circuit of the A-OMS LUT.
//
// Maps a 5-bit input digit X = {x4, x3, x2, x1, x0} onto the 4-bit LUT
// address d = {d3, d2, d1, d0}, the barrel-shifter control s = {s1, s0} and
// the LUT output RESET, all combinationally:
//  * s1s0 counts the trailing zeros of X_L = x3..x0 (three for X_L = 0000).
//    s1 = NOR(x0, x1) and s0 = NOT x0 AND (x1 OR NOT x2).
//  * X_L is right-shifted by s1s0 into an internal barrel shifter (y3..y0).
//    The vacated upper bits are filled with NOT x4. The shifted value is
//    Y_L, the odd part of X_L.
//  * X'' = Y_L when x4 = 1. When x4 = 0 it is the two's complement of Y_L,
//    taken over the 4-s bits left after the shift. Y_L is odd, so this is
//    y_i XNOR x4 for bits 1..3 (the fill makes the upper bits come out 0),
//    and bit 0 is unchanged.
//  * d_i = x''_{i+1} for i = 0,1,2 and d3 = NOT x''_0 = NOT y0. So d3 = 1
//    only for X_L = 0000, which selects the ninth word (2A).
//  * RESET = d3 AND x4. It zeroes the LUT output for X = 10000, whose
//    product is 16A exactly.
// The equations and the shifter with x4 as an input follow the document.
// The form of s0 is the one that yields the trailing-zero count that the
// odd-multiple scheme needs. Purely combinational.
module aoms_agc
  import aoms_pkg::*;
(
  input  logic [DIGIT_W-1:0] x,      // input digit, x[4] is the sign-control bit
  output logic [ADDR_W-1:0]  d,      // LUT address d3..d0
  output shift_t             s,      // {s1, s0}: left shifts for the LUT word
  output logic               reset   // zero the LUT output
);

  logic [3:0] y;   // X_L shifted right by s, filled with NOT x4

  always_comb begin
    s[1] = ~(x[0] | x[1]);
    s[0] = ~(x[0] | ~(x[1] | ~x[2]));
    y = x[3:0];
    for (int unsigned k = 0; k < 4; k++) begin
      if (k < 32'(s)) y = {~x[4], y[3:1]};
    end
    d[0] = ~(y[1] ^ x[4]);
    d[1] = ~(y[2] ^ x[4]);
    d[2] = ~(y[3] ^ x[4]);
    d[3] = ~y[0];
    reset = d[3] & x[4];
  end

endmodule
