// aoms_pkg: constants and small functions shared by the A-OMS (combined
// antisymmetric product coding + odd-multiple storage) LUT multiplier blocks.
//
// A 5-bit unsigned input digit X = {x4, X_L} is multiplied by a coefficient A
// as  X*A = 16A + sign * (odd multiple of A) << shift,  sign = +1 when x4=1
// and -1 when x4=0. The LUT therefore holds only nine words: the eight odd
// multiples A, 3A, ..., 15A (addresses 0..7) and 2A (address 8, which after a
// shift of three gives the 16A needed for X = 00000). The digit width, the
// nine-word LUT and the word/shift/address encodings follow the document; the
// coefficient being two's complement is this design's choice.
package aoms_pkg;

  // width of one input digit handled by one LUT access
  localparam int unsigned DIGIT_W = 5;
  // LUT address width (d3..d0) and number of stored words
  localparam int unsigned ADDR_W  = 4;
  localparam int unsigned NWORDS  = 9;
  // index of the word that holds 2A
  localparam int unsigned WORD_2A = 8;

  // shift control s1s0: number of left shifts applied to the LUT word
  typedef logic [1:0] shift_t;

  // Word stored at LUT address j, for a coefficient of width W held in the
  // low W bits of a: (2j+1)*A for j = 0..7, and 2*A for j = 8. Returned
  // sign-extended to 32 bits; callers keep the low W+4 bits.
  function automatic logic signed [31:0] lut_word(input logic signed [31:0] a,
                                                  input int unsigned j);
    if (j == WORD_2A) return a <<< 1;
    return a * $signed(32'(2 * j + 1));
  endfunction

endpackage
