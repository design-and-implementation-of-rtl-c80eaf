// aoms_decoder: 4-to-9 line word-select decoder of the A-OMS LUT.
//
// A 3-to-8 decoder on d2..d0 drives word lines w0..w7 (the odd multiples
// A..15A). The ninth line w8 (the word 2A) is formed from d3 and the w0
// condition, as the document extends a 3x8 decoder to a 4x9 one. Lines
// w0..w7 are held low while d3 = 1, so exactly one line is active for every
// address the address generator produces (d3 = 1 only with d2..d0 = 000).
// That gating is this design's choice. Purely combinational.
module aoms_decoder
  import aoms_pkg::*;
(
  input  logic [ADDR_W-1:0] d,   // LUT address d3..d0
  output logic [NWORDS-1:0] w    // one-hot word select w8..w0
);

  always_comb begin
    w = '0;
    for (int unsigned j = 0; j < 8; j++) begin
      w[j] = (d[2:0] == 3'(j)) && !d[3];
    end
    w[WORD_2A] = d[3] && (d[2:0] == 3'd0);
  end

endmodule
