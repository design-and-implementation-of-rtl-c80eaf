// aoms_lut: nine-word odd-multiple LUT of the A-OMS multiplier, W+4 bits wide.
//
// Word j (j = 0..7) holds (2j+1)*A and word 8 holds 2*A, for a W-bit two's
// complement coefficient A. A read port takes a one-hot word-select vector
// (from aoms_decoder) and the RESET bit (from aoms_agc); the output is the
// selected word, or zero while RESET is high. The document gives the nine
// words, their width and the RESET; the rest is this design's choice:
//  * The words are registers. A synchronous rst loads the multiples of the
//    parameter INIT_A. A one-cycle load pulse loads the multiples of coef
//    (generic coefficients), visible from the next cycle.
//  * NRD read ports share the storage, so several digits of a wider input can
//    be looked up in the same cycle. Reads are combinational.
//  * coef_q returns the stored coefficient (word 0 = 1*A). The 16A term of
//    the product is taken from it.
module aoms_lut
  import aoms_pkg::*;
#(
  parameter int unsigned W      = 5,   // coefficient width
  parameter int unsigned NRD    = 1,   // read ports
  parameter int signed   INIT_A = 11   // coefficient loaded by rst
) (
  input  logic                        clk,
  input  logic                        rst,
  input  logic                        load,          // write the multiples of coef
  input  logic signed [W-1:0]         coef,
  input  logic [NRD-1:0][NWORDS-1:0]  w,             // one-hot word select per port
  input  logic [NRD-1:0]              reset,         // zero the output of a port
  output logic signed [NRD-1:0][W+3:0] q,            // selected word per port
  output logic signed [W-1:0]         coef_q         // stored coefficient
);

  logic signed [W+3:0] mem [NWORDS];

  always_ff @(posedge clk) begin
    for (int unsigned j = 0; j < NWORDS; j++) begin
      if (rst)       mem[j] <= (W+4)'(lut_word(32'(INIT_A), j));
      else if (load) mem[j] <= (W+4)'(lut_word(32'(coef), j));
    end
  end

  // word-line read: OR of the selected words, forced to zero by RESET
  always_comb begin
    for (int unsigned p = 0; p < NRD; p++) begin
      q[p] = '0;
      for (int unsigned j = 0; j < NWORDS; j++) begin
        if (w[p][j]) q[p] = q[p] | mem[j];
      end
      if (reset[p]) q[p] = '0;
    end
  end

  assign coef_q = W'(mem[0]);

endmodule
