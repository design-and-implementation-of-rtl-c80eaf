// aoms_sa_cell: shift-add cell that merges the digit products of one tap.
//
// A wide input sample is split into P digits of DIGIT_W (5) bits. Each digit
// is multiplied through the A-OMS LUT, giving P products pd[p] of W+5 bits.
// This cell forms  sum_p pd[p] * 2^(5p)  as a balanced tree of adders. Every
// tree level ends in a register, so the latency is ceil(log2 P) cycles (zero
// for P = 1, when the cell is a plain sign extension). The result is OW bits
// wide, two's complement, and exact. The document names the SA cell and the
// decomposition of the input operand. The tree shape and one register per
// level are this design's choice, made so that the filter's latency grows
// by one cycle each time the input word length doubles, as the document's
// latency table does.
module aoms_sa_cell
  import aoms_pkg::*;
#(
  parameter int unsigned W  = 8,                 // coefficient width
  parameter int unsigned P  = 2,                 // number of digits
  parameter int unsigned OW = DIGIT_W * P + W    // output width
) (
  input  logic                        clk,
  input  logic                        rst,
  input  logic signed [P-1:0][W+4:0]  pd,        // digit products, digit 0 least significant
  output logic signed [OW-1:0]        sum
);

  localparam int unsigned T = (P > 1) ? $clog2(P) : 0;   // tree levels

  // lvl[l][i]: partial sum of digits i*2^l .. (i+1)*2^l-1, weight removed
  logic signed [OW-1:0] lvl [T+1][P];

  always_comb begin
    for (int unsigned p = 0; p < P; p++) lvl[0][p] = OW'($signed(pd[p]));
  end

  for (genvar l = 0; l < T; l++) begin : g_level
    localparam int unsigned CNT = (P + (1 << l) - 1) >> l;   // terms at level l
    localparam int unsigned SH  = DIGIT_W << l;               // weight step
    always_ff @(posedge clk) begin
      for (int unsigned i = 0; i < P; i++) begin
        if (rst)                 lvl[l+1][i] <= '0;
        else if (2*i + 1 < CNT)  lvl[l+1][i] <= lvl[l][2*i] + (lvl[l][2*i+1] <<< SH);
        else if (2*i < CNT)      lvl[l+1][i] <= lvl[l][2*i];
        else                     lvl[l+1][i] <= '0;
      end
    end
  end

  assign sum = lvl[T][0];

endmodule
