// tb_aoms_lut: checks the nine-word odd-multiple LUT (W = 6, two read ports).
// After rst every word must be the multiple of INIT_A ((2j+1)A, and 2A in
// word 8), RESET must force zero, and a load must replace all nine words by
// the multiples of the new coefficient from the next cycle on.
module tb_aoms_lut;
  import aoms_pkg::*;
  localparam int W = 6;
  localparam int INIT = -23;

  logic                         clk = 0, rst, load;
  logic signed [W-1:0]          coef;
  logic [1:0][8:0]              w;
  logic [1:0]                   reset;
  logic signed [1:0][W+3:0]     q;
  logic signed [W-1:0]          coef_q;
  int checks = 0, failures = 0;

  aoms_lut #(.W(W), .NRD(2), .INIT_A(INIT)) dut (
    .clk(clk), .rst(rst), .load(load), .coef(coef),
    .w(w), .reset(reset), .q(q), .coef_q(coef_q));

  always #5 clk = ~clk;

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int mult_of(input int j);
    return (j == 8) ? 2 : 2 * j + 1;
  endfunction

  task automatic check_all(input int a);
    for (int j = 0; j < 9; j++) begin
      w[0] = 9'b1 << j;
      w[1] = 9'b1 << (8 - j);
      reset = 2'b00;
      #1;
      checks += 2;
      if (q[0] !== (W+4)'(mult_of(j) * a)) begin
        failures++; $display("FAIL port0 word %0d = %0d, A=%0d", j, q[0], a);
      end
      if (q[1] !== (W+4)'(mult_of(8 - j) * a)) begin
        failures++; $display("FAIL port1 word %0d = %0d, A=%0d", 8 - j, q[1], a);
      end
      reset = 2'b01;
      #1;
      checks += 2;
      if (q[0] !== '0) begin failures++; $display("FAIL reset port0"); end
      if (q[1] !== (W+4)'(mult_of(8 - j) * a)) begin failures++; $display("FAIL reset leaks to port1"); end
    end
    checks++;
    if (coef_q !== W'(a)) begin failures++; $display("FAIL coef_q %0d != %0d", coef_q, a); end
  endtask

  initial begin
    rst = 1; load = 0; coef = '0; w = '0; reset = '0;
    @(posedge clk); #1 rst = 0;
    check_all(INIT);
    for (int a = -(1 << (W-1)); a < (1 << (W-1)); a += 7) begin
      coef = W'(a); load = 1;
      @(posedge clk); #1 load = 0;
      coef = W'(a + 3);          // must not be taken without load
      @(posedge clk); #1;
      check_all(a);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
