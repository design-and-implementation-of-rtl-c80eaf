// tb_apc_lut_mult: exhaustive check of the APC-only multiplier for W = 5:
// the reset coefficient and then every coefficient -16..15, loaded through
// the load port, times every input 0..31, against the integer product.
// The multiplier is combinational, so each product is checked without
// waiting for a clock edge after the input change.
module tb_apc_lut_mult;
  import aoms_pkg::*;
  localparam int W = 5;
  localparam int INIT = 13;

  logic                clk = 0, rst, load;
  logic signed [W-1:0] coef;
  logic [4:0]          x;
  logic signed [W+4:0] ax;
  int checks = 0, failures = 0;

  apc_lut_mult #(.W(W), .INIT_A(INIT)) dut (
    .clk(clk), .rst(rst), .load(load), .coef(coef), .x(x), .ax(ax));

  always #5 clk = ~clk;

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic sweep(input int a);
    for (int v = 0; v < 32; v++) begin
      x = 5'(v);
      #1;
      checks++;
      if (int'(ax) !== v * a) begin
        failures++;
        $display("FAIL %0d * %0d = %0d", v, a, ax);
      end
    end
  endtask

  initial begin
    rst = 1; load = 0; coef = '0; x = '0;
    @(posedge clk); #1 rst = 0;
    sweep(INIT);
    for (int a = -(1 << (W-1)); a < (1 << (W-1)); a++) begin
      coef = W'(a); load = 1;
      @(posedge clk); #1 load = 0;
      sweep(a);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
