// tb_aoms_sa_cell: checks the shift-add cell for P = 2 and P = 7 digits
// (W = 8) with random digit products. The output must equal
// sum pd[p] * 32^p exactly (pd[p] drawn as real digit products), ceil(log2 P) cycles after the inputs are applied.
module tb_aoms_sa_cell;
  localparam int W = 8;

  logic clk = 0, rst;
  logic signed [1:0][W+4:0] pd2;
  logic signed [6:0][W+4:0] pd7;
  logic signed [5*2+W-1:0]  sum2;
  logic signed [5*7+W-1:0]  sum7;
  longint exp2 [$], exp7 [$];
  int checks = 0, failures = 0;

  aoms_sa_cell #(.W(W), .P(2)) dut2 (.clk(clk), .rst(rst), .pd(pd2), .sum(sum2));
  aoms_sa_cell #(.W(W), .P(7)) dut7 (.clk(clk), .rst(rst), .pd(pd7), .sum(sum7));

  always #5 clk = ~clk;

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst = 1; pd2 = '0; pd7 = '0;
    repeat (2) @(posedge clk);
    #1 rst = 0;
    for (int n = 0; n < 200; n++) begin
      longint e2, e7;
      e2 = 0;
      e7 = 0;
      // a digit product: digit 0..31 times a W-bit coefficient
      for (int p = 0; p < 2; p++) begin
        pd2[p] = (W+5)'(int'($urandom_range(31)) * int'($signed(W'($urandom))));
        e2 += longint'($signed(pd2[p])) <<< (5 * p);
      end
      for (int p = 0; p < 7; p++) begin
        pd7[p] = (W+5)'(int'($urandom_range(31)) * int'($signed(W'($urandom))));
        e7 += longint'($signed(pd7[p])) <<< (5 * p);
      end
      exp2.push_back(e2);
      exp7.push_back(e7);
      @(posedge clk); #1;
      // P = 2: one level, the value applied before this edge is out now
      checks++;
      if (longint'(sum2) != exp2[n]) begin
        failures++; $display("FAIL P=2 n=%0d got %0d exp %0d", n, sum2, exp2[n]);
      end
      // P = 7: three levels
      if (n >= 2) begin
        checks++;
        if (longint'(sum7) != exp7[n-2]) begin
          failures++; $display("FAIL P=7 n=%0d got %0d exp %0d", n, sum7, exp7[n-2]);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
