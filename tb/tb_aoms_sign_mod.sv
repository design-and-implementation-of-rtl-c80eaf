// tb_aoms_sign_mod: exhaustive check of the selective sign reversal for a
// 10-bit word: x4 = 1 passes the word, x4 = 0 negates it.
module tb_aoms_sign_mod;
  localparam int WD = 10;

  logic signed [WD-1:0] din, dout;
  logic                 x4;
  int checks = 0, failures = 0;

  aoms_sign_mod #(.WD(WD)) dut (.din(din), .x4(x4), .dout(dout));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = -(1 << (WD-1)); v < (1 << (WD-1)); v++) begin
      for (int b = 0; b < 2; b++) begin
        int expv;
        din = WD'(v);
        x4  = b[0];
        #1;
        expv = b ? v : -v;
        checks++;
        if (dout !== WD'(expv)) begin
          failures++;
          $display("FAIL din=%0d x4=%0d dout=%0d", v, b, dout);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
