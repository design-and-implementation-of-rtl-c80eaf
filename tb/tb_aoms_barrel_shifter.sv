// tb_aoms_barrel_shifter: exhaustive check of the LUT-output shifter for
// W = 5: every 9-bit word and every shift 0..3 against word * 2^s.
module tb_aoms_barrel_shifter;
  import aoms_pkg::*;
  localparam int W = 5;

  logic signed [W+3:0] din;
  shift_t              s;
  logic signed [W+4:0] dout;
  int checks = 0, failures = 0;

  aoms_barrel_shifter #(.W(W)) dut (.din(din), .s(s), .dout(dout));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = -(1 << (W+3)); v < (1 << (W+3)); v++) begin
      for (int sh = 0; sh < 4; sh++) begin
        int expv;
        din = (W+4)'(v);
        s   = 2'(sh);
        #1;
        expv = v * (1 << sh);
        checks++;
        if (dout !== (W+5)'(expv)) begin
          failures++;
          $display("FAIL din=%0d s=%0d dout=%0d", v, sh, dout);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
