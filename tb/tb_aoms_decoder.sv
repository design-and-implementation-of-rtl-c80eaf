// tb_aoms_decoder: exhaustive check of the 4-to-9 word-select decoder.
// Addresses 0..7 must raise exactly word line d, address 8 (d3 = 1, rest 0)
// only w8, and the unused addresses 9..15 no line.
module tb_aoms_decoder;
  import aoms_pkg::*;

  logic [3:0] d;
  logic [8:0] w;
  int checks = 0, failures = 0;

  aoms_decoder dut (.d(d), .w(w));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 16; v++) begin
      logic [8:0] exp_w;
      d = 4'(v);
      #1;
      exp_w = (v <= 8) ? (9'b1 << v) : 9'b0;
      checks++;
      if (w !== exp_w) begin
        failures++;
        $display("FAIL d=%0d w=%b expected %b", v, w, exp_w);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
