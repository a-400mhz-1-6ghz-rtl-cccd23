`timescale 1ps/1fs
// tb_bin2therm: all 64 codes; the thermometer must hold exactly `code`
// ones, all in the low bits.
module tb_bin2therm;
  import addll_pkg::*;
  code_t bin;
  logic [THERM_W-1:0] therm;
  int checks = 0, failures = 0;

  bin2therm dut (.bin, .therm);

  initial begin
    #1_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int c = 0; c < PHASES; c++) begin
      logic [THERM_W-1:0] exp;
      bin = code_t'(c);
      #10;
      exp = '0;
      for (int i = 0; i < c; i++) exp[i] = 1'b1;
      checks++;
      if (therm !== exp || $countones(therm) != c) begin
        failures++;
        $display("FAIL code %0d therm %h", c, therm);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
