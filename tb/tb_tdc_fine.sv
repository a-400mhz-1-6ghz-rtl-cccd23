`timescale 1ps/1fs
// tb_tdc_fine: for random coarse codes and fine offsets f (phases 0..f
// sampled high) checks code_sum = 4*coarse + f, that `code` takes it only
// on ld, and that the phases are captured only on ce.
module tb_tdc_fine;
  import addll_pkg::*;
  logic clk = 1'b0, rst_n = 1'b1, ce = 1'b0, ld = 1'b0;
  logic [BLEND-1:0] phases = '0;
  logic [COARSE_W-1:0] coarse = '0;
  code_t code_sum, code;
  int checks = 0, failures = 0;

  tdc_fine dut (.clk, .rst_n, .ce, .ld, .phases, .coarse, .code_sum, .code);

  always #312.5 clk = ~clk;

  initial begin
    #10_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    code_t prev;
    #1 rst_n = 1'b0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    checks++; if (code != 0) failures++;
    prev = '0;
    for (int i = 0; i < 300; i++) begin
      int c, f, exp;
      c = $urandom_range(0, TAPS - 1);
      f = $urandom_range(0, BLEND - 1);
      exp = 4 * c + f;
      coarse = COARSE_W'(c);
      for (int j = 0; j < BLEND; j++) phases[j] = (j <= f);
      ce = 1'b1;
      @(negedge clk);
      ce = 1'b0;
      phases = '0;                     // must not be captured
      checks++;
      if (code_sum != code_t'(exp) || code != prev) begin
        failures++;
        $display("FAIL c=%0d f=%0d sum=%0d code=%0d", c, f, code_sum, code);
      end
      ld = 1'b1;
      @(negedge clk);
      ld = 1'b0;
      checks++;
      if (code != code_t'(exp)) begin failures++; $display("FAIL load %0d exp %0d", code, exp); end
      prev = code;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
