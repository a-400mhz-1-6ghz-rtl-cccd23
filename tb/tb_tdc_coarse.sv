`timescale 1ps/1fs
// tb_tdc_coarse: builds the sampled tap word for a reference edge at a
// random phase phi before the sampling edge (tap k high when
// (phi - k*T/16) mod T < T/2) and checks coarse = floor(16*phi/T) and
// valid; also checks that a word with no edge or with a bubble is flagged
// invalid, and that the code holds while ce is low.
module tb_tdc_coarse;
  import addll_pkg::*;
  logic clk = 1'b0, rst_n = 1'b1, ce = 1'b0;
  logic [TAPS-1:0] taps = '0;
  logic [COARSE_W-1:0] coarse;
  logic valid;
  int checks = 0, failures = 0;

  tdc_coarse dut (.clk, .rst_n, .ce, .taps, .coarse, .valid);

  always #312.5 clk = ~clk;

  initial begin
    #10_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [TAPS-1:0] word(input real phi);
    logic [TAPS-1:0] w;
    for (int k = 0; k < TAPS; k++) begin
      real x;
      x = phi - real'(k) / real'(TAPS);
      if (x < 0.0) x = x + 1.0;
      w[k] = (x < 0.5);
    end
    return w;
  endfunction

  initial begin
    #1 rst_n = 1'b0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int i = 0; i < 400; i++) begin
      int  u;
      real phi;
      int  exp;
      u   = $urandom_range(0, 999);
      phi = (real'(u) + 0.5) / 1000.0;
      exp = int'($floor(phi * TAPS));
      taps = word(phi);
      ce = 1'b1;
      @(negedge clk);
      ce = 1'b0;
      taps = ~taps;                      // must not be captured
      @(negedge clk);
      checks++;
      if (coarse != COARSE_W'(exp) || !valid) begin
        failures++;
        $display("FAIL phi=%f coarse=%0d exp=%0d valid=%0b", phi, coarse, exp, valid);
      end
    end
    // no edge in the line
    taps = '0; ce = 1'b1; @(negedge clk); ce = 1'b0;
    checks++; if (valid) begin failures++; $display("FAIL all-zero word valid"); end
    // bubble: two rising edges
    taps = 16'b0000_0011_0000_0111; ce = 1'b1; @(negedge clk); ce = 1'b0;
    checks++; if (valid || coarse != 4'd2) begin failures++; $display("FAIL bubble word"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
