`timescale 1ps/1fs
// tb_tdc_delay_line: with a 50 % duty reference of period T applied, tap k
// at any time t must equal the reference level at t - k*T/16; checked at
// random instants away from edges, and all taps low when disabled.
module tb_tdc_delay_line;
  import addll_pkg::*;
  localparam real T = 625.0;
  logic clk_in = 1'b0, en = 1'b0;
  logic [TAPS-1:0] taps;
  int checks = 0, failures = 0;

  tdc_delay_line #(.T_REF_PS(T)) dut (.clk_in, .en, .taps);

  initial begin
    #10_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // reference rises at n*T (n >= 1)
  initial begin
    #T;
    forever begin clk_in = 1'b1; #(T / 2.0); clk_in = 1'b0; #(T / 2.0); end
  end

  function automatic logic level(input real t);
    real x;
    if (t < T) return 1'b0;
    x = t - T * $floor(t / T);
    return (x < T / 2.0);
  endfunction

  initial begin
    #(T * 0.3);
    checks++;
    if (taps !== '0) begin failures++; $display("FAIL taps not low when disabled"); end
    en = 1'b1;
    #(T * 4.0);
    for (int i = 0; i < 500; i++) begin
      real t;
      #(real'($urandom_range(37, 300)) + 0.37);
      t = $realtime;
      for (int k = 0; k < TAPS; k++) begin
        real tk, xe;
        tk = t - real'(k) * T / real'(TAPS);
        xe = tk - (T / 2.0) * $floor(tk / (T / 2.0));   // distance past an edge
        if (xe > 0.5 && xe < T / 2.0 - 0.5) begin
          checks++;
          if (taps[k] !== level(tk)) begin
            failures++;
            if (failures < 10) $display("FAIL t=%0t k=%0d got %0b", $realtime, k, taps[k]);
          end
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
