`timescale 1ps/1fs
// tb_phase_blender: drives the blender from the delay-line model and checks
// that, for random tap selections, phase j equals the reference level at
// t - (sel + j/4)*T/16, i.e. the four phases step by T/64 from tap sel
// towards tap sel+1.
module tb_phase_blender;
  import addll_pkg::*;
  localparam real T = 625.0;
  logic clk_in = 1'b0, en = 1'b0;
  logic [TAPS-1:0] taps;
  logic [COARSE_W-1:0] sel = '0;
  logic [BLEND-1:0] phases;
  int checks = 0, failures = 0;

  tdc_delay_line #(.T_REF_PS(T)) u_dl (.clk_in, .en, .taps);
  phase_blender  #(.T_REF_PS(T)) dut  (.taps, .sel, .en, .phases);

  initial begin
    #10_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

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
    en = 1'b1;
    for (int i = 0; i < 200; i++) begin
      sel = COARSE_W'($urandom_range(0, TAPS - 1));
      #(T * 1.5);                      // let the new selection settle
      repeat (3) begin
        real t;
        #(real'($urandom_range(11, 200)) + 0.29);
        t = $realtime;
        for (int j = 0; j < BLEND; j++) begin
          real tk, xe;
          tk = t - (real'(sel) + real'(j) / 4.0) * T / real'(TAPS);
          xe = tk - (T / 2.0) * $floor(tk / (T / 2.0));
          if (xe > 0.5 && xe < T / 2.0 - 0.5) begin
            checks++;
            if (phases[j] !== level(tk)) begin
              failures++;
              if (failures < 10) $display("FAIL t=%0t sel=%0d j=%0d got %0b", $realtime, sel, j, phases[j]);
            end
          end
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
