`timescale 1ps/1fs
// tb_loop_filter: random BBPD decisions, enables and loads against a
// reference accumulate-and-step model kept in the testbench; checks the
// code and the step pulses every cycle, and that steps up, steps down and
// a wrap of the code through 0 all occur.
module tb_loop_filter;
  import addll_pkg::*;
  localparam int TH = 4;
  localparam int K  = 1;
  logic clk = 1'b0, rst_n = 1'b1, load = 1'b0, en = 1'b0, up = 1'b0, dn = 1'b0;
  code_t tdc_code = '0, code;
  logic step_up, step_dn;
  int checks = 0, failures = 0;

  loop_filter #(.ACC_THRESH(TH), .KP(K)) dut (.clk, .rst_n, .load, .tdc_code, .en, .up, .dn,
                                               .code, .step_up, .step_dn);

  always #312.5 clk = ~clk;

  initial begin
    #20_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int m_acc = 0, m_code = 0, n_up = 0, n_dn = 0, n_wrap = 0;
  bit m_su = 0, m_sd = 0;

  initial begin
    #1 rst_n = 1'b0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int i = 0; i < 4000; i++) begin
      int bias;
      load = ($urandom_range(0, 199) == 0);
      tdc_code = code_t'($urandom_range(0, PHASES - 1));
      en = ($urandom_range(0, 15) != 0);
      bias = (i / 500) % 2;            // long runs of mostly-up then mostly-down
      up = ($urandom_range(0, 9) < (bias ? 2 : 8));
      dn = !up && ($urandom_range(0, 9) != 0);
      // reference model
      m_su = 0; m_sd = 0;
      if (load) begin m_acc = 0; m_code = int'(tdc_code); end
      else if (en) begin
        int a;
        a = m_acc + (up && !dn ? 1 : 0) - (dn && !up ? 1 : 0);
        if (a >= TH) begin
          m_acc = 0; if (m_code + K > PHASES - 1) n_wrap++;
          m_code = (m_code + K) % PHASES; m_su = 1;
        end else if (a <= -TH) begin
          m_acc = 0; if (m_code - K < 0) n_wrap++;
          m_code = (m_code - K + PHASES) % PHASES; m_sd = 1;
        end else m_acc = a;
      end
      @(negedge clk);
      checks++;
      if (code != code_t'(m_code) || step_up != m_su || step_dn != m_sd) begin
        failures++;
        if (failures < 10) $display("FAIL i=%0d code=%0d exp=%0d su=%0b/%0b sd=%0b/%0b", i, code, m_code, step_up, m_su, step_dn, m_sd);
      end
      n_up += int'(m_su); n_dn += int'(m_sd);
    end
    checks++; if (n_up == 0) begin failures++; $display("FAIL no up step"); end
    checks++; if (n_dn == 0) begin failures++; $display("FAIL no down step"); end
    checks++; if (n_wrap == 0) begin failures++; $display("FAIL no wrap"); end
    $display("steps up=%0d down=%0d wraps=%0d", n_up, n_dn, n_wrap);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
