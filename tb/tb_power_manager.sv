`timescale 1ps/1fs
// tb_power_manager: checks the wake-up sequence idle -> fast bias (for
// BIAS_CYCLES reference cycles) -> DLL enabled, and the immediate return to
// idle when the trigger drops, against a cycle count kept in the testbench,
// for random trigger patterns and two bias lengths.
module tb_power_manager;
  import addll_pkg::*;
  logic clk = 1'b0, rst_n = 1'b1, trigger = 1'b0;
  logic bias_en, dll_en;
  pm_state_t state;
  int checks = 0, failures = 0;

  localparam int unsigned NB = 3;
  power_manager #(.BIAS_CYCLES(NB)) dut (.clk, .rst_n, .trigger, .bias_en, .dll_en, .state);

  always #312.5 clk = ~clk;

  initial begin
    #2_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // reference: cycles since trigger went high (0 when low)
  int hi_cnt = 0;
  int wakeups = 0;
  always @(posedge clk) begin
    #1;
    if (rst_n) begin
      checks++;
      if (bias_en !== (hi_cnt > 0) || dll_en !== (hi_cnt > NB)) begin
        failures++;
        $display("FAIL t=%0t hi_cnt=%0d bias_en=%0b dll_en=%0b", $time, hi_cnt, bias_en, dll_en);
      end
      if (dll_en && state != PM_ACTIVE) failures++;
    end
  end
  always @(posedge clk) begin
    if (!rst_n || !trigger) hi_cnt <= 0;
    else hi_cnt <= hi_cnt + 1;
    if (rst_n && trigger && hi_cnt == NB) wakeups <= wakeups + 1;
  end

  initial begin
    #1 rst_n = 1'b0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    for (int i = 0; i < 300; i++) begin
      @(negedge clk);
      if ($urandom_range(0, 9) == 0) trigger = ~trigger;
    end
    checks++;
    if (wakeups < 3) begin failures++; $display("FAIL only %0d wake-ups", wakeups); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
