`timescale 1ps/1fs
// tb_clock_buffer: every input edge must reappear at the output exactly
// delay_ps later (several edges in flight when the delay exceeds a period);
// the delay is then changed at run time, and the output must stay low
// while the buffer is disabled.
module tb_clock_buffer;
  logic clk_in = 1'b0, en = 1'b1, clk_out;
  int checks = 0, failures = 0;
  realtime q[$];
  real dly = 1700.0;

  clock_buffer #(.T_BUF_PS(1700.0)) dut (.clk_in, .en, .clk_out);

  initial begin
    #1_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk_in) if (en) q.push_back($realtime + dly);
  always @(posedge clk_out) begin
    realtime e;
    checks++;
    if (q.size() == 0) begin failures++; $display("FAIL spurious edge %0t", $realtime); end
    else begin
      e = q.pop_front();
      if ($realtime - e > 0.01 || e - $realtime > 0.01) begin
        failures++; $display("FAIL edge at %0t exp %0t", $realtime, e);
      end
    end
  end

  initial begin
    repeat (40) begin #312.5 clk_in = ~clk_in; end
    // drift: wait until nothing is in flight, then change the delay
    #3000;
    dly = 1763.0;
    dut.delay_ps = 1763.0;
    repeat (40) begin #312.5 clk_in = ~clk_in; end
    #3000;
    en = 1'b0;
    repeat (40) begin #312.5 clk_in = ~clk_in; end
    #3000;
    checks++;
    if (clk_out !== 1'b0 || q.size() != 0) begin failures++; $display("FAIL disabled/leftover"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
