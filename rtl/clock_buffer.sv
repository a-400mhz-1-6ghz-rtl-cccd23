`timescale 1ps/1fs
// clock_buffer: behavioural model of the clock distribution and of its
// replica in the DLL feedback path (not synthesizable).
//
// A pure transport delay of delay_ps (initially T_BUF_PS): every edge of
// clk_in reappears at clk_out that much later, so a delay longer than a
// clock period holds several edges in flight (kept in a queue). With `en`
// low the input is seen as low (the buffer is unpowered). delay_ps is a
// variable so that a testbench can change it at run time to model supply or
// temperature drift. The delay value is this design's assumption.
module clock_buffer #(
  parameter real T_BUF_PS = 4200.0
) (
  input  logic clk_in,
  input  logic en,
  output logic clk_out
);
  real  delay_ps = T_BUF_PS;
  logic gated;

  assign gated = clk_in & en;

  // edges in flight: arrival time and new level, oldest first
  realtime t_q[$];
  logic    v_q[$];
  event    pushed;

  always @(gated) begin
    t_q.push_back($realtime + delay_ps);
    v_q.push_back(gated);
    ->pushed;
  end

  initial begin
    clk_out = 1'b0;
    forever begin
      if (t_q.size() == 0) @(pushed);
      if (t_q[0] > $realtime) #(t_q[0] - $realtime);
      clk_out = v_q.pop_front();
      void'(t_q.pop_front());
    end
  end
endmodule
