`timescale 1ps/1fs
// tdc_delay_line: behavioural model of the coarse TDC's delay line (not
// synthesizable).
//
// Eight differential stages, each 1/16 of the reference period, fed by the
// reference clock. The stage delay follows the measured period of the input
// (starting from T_REF_PS), standing in for a delay line biased to track the
// clock frequency. taps[k] for k < 8 is the output of stage k (the input
// delayed by k*T/16); taps[k+8] is the complement of stage k, which for a 50
// % duty clock is the input delayed by a further half cycle. The 16 taps
// thus span one clock period in steps of T/16. With `en` low all stages are
// low. Eight stages at 1/16 cycle follow the design description; the use of
// complement outputs for the second half cycle is this design's reading.
module tdc_delay_line
  import addll_pkg::*;
#(
  parameter real T_REF_PS = 625.0
) (
  input  logic            clk_in,
  input  logic            en,
  output logic [TAPS-1:0] taps
);
  localparam real P_MIN_PS = 500.0;    // 2 GHz
  localparam real P_MAX_PS = 3000.0;   // 333 MHz
  real     stage_ps = T_REF_PS / real'(TAPS);
  realtime t_last = 0.0;
  logic [STAGES-1:0] st;
  logic gated;

  // stage delay held at 1/16 of the measured input period
  always @(posedge clk_in) begin
    if ($realtime - t_last > P_MIN_PS && $realtime - t_last < P_MAX_PS)
      stage_ps = ($realtime - t_last) / real'(TAPS);
    t_last = $realtime;
  end

  assign gated = clk_in & en;

  initial st = '0;
  always @(gated) st[0] <= gated;
  for (genvar s = 1; s < STAGES; s++) begin : g_stage
    always @(st[s-1]) st[s] <= #(stage_ps) st[s-1];
  end

  // stage 0 is the line input itself; stage s adds s*T/16
  assign taps[STAGES-1:0]    = st;
  assign taps[TAPS-1:STAGES] = ~st & {STAGES{en}};
endmodule
