`timescale 1ps/1fs
// phase_blender: behavioural model of the fine-TDC phase blender (not
// synthesizable).
//
// Selects delay-line taps sel and sel+1 (mod 16), which are T/16 apart,
// and interpolates four phases between them: phases[j] lies j/4 of the way
// from tap sel to tap sel+1, i.e. tap sel delayed by j*T/64. The model is
// the ideal interpolator. With `en` low all outputs are low. Blending the
// two bracketing taps to T/64 follows the design description.
module phase_blender
  import addll_pkg::*;
#(
  parameter real T_REF_PS = 625.0
) (
  input  logic [TAPS-1:0]     taps,
  input  logic [COARSE_W-1:0] sel,
  input  logic                en,
  output logic [BLEND-1:0]    phases
);
  localparam real P_MIN_PS = 500.0;    // 2 GHz
  localparam real P_MAX_PS = 3000.0;   // 333 MHz
  real     step_ps = T_REF_PS / real'(PHASES);
  realtime t_last = 0.0;
  logic a;

  // the interpolation step is 1/64 of the period seen on tap 0
  always @(posedge taps[0]) begin
    if ($realtime - t_last > P_MIN_PS && $realtime - t_last < P_MAX_PS)
      step_ps = ($realtime - t_last) / real'(PHASES);
    t_last = $realtime;
  end

  assign a = taps[sel] & en;

  initial phases = '0;
  always @(a) phases[0] <= a;
  for (genvar j = 1; j < BLEND; j++) begin : g_ph
    always @(a) phases[j] <= #(step_ps * j) a;
  end
endmodule
