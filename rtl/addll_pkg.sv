`timescale 1ps/1fs
// addll_pkg: sizes and state types shared by the DLL blocks.
// The 6-bit phase code (64 steps per clock cycle), the 4-bit coarse and
// 2-bit fine TDC codes and the 16 delay-line taps follow the design
// description; the state encodings are this design's own.
package addll_pkg;
  localparam int unsigned CODE_W   = 6;             // phase code width
  localparam int unsigned PHASES   = 1 << CODE_W;   // 64 steps of T/64
  localparam int unsigned COARSE_W = 4;             // coarse TDC code
  localparam int unsigned FINE_W   = 2;             // fine TDC code
  localparam int unsigned TAPS     = 1 << COARSE_W; // 16 taps of T/16
  localparam int unsigned STAGES   = TAPS / 2;      // 8 differential stages
  localparam int unsigned BLEND    = 1 << FINE_W;   // 4 blended phases
  localparam int unsigned THERM_W  = PHASES - 1;    // 63-bit thermometer

  typedef logic [CODE_W-1:0] code_t;

  // power manager phases of a burst (idle -> fast bias -> DLL active)
  typedef enum logic [1:0] {
    PM_IDLE   = 2'd0,
    PM_BIAS   = 2'd1,
    PM_ACTIVE = 2'd2
  } pm_state_t;

  // fast-lock sequencer
  typedef enum logic [2:0] {
    LK_COARSE = 3'd0,   // first feedback edge: sample coarse TDC
    LK_FINE   = 3'd1,   // second edge: sample fine TDC
    LK_APPLY  = 3'd2,   // third edge: apply code, hand off
    LK_TRACK  = 3'd3    // continuous active tracking
  } lock_state_t;
endpackage
