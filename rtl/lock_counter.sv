`timescale 1ps/1fs
// lock_counter: fast-lock sequencer and mode select of the DLL.
//
// Runs on the feedback clock (the replica-buffer output), which starts only
// once the first reference edge has crossed the replica buffer, so the
// count naturally begins after the buffer delay. Reset (DLL disabled)
// returns it to the start. On the first three feedback edges it asserts in
// turn: coarse_ce (coarse TDC sample), fine_ce (fine TDC sample) and load
// (TDC code into the tracking register). After the third edge it leaves
// fast-lock mode (TDC may be powered down) and selects continuous tracking.
// Three cycles to lock follow the design description; how they are split
// into the three steps is this design's choice.
module lock_counter
  import addll_pkg::*;
(
  input  logic clk,
  input  logic rst_n,
  output logic coarse_ce,
  output logic fine_ce,
  output logic load,
  output logic fast_lock,
  output logic tracking
);
  lock_state_t st;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) st <= LK_COARSE;
    else begin
      unique case (st)
        LK_COARSE: st <= LK_FINE;
        LK_FINE:   st <= LK_APPLY;
        LK_APPLY:  st <= LK_TRACK;
        default:   st <= LK_TRACK;
      endcase
    end
  end

  assign coarse_ce = (st == LK_COARSE);
  assign fine_ce   = (st == LK_FINE);
  assign load      = (st == LK_APPLY);
  assign fast_lock = (st != LK_TRACK);
  assign tracking  = (st == LK_TRACK);
endmodule
