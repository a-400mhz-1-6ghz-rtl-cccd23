`timescale 1ps/1fs
// dpc_ilo: behavioural model of the digital-to-phase converter, an
// injection-locked oscillator (ILO) used as phase shifter (not
// synthesizable).
//
// The thermometer code selects where the reference is injected into the
// oscillator ring. With n thermometer bits set, the oscillator's rising edge
// is pulled to the reference rising edge plus ((64 - n) mod 64)*T/64, the
// complement of the buffer delay the code stands for, so that ILO delay plus
// buffer delay make a whole cycle. The oscillator runs at its own period
// (T_REF_PS until the reference has been seen), pulled slowly (over about
// 16 cycles) to the reference period, or set to it at once when the
// reference frequency changes by more than 10 %; at each
// cycle its next rising edge moves INJ_K of the way from its free-running
// time to the injected target (phase error taken modulo one period). This
// low-pass action filters high-frequency reference jitter; a change of the
// code itself moves the edge at once by the change in delay (wrapped to
// within half a period), and because the falling edge always follows half a
// period after the rising one, duty-cycle distortion of the reference does
// not reach the output. Phase-code wrap-around (63 <-> 0) moves the output
// by one step like any other step. On `en` the first rising edge is placed
// directly at the target of the first reference edge; with `en` low the
// output is low. The injection-point phase shifter, its complementary
// mapping and its jitter and DCD filtering follow the design description;
// INJ_K and the first-order model are this design's own.
module dpc_ilo
  import addll_pkg::*;
#(
  parameter real T_REF_PS = 625.0,
  parameter real INJ_K    = 0.5
) (
  input  logic               ref_clk,
  input  logic               en,
  input  logic [THERM_W-1:0] therm,
  output logic               clk_out
);
  localparam real P_MIN_PS = 500.0;    // 2 GHz
  localparam real P_MAX_PS = 3000.0;   // 333 MHz
  realtime t_ref;    // time of the latest reference rising edge
  real     t_per;    // free-running period, slowly pulled to the reference

  initial begin
    t_ref = 0.0;
    t_per = T_REF_PS;
  end

  always @(posedge ref_clk) begin
    // frequency pulling: average the reference period over ~16 cycles,
    // jump to a new frequency (change > 10 %); periods outside the
    // 400 MHz - 1.6 GHz range (first edge, gaps) are ignored
    if ($realtime - t_ref > P_MIN_PS && $realtime - t_ref < P_MAX_PS) begin
      if ($realtime - t_ref > 1.1 * t_per || $realtime - t_ref < 0.9 * t_per)
        t_per = $realtime - t_ref;
      else
        t_per = t_per + ($realtime - t_ref - t_per) / 16.0;
    end
    t_ref = $realtime;
  end

  function automatic real inj_delay();
    int n;
    n = $countones(therm);
    return real'((int'(PHASES) - n) % int'(PHASES)) * t_per / real'(PHASES);
  endfunction

  realtime r, nominal, target, nxt;
  real     err, d, d_last, dd;

  initial begin
    clk_out = 1'b0;
    forever begin
      wait (en);
      @(posedge ref_clk);
      d_last = inj_delay();
      #(d_last);
      if (en) begin
        clk_out = 1'b1;
        r = $realtime;
        while (en) begin
          #(t_per / 2.0);
          clk_out = 1'b0;
          // a new injection point moves the phase at once ...
          d       = inj_delay();
          dd      = d - d_last;
          dd      = dd - t_per * $floor(dd / t_per + 0.5);
          d_last  = d;
          nominal = r + t_per + dd;
          // ... while deviations of the reference edge are filtered
          target  = t_ref + d;
          err     = target - nominal;
          err     = err - t_per * $floor(err / t_per + 0.5);
          nxt     = nominal + INJ_K * err;
          if (nxt > $realtime) #(nxt - $realtime);
          if (!en) break;
          clk_out = 1'b1;
          r = $realtime;
        end
      end
      clk_out = 1'b0;
    end
  end
endmodule
