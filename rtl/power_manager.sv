`timescale 1ps/1fs
// power_manager: wakes the DLL from its 0 mW idle state on a command trigger.
//
// A row or column access from the CA decoder raises `trigger`. The manager
// first powers the fast bias for BIAS_CYCLES reference cycles, then raises
// `dll_en`, which starts the DLL's fast-lock sequence; `bias_en` stays on
// while the DLL runs. When `trigger` drops the link returns to idle at the
// next reference edge with both enables low. Runs on the reference clock,
// which keeps running in idle; `trigger` is taken as synchronous to it.
// The sequence idle -> fast bias -> DLL follows the design description; the
// bias time and the immediate power-down are this design's choices.
module power_manager
  import addll_pkg::*;
#(
  parameter int unsigned BIAS_CYCLES = 2
) (
  input  logic      clk,
  input  logic      rst_n,
  input  logic      trigger,
  output logic      bias_en,
  output logic      dll_en,
  output pm_state_t state
);
  localparam int unsigned CW = (BIAS_CYCLES > 1) ? $clog2(BIAS_CYCLES + 1) : 1;
  logic [CW-1:0] cnt;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= PM_IDLE;
      cnt   <= '0;
    end else if (!trigger) begin
      state <= PM_IDLE;
      cnt   <= '0;
    end else begin
      unique case (state)
        PM_IDLE: begin
          state <= PM_BIAS;
          cnt   <= '0;
        end
        PM_BIAS: begin
          if (cnt == CW'(BIAS_CYCLES - 1)) state <= PM_ACTIVE;
          else                             cnt   <= cnt + 1'b1;
        end
        default: state <= PM_ACTIVE;
      endcase
    end
  end

  assign bias_en = (state != PM_IDLE);
  assign dll_en  = (state == PM_ACTIVE);
endmodule
