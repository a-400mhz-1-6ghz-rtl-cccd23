`timescale 1ps/1fs
// loop_filter: digital loop filter and phase-code integrator.
//
// Each cycle the BBPD decision (+1 late, -1 early) is added to a signed
// accumulator. When the sum reaches +ACC_THRESH or -ACC_THRESH the 6-bit
// phase code steps up or down by KP and the accumulator clears, so the
// code moves at most KP LSB (KP*T/64) per step and the output clock stays
// free of glitches. The code wraps modulo 64, a whole clock cycle. `load`
// takes the TDC code and clears the accumulator, which gives the smooth
// hand-off from fast lock to tracking. step_up/step_dn pulse for one
// cycle with each step. Accumulate-and-step with T/64 steps and the load
// from the TDC follow the design description; ACC_THRESH and the wrap are
// this design's choices.
module loop_filter
  import addll_pkg::*;
#(
  parameter int unsigned ACC_THRESH = 16,
  parameter int unsigned KP         = 1
) (
  input  logic  clk,
  input  logic  rst_n,
  input  logic  load,
  input  code_t tdc_code,
  input  logic  en,
  input  logic  up,
  input  logic  dn,
  output code_t code,
  output logic  step_up,
  output logic  step_dn
);
  localparam int unsigned AW = $clog2(ACC_THRESH + 1) + 1;
  typedef logic signed [AW-1:0] acc_t;

  acc_t acc, acc_n;

  always_comb begin
    acc_n = acc;
    if (up && !dn) acc_n = acc + acc_t'(1);
    if (dn && !up) acc_n = acc - acc_t'(1);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      acc     <= '0;
      code    <= '0;
      step_up <= 1'b0;
      step_dn <= 1'b0;
    end else begin
      step_up <= 1'b0;
      step_dn <= 1'b0;
      if (load) begin
        acc  <= '0;
        code <= tdc_code;
      end else if (en) begin
        if (acc_n >= acc_t'(ACC_THRESH)) begin
          acc     <= '0;
          code    <= code + code_t'(KP);
          step_up <= 1'b1;
        end else if (acc_n <= -acc_t'(ACC_THRESH)) begin
          acc     <= '0;
          code    <= code - code_t'(KP);
          step_dn <= 1'b1;
        end else begin
          acc <= acc_n;
        end
      end
    end
  end
endmodule
