`timescale 1ps/1fs
// addll_core: synthesizable digital part of the fast-lock DLL.
//
// The whole core runs on the feedback clock `fb_clk`, the replica-buffer
// output. Its reset is the DLL enable; it is released while fb_clk is still
// silent (no edge has crossed the replica buffer yet), so no synchronizer is
// needed. Fast lock takes three fb_clk edges:
//   1  the reference delay-line taps are sampled; the coarse code selects
//      the two taps for the phase blender (blend_sel);
//   2  the four blended phases are sampled: fine code;
//   3  the 6-bit TDC code (4*coarse + fine) is registered and also loaded
//      into the tracking loop, and the mode select switches to tracking.
// Until edge 3 the phase code is 0 (no shift), so the feedback clock is the
// reference delayed by the replica buffer and the TDC measures that delay.
// In tracking mode the BBPD samples the reference at each feedback edge
// and the loop filter steps the phase code by T/64. `therm` is the
// thermometer form of the selected code, for the ILO phase converter.
// The block structure follows the design description's block diagram; the
// cycle split and clocking are this design's reading of it.
module addll_core
  import addll_pkg::*;
#(
  parameter int unsigned ACC_THRESH = 16,
  parameter int unsigned KP         = 1
) (
  input  logic                fb_clk,
  input  logic                rst_n,
  input  logic                ref_clk,
  input  logic [TAPS-1:0]     taps,
  input  logic [BLEND-1:0]    phases,
  output logic [COARSE_W-1:0] blend_sel,
  output code_t               phase_code,
  output logic [THERM_W-1:0]  therm,
  output logic                tdc_valid,
  output logic                fast_lock,
  output logic                tracking,
  output logic                step_up,
  output logic                step_dn
);
  logic  coarse_ce, fine_ce, load;
  logic  up, dn;
  code_t tdc_sum, tdc_code, trk_code;

  lock_counter u_cnt (
    .clk(fb_clk), .rst_n, .coarse_ce, .fine_ce, .load, .fast_lock, .tracking
  );

  tdc_coarse u_coarse (
    .clk(fb_clk), .rst_n, .ce(coarse_ce), .taps, .coarse(blend_sel), .valid(tdc_valid)
  );

  tdc_fine u_fine (
    .clk(fb_clk), .rst_n, .ce(fine_ce), .ld(load), .phases, .coarse(blend_sel),
    .code_sum(tdc_sum), .code(tdc_code)
  );

  bbpd u_pd (
    .clk(fb_clk), .rst_n, .en(tracking), .ref_clk, .up, .dn
  );

  loop_filter #(.ACC_THRESH(ACC_THRESH), .KP(KP)) u_lf (
    .clk(fb_clk), .rst_n, .load, .tdc_code(tdc_sum), .en(tracking), .up, .dn,
    .code(trk_code), .step_up, .step_dn
  );

  // mode select: TDC code during fast lock, tracking code afterwards
  assign phase_code = tracking ? trk_code : tdc_code;

  bin2therm u_b2t (.bin(phase_code), .therm);
endmodule
