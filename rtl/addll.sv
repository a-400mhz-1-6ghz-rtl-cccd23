`timescale 1ps/1fs
// addll: fast-lock, jitter-filtering all-digital DLL for a burst-mode
// memory interface (top level).
//
// A trigger from the command decoder wakes the link: the power manager
// powers the fast bias, then enables the DLL. The injection-locked
// oscillator starts at phase code 0, so its output, after the replica of
// the clock distribution, is the reference delayed by the buffer delay;
// this feedback clock `fb_clk` runs the digital core. On its first three
// edges the two-step TDC (delay line, coarse encoder, phase blender, fine
// encoder) measures the buffer delay modulo one cycle as a 6-bit code in
// units of T/64, and the code is applied to the ILO, which then shifts the
// clock by the complementary amount: ILO delay + buffer delay = one cycle,
// and `clk_dqs` at the end of the real clock distribution is aligned with
// the reference. The TDC is then powered down and a bang-bang phase
// detector with a digital loop filter keeps the alignment against slow
// drift in steps of T/64. Lowering `trigger` returns to the 0 mW idle
// state. The delay line, blender, ILO and both clock buffers are
// behavioural models, so this top simulates but does not synthesize; the
// synthesizable logic is power_manager and addll_core.
// Architecture and sizes follow the design description; the buffer delay
// and loop-filter threshold are this design's assumptions.
module addll
  import addll_pkg::*;
#(
  parameter real         T_REF_PS    = 625.0,
  parameter real         T_BUF_PS    = 4200.0,
  parameter int unsigned BIAS_CYCLES = 2,
  parameter int unsigned ACC_THRESH  = 16,
  parameter int unsigned KP          = 1
) (
  input  logic      ref_clk,
  input  logic      rst_n,
  input  logic      trigger,
  output logic      clk_dqs,
  output logic      fb_clk,
  output code_t     phase_code,
  output logic      tdc_valid,
  output logic      fast_lock,
  output logic      tracking,
  output logic      step_up,
  output logic      step_dn,
  output logic      bias_en,
  output logic      dll_en,
  output pm_state_t pm_state
);
  logic [TAPS-1:0]     taps;
  logic [BLEND-1:0]    phases;
  logic [COARSE_W-1:0] blend_sel;
  logic [THERM_W-1:0]  therm;
  logic                ilo_clk;
  logic                tdc_pwr;

  power_manager #(.BIAS_CYCLES(BIAS_CYCLES)) u_pm (
    .clk(ref_clk), .rst_n, .trigger, .bias_en, .dll_en, .state(pm_state)
  );

  // TDC parts are powered only during fast lock
  assign tdc_pwr = dll_en & fast_lock;

  tdc_delay_line #(.T_REF_PS(T_REF_PS)) u_dl (
    .clk_in(ref_clk), .en(tdc_pwr), .taps
  );

  phase_blender #(.T_REF_PS(T_REF_PS)) u_blend (
    .taps, .sel(blend_sel), .en(tdc_pwr), .phases
  );

  addll_core #(.ACC_THRESH(ACC_THRESH), .KP(KP)) u_core (
    .fb_clk, .rst_n(rst_n & dll_en), .ref_clk, .taps, .phases, .blend_sel,
    .phase_code, .therm, .tdc_valid, .fast_lock, .tracking, .step_up, .step_dn
  );

  dpc_ilo #(.T_REF_PS(T_REF_PS)) u_ilo (
    .ref_clk, .en(dll_en), .therm, .clk_out(ilo_clk)
  );

  // replica buffer in the feedback path
  clock_buffer #(.T_BUF_PS(T_BUF_PS)) u_replica (
    .clk_in(ilo_clk), .en(dll_en), .clk_out(fb_clk)
  );

  // the real clock distribution to the Tx
  clock_buffer #(.T_BUF_PS(T_BUF_PS)) u_dist (
    .clk_in(ilo_clk), .en(dll_en), .clk_out(clk_dqs)
  );
endmodule
