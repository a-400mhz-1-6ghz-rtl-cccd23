`timescale 1ps/1fs
// tb_addll: end-to-end test of the burst-mode DLL at its default
// parameters, with a 1.6 GHz reference (3.2 Gb/s) in the first three
// bursts and a 400 MHz reference (800 Mb/s) in the fourth.
//
// Bursts are started and ended with the trigger. In each burst the test
// checks: bias before DLL enable; fast lock in exactly three feedback
// cycles; the TDC code against the buffer delay worked out here
// (floor(64*(T_buf mod T)/T)); the first DQS edge after hand-off within
// 33 mUI of the reference edge and no later than 2*T_buf + 5*T after DLL
// enable; and DQS staying within two steps (T/64 each) of the reference
// while tracking. Within bursts it applies a buffer-delay drift in both
// directions (the tracking loop must step the code and re-align), 40 % and
// 60 % reference duty cycles (DQS must stay at 50 %), and a buffer delay just
// short of a whole number of cycles (the code must wrap between 63 and 0),
// and a wake-up with a 40 % duty reference, where the fast-lock code may be
// off and the tracking loop must pull the phase in.
// Each mechanism is counted and a failure is counted for any that never
// happened.
module tb_addll;
  import addll_pkg::*;
  real T   = 625.0;                      // reference period, changed between bursts
  real LSB = 625.0 / 64.0;
  logic ref_clk = 1'b0, rst_n = 1'b1, trigger = 1'b0;
  logic clk_dqs, fb_clk, tdc_valid, fast_lock, tracking, step_up, step_dn, bias_en, dll_en;
  code_t phase_code;
  pm_state_t pm_state;
  int checks = 0, failures = 0;
  real duty = 0.5;
  real t_buf = 4200.0;
  real dcd_duty[2] = '{0.4, 0.6};

  addll dut (.ref_clk, .rst_n, .trigger, .clk_dqs, .fb_clk, .phase_code, .tdc_valid, .fast_lock,
             .tracking, .step_up, .step_dn, .bias_en, .dll_en, .pm_state);

  initial begin
    #20_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // reference clock, rising edges at n*T
  realtime t_ref;
  initial begin
    t_ref = 0.0;
    #T;
    forever begin
      real dc;
      dc = duty;
      ref_clk = 1'b1; t_ref = $realtime;
      #(T * dc) ref_clk = 1'b0;
      #(T * (1.0 - dc));
    end
  end

  // DQS edge timing relative to the latest reference edge
  realtime t_dqs_rise;
  real dqs_err, dqs_high;
  int  dqs_edges = 0;
  always @(posedge clk_dqs) begin
    real e;
    e = $realtime - t_ref;
    dqs_err = e - T * $floor(e / T + 0.5);
    t_dqs_rise = $realtime;
    dqs_edges++;
  end
  always @(negedge clk_dqs) dqs_high = $realtime - t_dqs_rise;

  // mechanism counters
  int n_lock = 0, n_switch = 0, n_up = 0, n_dn = 0, n_wrap = 0, n_off = 0, n_dcd = 0, n_drift = 0;
  code_t last_code;
  always @(posedge fb_clk) begin
    #1;
    if (tracking) begin
      n_up += int'(step_up);
      n_dn += int'(step_dn);
      if ((last_code == 63 && phase_code == 0) || (last_code == 0 && phase_code == 63)) n_wrap++;
    end
    last_code = phase_code;
  end

  task automatic chk(input bit cond, input string msg);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s at %0t (code=%0d err=%f ps)", msg, $time, phase_code, dqs_err); end
  endtask

  function automatic int exp_code(input real tb);
    real ph;
    ph = tb - T * $floor(tb / T);
    return int'($floor(ph / LSB));
  endfunction

  // hold DQS within `lim` steps for n cycles
  task automatic hold_aligned(input int n, input real lim, input string msg);
    int bad;
    real worst;
    bad = 0;
    worst = 0.0;
    repeat (n) begin
      @(posedge clk_dqs); #1;
      if (dqs_err > lim * LSB || dqs_err < -lim * LSB) bad++;
      if (dqs_err > worst) worst = dqs_err;
      if (-dqs_err > worst) worst = -dqs_err;
    end
    chk(bad == 0, $sformatf("%s (worst %0.2f ps)", msg, worst));
  endtask

  task automatic set_buffer(input real d);
    t_buf = d;
    dut.u_replica.delay_ps = d;
    dut.u_dist.delay_ps = d;
  endtask

  // one burst: wake up, check the fast lock, track for n_track DQS cycles
  // (strict = 0: the fast-lock residual is only reported, and tracking is
  // checked after the loop has had time to pull in)
  task automatic burst(input int n_track, input bit strict = 1'b1);
    realtime t_en;
    int fb_cnt, ec;
    @(negedge ref_clk) trigger = 1'b1;
    @(posedge bias_en);
    chk(!dll_en, "bias comes before DLL enable");
    @(posedge dll_en); t_en = $realtime;
    fb_cnt = 0;
    while (!tracking) begin @(posedge fb_clk); #1; fb_cnt++; end
    n_switch++;
    chk(fb_cnt == 3, $sformatf("fast lock in 3 feedback cycles (took %0d)", fb_cnt));
    ec = exp_code(t_buf);
    if (strict) chk(int'(phase_code) == ec, $sformatf("TDC code %0d, expected %0d", phase_code, ec));
    else begin
      // with a duty error d the complement taps shift the edge by up to d*T
      int dc;
      dc = (int'(phase_code) - ec + 96) % 64 - 32;
      chk(dc <= 7 && dc >= -7, $sformatf("TDC code %0d within 7 of %0d", phase_code, ec));
    end
    // first DQS edge launched by the ILO after the hand-off: the new phase
    // is scheduled by the ILO within half a cycle and needs one
    // clock-distribution delay to reach the output
    #(t_buf + T / 2.0);
    @(posedge clk_dqs); #1;
    if (strict) chk(dqs_err < 0.033 * T && dqs_err > -0.033 * T, "residual error after fast lock < 33 mUI");
    chk($realtime - t_en <= 2.0 * t_buf + 5.0 * T, $sformatf("locked DQS %0.0f ps after enable", $realtime - t_en));
    $display("burst: T_buf=%0.1f code=%0d lock-to-DQS %0.0f ps, residual %0.2f ps", t_buf, phase_code,
             $realtime - t_en, dqs_err);
    n_lock++;
    if (!strict) repeat (n_track) @(posedge ref_clk);
    hold_aligned(n_track, 2.0, "DQS aligned while tracking");
  endtask

  task automatic sleep();
    @(negedge ref_clk) trigger = 1'b0;
    repeat (2) @(posedge ref_clk);
    #1;
    chk(!dll_en && !bias_en && pm_state == PM_IDLE, "idle after trigger drops");
    #(t_buf + 2.0 * T);
    begin
      int e0;
      e0 = dqs_edges;
      #(5.0 * T);
      chk(dqs_edges == e0, "no DQS clock in idle");
    end
    n_off++;
  endtask

  initial begin
    #1 rst_n = 1'b0;
    repeat (3) @(posedge ref_clk);
    rst_n = 1'b1;
    repeat (5) @(posedge ref_clk);
    chk(!dll_en && !bias_en && dqs_edges == 0, "idle after reset");
    // The core's reset is rst_n AND dll_en. In a two-state simulation an
    // asynchronous reset acts on its falling edge, which that AND may not
    // have had yet; one short enable pulse (before any feedback edge can
    // arrive) gives it one.
    @(negedge ref_clk) trigger = 1'b1;
    @(posedge dll_en);
    @(negedge ref_clk) trigger = 1'b0;
    #(t_buf + 4.0 * T);
    dqs_edges = 0;

    // burst 1: default buffer delay, drift both ways
    burst(200);
    begin
      code_t c0;
      int u0, d0;
      c0 = phase_code; u0 = n_up; d0 = n_dn;
      set_buffer(t_buf + 60.0);                // slower buffer: code must rise
      repeat (600) @(posedge ref_clk);
      hold_aligned(100, 2.0, "re-aligned after +60 ps drift");
      chk(n_up - u0 >= 4, "tracking stepped up for +60 ps drift");
      c0 = phase_code; u0 = n_up; d0 = n_dn;
      set_buffer(t_buf - 100.0);               // faster buffer: code must fall
      repeat (900) @(posedge ref_clk);
      hold_aligned(100, 2.0, "re-aligned after -100 ps drift");
      chk(n_dn - d0 >= 8, "tracking stepped down for -100 ps drift");
      n_drift += 2;
    end
    // duty-cycle distortion of the reference, -10 % and +10 %
    foreach (dcd_duty[i]) begin
      duty = dcd_duty[i];
      repeat (100) @(posedge ref_clk);
      hold_aligned(100, 2.0, $sformatf("aligned with %0.0f %% reference duty", 100.0 * duty));
      @(negedge clk_dqs); #1;
      chk(dqs_high > T / 2.0 - 2.0 && dqs_high < T / 2.0 + 2.0,
          $sformatf("DQS duty 50 %% with %0.0f %% reference (high %0.1f ps)", 100.0 * duty, dqs_high));
      n_dcd++;
    end
    duty = 0.5;
    sleep();

    // burst 2: buffer just short of 7 cycles, code sits at the 63/0 wrap
    set_buffer(7.0 * T - 1.0);
    burst(400);
    sleep();

    // burst 3: wake-up with a 40 % duty reference; the complement taps of
    // the delay line then misplace the edge by up to the duty error, and
    // the tracking loop must pull the phase in
    set_buffer(4200.0);
    duty = 0.4;
    repeat (5) @(posedge ref_clk);
    burst(400, 1'b0);
    sleep();
    duty = 0.5;

    // burst 4: 400 MHz reference (800 Mb/s), a different buffer delay;
    // the reference keeps running in idle, so the new frequency is seen
    // before the trigger
    T = 2500.0;
    LSB = T / 64.0;
    repeat (20) @(posedge ref_clk);
    set_buffer(3333.0);
    burst(100);
    hold_aligned(100, 2.0, "aligned at 400 MHz");
    sleep();

    chk(n_lock == 4,  "fast locks");
    chk(n_switch == 4, "mode switches to tracking");
    chk(n_up > 0,     "tracking steps up");
    chk(n_dn > 0,     "tracking steps down");
    chk(n_wrap > 0,   "phase code wrap");
    chk(n_off == 4,   "power-downs to idle");
    chk(n_dcd > 0,    "DCD correction");
    chk(n_drift > 0,  "drift tracking");
    $display("mechanisms: lock=%0d switch=%0d up=%0d down=%0d wrap=%0d off=%0d dcd=%0d drift=%0d",
             n_lock, n_switch, n_up, n_dn, n_wrap, n_off, n_dcd, n_drift);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
