`timescale 1ps/1fs
// tb_addll_core: the digital core with an ideal TDC front end in the
// testbench. For a random reference phase phi (fraction of a cycle before
// the feedback edge) the taps and blended phases are generated from phi;
// the core must select blender tap floor(16*phi) after the first feedback
// edge, keep phase code 0 until the third, then output floor(64*phi) in
// tracking mode with a matching thermometer. Then the reference level seen
// by the BBPD is held high, then low: the code must step up, then down,
// once every ACC_THRESH cycles, and steps must match the code movement.
module tb_addll_core;
  import addll_pkg::*;
  localparam int TH = 4;
  logic fb_clk = 1'b0, rst_n = 1'b1, ref_clk = 1'b0;
  logic [TAPS-1:0] taps;
  logic [BLEND-1:0] phases;
  logic [COARSE_W-1:0] blend_sel;
  code_t phase_code;
  logic [THERM_W-1:0] therm;
  logic tdc_valid, fast_lock, tracking, step_up, step_dn;
  int checks = 0, failures = 0;
  real phi = 0.0;

  addll_core #(.ACC_THRESH(TH)) dut (.fb_clk, .rst_n, .ref_clk, .taps, .phases, .blend_sel,
    .phase_code, .therm, .tdc_valid, .fast_lock, .tracking, .step_up, .step_dn);

  initial begin
    #50_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic lvl(input real x);
    real y;
    y = x - $floor(x);
    return (y < 0.5);
  endfunction

  always_comb begin
    for (int k = 0; k < TAPS; k++) taps[k] = lvl(phi - real'(k) / 16.0);
    for (int j = 0; j < BLEND; j++) phases[j] = lvl(phi - (real'(blend_sel) + real'(j) / 4.0) / 16.0);
  end

  task automatic tick();
    #312.5 fb_clk = 1'b1;
    #312.5 fb_clk = 1'b0;
  endtask

  task automatic chk(input bit cond, input string msg);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s (phi=%f code=%0d)", msg, phi, phase_code); end
  endtask

  int n_up = 0, n_dn = 0;
  always @(posedge fb_clk) begin
    #1;
    n_up += int'(step_up);
    n_dn += int'(step_dn);
  end

  initial begin
    #1;
    for (int run = 0; run < 40; run++) begin
      int exp, c0, cyc;
      phi = (real'($urandom_range(0, 6399)) + 0.5) / 6400.0;
      exp = int'($floor(phi * 64.0));
      rst_n = 1'b0; #100; rst_n = 1'b1;
      chk(phase_code == 0 && fast_lock && !tracking, "reset state");
      tick();
      chk(blend_sel == COARSE_W'(exp / 4) && tdc_valid, "coarse select");
      chk(phase_code == 0, "no shift during fast lock (1)");
      tick();
      chk(phase_code == 0 && fast_lock, "no shift during fast lock (2)");
      tick();
      chk(phase_code == code_t'(exp) && tracking && !fast_lock, "TDC code applied after 3 edges");
      chk($countones(therm) == exp, "thermometer");
      // tracking: feedback late -> code rises
      for (int dir = 1; dir >= 0; dir--) begin
        int su, sd, main;
        c0 = int'(phase_code); su = n_up; sd = n_dn;
        ref_clk = 1'(dir);
        cyc = 12 * TH;
        repeat (cyc) tick();
        main = dir ? n_up - su : n_dn - sd;
        chk(main >= (cyc - 4) / TH - 1 && main <= cyc / TH, dir ? "up step rate" : "down step rate");
        chk(phase_code == code_t'((c0 + (n_up - su) - (n_dn - sd) + 256) % 64), "steps move the code");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
