`timescale 1ps/1fs
// tb_dpc_ilo: for random phase codes n, the ILO's rising edge must settle
// at the reference rising edge plus ((64-n) mod 64)*T/64 with a 50 % duty
// cycle, also when the reference has 40 % duty (DCD removed); with random
// edge jitter on the reference, the RMS jitter of the output must be
// clearly below that of the input (jitter filtering).
module tb_dpc_ilo;
  import addll_pkg::*;
  localparam real T = 625.0;
  logic ref_clk = 1'b0, en = 1'b0, clk_out;
  logic [THERM_W-1:0] therm = '0;
  int checks = 0, failures = 0;
  real duty = 0.5;
  real jit  = 0.0;                      // peak jitter of reference edges
  realtime t_ideal;                     // ideal (jitter-free) last ref rise
  realtime t_rise_out;

  dpc_ilo #(.T_REF_PS(T)) dut (.ref_clk, .en, .therm, .clk_out);

  initial begin
    #50_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // reference with optional duty error and edge jitter around ideal n*T
  initial begin
    realtime base;
    base = 1000.0;
    #(base);
    forever begin
      real j, dc;
      j  = jit * (real'($urandom_range(0, 2000)) / 1000.0 - 1.0);
      dc = duty;
      t_ideal = $realtime;
      #(j + jit); ref_clk = 1'b1;
      #(T * dc); ref_clk = 1'b0;
      #(T * (1.0 - dc) - j - jit);
    end
  end

  function automatic logic [THERM_W-1:0] th(input int n);
    logic [THERM_W-1:0] w;
    for (int i = 0; i < THERM_W; i++) w[i] = (i < n);
    return w;
  endfunction

  // signed phase of the output edge w.r.t. the ideal target
  function automatic real perr(input realtime t, input int n);
    real d, e;
    d = real'((64 - n) % 64) * T / 64.0;
    e = (t - t_ideal) - d - jit;
    return e - T * $floor(e / T + 0.5);
  endfunction

  initial begin
    int n;
    #1200;
    en = 1'b1;
    for (int run = 0; run < 40; run++) begin
      n = $urandom_range(0, 63);
      if (run == 5) n = 0;
      if (run == 6) n = 63;
      therm = th(n);
      duty = (run % 2) ? 0.4 : 0.5;
      repeat (20) @(posedge ref_clk);
      @(posedge clk_out); t_rise_out = $realtime;
      checks++;
      if (perr(t_rise_out, n) > 0.5 || perr(t_rise_out, n) < -0.5) begin
        failures++;
        $display("FAIL run %0d n=%0d phase error %f ps", run, n, perr(t_rise_out, n));
      end
      @(negedge clk_out);
      checks++;
      if ($realtime - t_rise_out > T / 2.0 + 0.5 || $realtime - t_rise_out < T / 2.0 - 0.5) begin
        failures++;
        $display("FAIL run %0d high time %f ps (ref duty %f)", run, $realtime - t_rise_out, duty);
      end
    end
    // jitter filtering
    begin
      real s_in, s_out;
      int cnt;
      therm = th(20);
      duty = 0.5;
      jit = 20.0;
      repeat (30) @(posedge ref_clk);
      s_in = 0.0; s_out = 0.0; cnt = 0;
      repeat (400) begin
        real ei;
        @(posedge ref_clk);
        ei = ($realtime - t_ideal) - jit;
        s_in += ei * ei;
        @(posedge clk_out);
        s_out += perr($realtime, 20) ** 2;
        cnt++;
      end
      s_in = $sqrt(s_in / cnt); s_out = $sqrt(s_out / cnt);
      $display("rms jitter in %f ps out %f ps", s_in, s_out);
      checks++;
      if (!(s_out < 0.8 * s_in)) begin failures++; $display("FAIL no jitter filtering"); end
    end
    en = 1'b0;
    repeat (3) @(posedge ref_clk);
    checks++;
    if (clk_out !== 1'b0) begin failures++; $display("FAIL output not off"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
