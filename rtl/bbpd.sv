`timescale 1ps/1fs
// bbpd: bang-bang phase detector of the tracking loop.
//
// The reference clock is sampled at each rising edge of the feedback clock.
// A 1 means the reference rose within the last half cycle, so the feedback
// edge is late and the phase code must go up; a 0 means it is early. A
// second flop retimes the sampler output (the sampler may go metastable).
// Outputs are registered, one decision per feedback cycle, both low when
// `en` is low. The bang-bang detector follows the design description; the
// sampling direction and the retiming flop are this design's own.
module bbpd (
  input  logic clk,
  input  logic rst_n,
  input  logic en,
  input  logic ref_clk,
  output logic up,
  output logic dn
);
  logic smp, smp_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      smp   <= 1'b0;
      smp_q <= 1'b0;
      up    <= 1'b0;
      dn    <= 1'b0;
    end else begin
      smp   <= ref_clk;
      smp_q <= smp;
      up    <= en &  smp_q;
      dn    <= en & ~smp_q;
    end
  end

  assert property (@(posedge clk) disable iff (!rst_n) !(up && dn))
    else $error("bbpd: up and dn both high");
endmodule
