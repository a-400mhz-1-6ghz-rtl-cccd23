`timescale 1ps/1fs
// tdc_coarse: coarse half of the two-step TDC.
//
// The 16 taps of the reference-clock delay line (spacing T/16) are sampled
// by the feedback clock when `ce` is high. In the sampled word a reference
// rising edge that happened k*T/16 to (k+1)*T/16 before the sampling edge
// shows as tap[k]=1, tap[k+1]=0 (indices mod 16), so `coarse` is that k:
// the taps k and k+1 bracket the reference edge and are handed to the
// phase blender through the same code. `valid` is high when the word held
// exactly one such transition; with bubbles the lowest k is used.
// Timing: taps registered at the ce edge, coarse/valid combinational from
// that register and stable until the next ce. The 16-tap, 4-bit structure
// follows the design description; the encoder is this design's own.
module tdc_coarse
  import addll_pkg::*;
(
  input  logic                clk,
  input  logic                rst_n,
  input  logic                ce,
  input  logic [TAPS-1:0]     taps,
  output logic [COARSE_W-1:0] coarse,
  output logic                valid
);
  logic [TAPS-1:0] taps_q;
  logic [TAPS-1:0] edge_at;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)  taps_q <= '0;
    else if (ce) taps_q <= taps;
  end

  always_comb begin
    for (int k = 0; k < TAPS; k++)
      edge_at[k] = taps_q[k] & ~taps_q[(k + 1) % TAPS];
  end

  always_comb begin
    coarse = '0;
    for (int k = TAPS - 1; k >= 0; k--)
      if (edge_at[k]) coarse = COARSE_W'(k);
  end

  assign valid = ($countones(edge_at) == 1);
endmodule
