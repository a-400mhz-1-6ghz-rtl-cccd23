`timescale 1ps/1fs
// tdc_fine: fine half of the two-step TDC and the code adder.
//
// The phase blender places four phases at 0, 1/4, 2/4 and 3/4 of the way
// between the two coarse taps that bracket the reference edge (T/64
// apart). They are sampled by the feedback clock when `ce` is high; phase 0
// is the coarse tap and always samples high, and the number of phases 1..3
// that sampled high is the 2-bit fine code. `code_sum` = 4*coarse + fine
// is the 6-bit TDC code (combinational); `code` registers it when `ld` is
// high and holds it, 0 after reset. The 2-bit fine code and the sum into 6
// bits follow the design description; the thermometer counting is this
// design's own.
module tdc_fine
  import addll_pkg::*;
(
  input  logic                clk,
  input  logic                rst_n,
  input  logic                ce,
  input  logic                ld,
  input  logic [BLEND-1:0]    phases,
  input  logic [COARSE_W-1:0] coarse,
  output code_t               code_sum,
  output code_t               code
);
  logic [BLEND-1:0] ph_q;
  logic [FINE_W-1:0] fine;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)  ph_q <= '0;
    else if (ce) ph_q <= phases;
  end

  always_comb begin
    fine = '0;
    for (int j = 1; j < BLEND; j++)
      fine = fine + FINE_W'(ph_q[j]);
  end

  assign code_sum = code_t'({coarse, {FINE_W{1'b0}}}) + code_t'(fine);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)  code <= '0;
    else if (ld) code <= code_sum;
  end
endmodule
