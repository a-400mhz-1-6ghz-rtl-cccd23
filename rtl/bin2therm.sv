`timescale 1ps/1fs
// bin2therm: binary-to-thermometer converter for the phase converter.
//
// Bit i of the 63-bit output is set when the 6-bit phase code is greater
// than i, so exactly `bin` low bits are set; a one-step change of the code
// changes one thermometer bit, which keeps the injection-point selection
// free of glitches. Purely combinational. The converter is named in the
// design description; the width and ordering are this design's own.
module bin2therm
  import addll_pkg::*;
(
  input  code_t              bin,
  output logic [THERM_W-1:0] therm
);
  always_comb begin
    for (int i = 0; i < THERM_W; i++)
      therm[i] = (bin > code_t'(i));
  end
endmodule
