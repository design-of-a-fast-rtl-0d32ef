`timescale 1ps / 1fs
// dco_encoder: turns the 11-bit DCO control code into the thermometer codes
// that drive the DCO's coarse and fine stages.
//
// dco_code[10:5] (0..63) selects the coarse delay: coarse[i] is 1 for every
// stage index i at or above the coarse value, so coarse value 2 gives
// coarse[1:0] = 0 and coarse[62:2] = 1, the pattern of the design
// description's example. A larger coarse value removes stages from the
// delay path and raises the frequency.
// dco_code[4:0] (0..31) selects the fine interpolation: fine[j] is 1 for
// j below the fine value, so fine value 29 gives fine[28:0] = 1 and
// fine[30:29] = 0, as in the description. Each enabled buffer moves the
// interpolated edge one 1/32 of a coarse step towards the faster tap.
//
// The field split and the two thermometer examples follow the design
// description; which direction of the code is "faster" is this design's
// choice, made so that code 2047 is the maximum frequency as the
// estimation sequence requires. Purely combinational, no clock.
module dco_encoder
  import adpll_pkg::*;
(
  input  dco_code_t             dco_code,
  output logic [N_COARSE-1:0]   coarse,
  output logic [N_FINE-1:0]     fine
);

  logic [COARSE_W-1:0] c_val;
  logic [FINE_W-1:0]   f_val;

  assign c_val = dco_code[CODE_W-1:FINE_W];
  assign f_val = dco_code[FINE_W-1:0];

  always_comb begin
    for (int i = 0; i < N_COARSE; i++) coarse[i] = (i >= int'(c_val));
    for (int j = 0; j < N_FINE; j++)   fine[j]   = (j <  int'(f_val));
  end

endmodule
