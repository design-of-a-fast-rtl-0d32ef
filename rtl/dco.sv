// dco: behavioural model of the monotonic digitally controlled oscillator.
// This is a behavioural model, not synthesizable logic: the real part is a
// ring of 63 NAND-based coarse-tuning stages followed by an interpolating
// fine-tuning stage of two parallel arrays of 31 tri-state buffers, whose
// frequency is set by delays of placed standard cells.
//
// Ports are those of the real oscillator: the coarse and fine thermometer
// codes from dco_encoder, an enable that starts and stops the ring, and the
// clock output. The model recovers the code from the thermometer codes
// (coarse value = number of zero bits of coarse, fine value = number of one
// bits of fine, code = 32*coarse + fine) and makes the period a straight
// line in the code:
//     period = T_MIN_PS + (2047 - code) * T_STEP_PS
// The defaults, 680.3 ps (1.47 GHz) at code 2047 and 3.43 ps per code step
// (129.8 MHz at code 0), are the operating range and time resolution the
// design description reports; the straight line stands for its monotonic,
// low-DNL response. The period is re-read at every half period, so a code
// change takes effect at the next edge.
//
// Timing: when en rises the output rises at once (no insertion delay), so a
// DCO restarted by an enable launched on a reference rising edge starts in
// phase with the reference. When en falls the current period is completed
// and the output rests low.
`timescale 1ps / 1fs
module dco
  import adpll_pkg::*;
#(
  parameter real T_MIN_PS  = 680.3,
  parameter real T_STEP_PS = 3.43
) (
  input  logic                 en,
  input  logic [N_COARSE-1:0]  coarse,
  input  logic [N_FINE-1:0]    fine,
  output logic                 clk_out
);

  int unsigned code_now;
  real         half_ps;

  always_comb begin
    int unsigned c_val, f_val;
    c_val = 0;
    f_val = 0;
    for (int i = 0; i < N_COARSE; i++) if (!coarse[i]) c_val++;
    for (int j = 0; j < N_FINE; j++)   if (fine[j])    f_val++;
    code_now = c_val * 32 + f_val;
  end

  assign half_ps = (T_MIN_PS + real'(2047 - int'(code_now)) * T_STEP_PS) / 2.0;

  initial clk_out = 1'b0;

  always begin
    wait (en);
    clk_out = 1'b1;
    #(half_ps);
    clk_out = 1'b0;
    #(half_ps);
  end

endmodule
