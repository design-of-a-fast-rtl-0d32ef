`timescale 1ps / 1fs
// adpll_top: fast lock-in all-digital PLL test chip.
//
// The PLL multiplies a reference clock (5 MHz in the design description) by
// a factor N chosen with test_n. Instead of searching for the DCO code, it
// first estimates it: the DCO is run at its medium code (1023) and its
// maximum code (2047) for one reference cycle each while the cyclic counter
// measures the integer period ratios R_mid and R_max; the frequency finder
// turns these into reciprocal values W, corrects the medium point for the
// counter's quantisation (L_mid), and interpolates the code whose W equals
// 1/N. 4.5 reference cycles after reset the DCO is restarted in phase with
// the reference at that code, lock rises, and the bang-bang PFD, the binary
// search in the controller and the digital loop filter take over tracking.
//
// Pins (a port for each pad signal of the test chip):
//   ref_clk            reference clock
//   rst_n              RESET, active low ("initialises the chip at 0")
//   change_function    0: estimation with the uncalibrated medium point,
//                      1: with the calibration (the improved function)
//   test_n[3:0]        multiplication factor code (2,4,...,256,7,13,19,23,
//                      47,73,131,257)
//   m[1:0]             output divider: divide by 2, 4, 8 or 16
//   test_mode[2:0]     [1:0]: 0 DCO fixed at minimum frequency, 1 tracking,
//                      2 DCO fixed at the first calculated code, 3 DCO
//                      fixed at maximum frequency; [2]: 0 blocks dco_clk_o
//                      (div_clk_o runs), 1 blocks div_clk_o (dco_clk_o runs)
//   dco_clk_o, div_clk_o, lock_o, fb_clk_o, pfd_up_o, pfd_dn_o
// The pin list, factor table, divide table and test modes follow the
// design description; the choice of the six outputs is this design's own.
// The DCO and the PFD are behavioural models; everything else is
// synthesizable.
module adpll_top
  import adpll_pkg::*;
#(
  parameter int unsigned CNT_W   = 12,
  parameter int unsigned W_SHIFT = 18
) (
  input  logic       ref_clk,
  input  logic       rst_n,
  input  logic       change_function,
  input  logic [3:0] test_n,
  input  logic [1:0] m,
  input  logic [2:0] test_mode,
  output logic       dco_clk_o,
  output logic       div_clk_o,
  output logic       lock_o,
  output logic       fb_clk_o,
  output logic       pfd_up_o,
  output logic       pfd_dn_o
);

  logic [N_W-1:0]      n_factor;
  test_mode_e          tmode;
  ctrl_state_e         state;
  ff_op_e              ff_op;
  logic                meas_en, dco_en, loop_en, lock;
  dco_code_t           dco_code, init_code, track_code, baseline;
  logic                track_valid, ff_init_ok, baseline_valid;
  logic [4:0]          bs_step;
  logic [CNT_W-1:0]    r_count, r_mid, r_max;
  logic [W_SHIFT:0]    w_t, w_mid, w_min, l_mid;
  logic [N_COARSE-1:0] coarse;
  logic [N_FINE-1:0]   fine;
  logic                dco_clk, fb_clk, div_clk;
  logic                up_raw, dn_raw, pfd_up, pfd_dn;
  logic                div_arst_n;

  assign n_factor   = test_n_factor(test_n);
  assign tmode      = test_mode_e'(test_mode[1:0]);
  assign div_arst_n = rst_n & loop_en;

  adpll_controller u_ctrl (
    .clk            (ref_clk),
    .rst_n          (rst_n),
    .test_mode      (tmode),
    .pfd_up         (pfd_up),
    .pfd_dn         (pfd_dn),
    .init_code      (init_code),
    .baseline_valid (baseline_valid),
    .baseline       (baseline),
    .state          (state),
    .ff_op          (ff_op),
    .meas_en        (meas_en),
    .dco_en         (dco_en),
    .dco_code       (dco_code),
    .loop_en        (loop_en),
    .lock           (lock),
    .track_valid    (track_valid),
    .track_code     (track_code),
    .bs_step        (bs_step)
  );

  freq_finder #(.CNT_W(CNT_W), .W_SHIFT(W_SHIFT)) u_finder (
    .clk       (ref_clk),
    .rst_n     (rst_n),
    .op        (ff_op),
    .n_factor  (n_factor),
    .r_count   (r_count),
    .use_cal   (change_function),
    .r_mid     (r_mid),
    .r_max     (r_max),
    .w_t       (w_t),
    .w_mid     (w_mid),
    .w_min     (w_min),
    .l_mid     (l_mid),
    .init_code (init_code)
  );

  cyclic_counter #(.CNT_W(CNT_W)) u_counter (
    .rst_n   (rst_n),
    .ref_clk (ref_clk),
    .dco_clk (dco_clk),
    .en      (meas_en),
    .r_count (r_count)
  );

  digital_loop_filter u_dlf (
    .clk            (ref_clk),
    .rst_n          (rst_n),
    .clear          (!loop_en),
    .code_valid     (track_valid),
    .code_in        (track_code),
    .ff_init_ok     (ff_init_ok),
    .baseline_valid (baseline_valid),
    .baseline       (baseline)
  );

  dco_encoder u_enc (
    .dco_code (dco_code),
    .coarse   (coarse),
    .fine     (fine)
  );

  dco u_dco (
    .en      (dco_en),
    .coarse  (coarse),
    .fine    (fine),
    .clk_out (dco_clk)
  );

  freq_divider u_fbdiv (
    .arst_n   (div_arst_n),
    .dco_clk  (dco_clk),
    .n_factor (n_factor),
    .fb_clk   (fb_clk)
  );

  pfd u_pfd (
    .en      (loop_en),
    .ref_clk (ref_clk),
    .fb_clk  (fb_clk),
    .up_raw  (up_raw),
    .dn_raw  (dn_raw),
    .up      (pfd_up),
    .dn      (pfd_dn)
  );

  output_divider u_outdiv (
    .rst_n   (rst_n),
    .dco_clk (dco_clk),
    .m       (m),
    .div_clk (div_clk)
  );

  assign dco_clk_o = test_mode[2] ? dco_clk : 1'b0;
  assign div_clk_o = test_mode[2] ? 1'b0 : div_clk;
  assign lock_o    = lock;
  assign fb_clk_o  = fb_clk;
  assign pfd_up_o  = up_raw;
  assign pfd_dn_o  = dn_raw;

endmodule
