`timescale 1ps / 1fs
// freq_finder: frequency estimation with the quantisation-error calibration.
//
// One shared divider, used once per reference cycle under the control of
// op (from adpll_controller), forms in turn
//   FF_WT  : W_T   = 2^S / N                               (target)
//   FF_WMID: R_mid = r_count, W_mid = 2^S / R_mid          (DCO code 1023)
//   FF_WMIN: R_max = r_count, W_min = 2^S / R_max          (DCO code 2047)
//   FF_LMID: L_mid = W_min + (R_max - R_mid) * 2^S / (R_max * R_mid)
//   FF_CODE: x = 2^10 * (W_T - W_min) / (L_mid - W_min),
//            init_code = 2047 - x (clamped to 0..2047)
// W is the reciprocal of the period ratio, so it is a straight line in the
// DCO period; L_mid is the calibrated value of that line at the medium code,
// built from the two integer ratios so that their separate quantisation
// errors are not compounded. With use_cal low the uncalibrated W_mid is used
// in place of L_mid (the test chip's "original function").
//
// The operation sequence, the reciprocal W values, Eq. (2.19) for L_mid and
// the 2^10 factor of Eq. (2.20) follow the design description. Because the
// description's equations count the code from the fast end (code 0 at the
// minimum period) while its DCO runs fastest at code 2047, x is the distance
// from code 2047; the medium code 1023 lies 1024 = 2^10 codes away, which is
// the 2^10 of Eq. (2.20). The fixed-point scale S = W_SHIFT = 18 is this
// design's choice, taken from the 2^18 dividend of the estimation timing
// diagram. All results are registered on the rising reference edge that
// ends the cycle in which op is presented; r_count must be stable over the
// low half of that cycle. rst_n is asynchronous, active low.
module freq_finder
  import adpll_pkg::*;
#(
  parameter int unsigned CNT_W   = 12,
  parameter int unsigned W_SHIFT = 18
) (
  input  logic             clk,          // reference clock
  input  logic             rst_n,
  input  ff_op_e           op,
  input  logic [N_W-1:0]   n_factor,
  input  logic [CNT_W-1:0] r_count,
  input  logic             use_cal,
  output logic [CNT_W-1:0] r_mid,
  output logic [CNT_W-1:0] r_max,
  output logic [W_SHIFT:0] w_t,
  output logic [W_SHIFT:0] w_mid,
  output logic [W_SHIFT:0] w_min,
  output logic [W_SHIFT:0] l_mid,
  output dco_code_t        init_code
);

  localparam int unsigned DVD_W = CNT_W + W_SHIFT + 1;  // dividend width
  localparam int unsigned DVS_W = 2 * CNT_W;            // divisor width

  logic [DVD_W-1:0] dividend, quotient;
  logic [DVS_W-1:0] divisor;
  logic [W_SHIFT:0] w_top, w_span;
  logic [W_SHIFT:0] w_dist;

  // Numerator and denominator of Eq. (2.20), both clamped at zero.
  assign w_top  = use_cal ? l_mid : w_mid;
  assign w_span = (w_top > w_min) ? w_top - w_min : '0;
  assign w_dist = (w_t > w_min) ? w_t - w_min : '0;

  always_comb begin
    dividend = '0;
    divisor  = '0;
    unique case (op)
      FF_WT: begin
        dividend = DVD_W'(1) << W_SHIFT;
        divisor  = DVS_W'(n_factor);
      end
      FF_WMID, FF_WMIN: begin
        dividend = DVD_W'(1) << W_SHIFT;
        divisor  = DVS_W'(r_count);
      end
      FF_LMID: begin
        dividend = (r_max > r_mid) ? DVD_W'(r_max - r_mid) << W_SHIFT : '0;
        divisor  = DVS_W'(r_max) * DVS_W'(r_mid);
      end
      FF_CODE: begin
        dividend = DVD_W'(w_dist) << 10;
        divisor  = DVS_W'(w_span);
      end
      default: ;
    endcase
  end

  // A zero divisor (a DCO that never toggled) saturates the quotient.
  assign quotient = (divisor == '0) ? '1 : dividend / DVD_W'(divisor);

  function automatic logic [W_SHIFT:0] sat_w(input logic [DVD_W-1:0] q);
    return (q > DVD_W'({(W_SHIFT+1){1'b1}})) ? '1 : q[W_SHIFT:0];
  endfunction

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      r_mid     <= '0;
      r_max     <= '0;
      w_t       <= '0;
      w_mid     <= '0;
      w_min     <= '0;
      l_mid     <= '0;
      init_code <= '0;
    end else begin
      unique case (op)
        FF_WT:   w_t <= sat_w(quotient);
        FF_WMID: begin r_mid <= r_count; w_mid <= sat_w(quotient); end
        FF_WMIN: begin r_max <= r_count; w_min <= sat_w(quotient); end
        FF_LMID: l_mid <= sat_w(DVD_W'(w_min) + quotient);
        FF_CODE: init_code <= (quotient > DVD_W'(CODE_MAX)) ? '0
                              : CODE_MAX - dco_code_t'(quotient);
        default: ;
      endcase
    end

endmodule
