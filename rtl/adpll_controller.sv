`timescale 1ps / 1fs
// adpll_controller: sequencer and tracking logic of the fast lock-in ADPLL.
//
// After reset the controller walks through the frequency-estimation states,
// one reference cycle each, and tells the frequency finder which division
// to perform in each (ff_op):
//   ST_N     W_T = 2^S/N                      DCO off, code 0
//   ST_RMID  measure R_mid, form W_mid        DCO on, code 1023
//   ST_RMAX  measure R_max, form W_min        DCO on, code 2047
//   ST_CAL   form the calibrated L_mid        DCO off
//   ST_CALC  form init_code                   DCO off
//   ST_MAINT track                            DCO restarted with init_code
// State changes happen on rising reference edges; the cyclic counter counts
// in the high half of ST_RMID and ST_RMAX and the finder divides in the low
// half. When reset is released on a falling reference edge, ST_N lasts half
// a cycle and lock rises, with the DCO restarted at init_code and the PFD
// and feedback divider enabled, 4.5 reference cycles after reset, as in the
// design description. Stopping the DCO during ST_CAL/ST_CALC and restarting
// it on a reference rising edge aligns its phase with the reference; the
// description restarts the DCO for this purpose, and doing it here is this
// design's choice.
//
// In ST_MAINT with test_mode = TM_TRACK the controller runs a binary search
// on the DCO code: every reference cycle it adds step when the PFD reports
// the feedback late (pfd_up) and subtracts step when it reports it early
// (pfd_dn); each reversal of direction halves step, down to 1. The starting
// step, BS_STEP_INIT = 16 codes (half of one coarse stage), is this
// design's choice. Each tracked code is handed to the digital loop filter
// (track_valid, track_code); once the filter has a baseline, the DCO is
// driven by the baseline instead of the raw search code, plus a
// proportional kick of KP = 32 codes (one coarse stage) up or down for the
// cycle after each PFD decision. The search integrates the phase error and
// the filter smooths it, but without the kick that loop only oscillates;
// the kick damps it. Neither the kick nor its size comes from the design
// description, which gives no loop gains. The PFD outputs
// are sampled on the falling reference edge, half a cycle after the
// reference edge they judge. Other test modes fix the DCO at code 0
// (minimum frequency), at init_code, or at code 2047 (maximum frequency).
// rst_n is an asynchronous active-low reset. Two assertions state that lock
// and loop_en are high exactly in ST_MAINT and that the search step stays
// in range.
module adpll_controller
  import adpll_pkg::*;
#(
  parameter int unsigned BS_STEP_INIT = 16,
  parameter int unsigned KP           = 32
) (
  input  logic        clk,            // reference clock
  input  logic        rst_n,
  input  test_mode_e  test_mode,
  input  logic        pfd_up,
  input  logic        pfd_dn,
  input  dco_code_t   init_code,
  input  logic        baseline_valid,
  input  dco_code_t   baseline,
  output ctrl_state_e state,
  output ff_op_e      ff_op,
  output logic        meas_en,
  output logic        dco_en,
  output dco_code_t   dco_code,
  output logic        loop_en,
  output logic        lock,
  output logic        track_valid,
  output dco_code_t   track_code,
  output logic [4:0]  bs_step
);

  logic      first;
  logic      pd_up_s, pd_dn_s;
  logic      last_dir_up, have_dir;
  dco_code_t cur_code, next_code;
  logic      reversal;
  dco_code_t prop_code;

  // PFD decision, sampled in the middle of the reference cycle.
  always_ff @(negedge clk or negedge rst_n)
    if (!rst_n) begin
      pd_up_s <= 1'b0;
      pd_dn_s <= 1'b0;
    end else begin
      pd_up_s <= loop_en & pfd_up;
      pd_dn_s <= loop_en & pfd_dn;
    end

  always_comb begin
    unique case (state)
      ST_N:    ff_op = FF_WT;
      ST_RMID: ff_op = FF_WMID;
      ST_RMAX: ff_op = FF_WMIN;
      ST_CAL:  ff_op = FF_LMID;
      ST_CALC: ff_op = FF_CODE;
      default: ff_op = FF_IDLE;
    endcase
  end

  assign meas_en = (state == ST_RMID) || (state == ST_RMAX);

  // Binary search step.
  assign cur_code = first ? init_code : track_code;
  assign reversal = have_dir && ((pd_up_s && !last_dir_up) || (pd_dn_s && last_dir_up));

  always_comb begin
    logic [4:0] step_now;
    step_now  = (reversal && bs_step > 5'd1) ? bs_step >> 1 : bs_step;
    next_code = cur_code;
    if (pd_up_s && !pd_dn_s)
      next_code = (int'(cur_code) + int'(step_now) > int'(CODE_MAX)) ? CODE_MAX
                  : cur_code + dco_code_t'(step_now);
    else if (pd_dn_s && !pd_up_s)
      next_code = (cur_code < dco_code_t'(step_now)) ? '0 : cur_code - dco_code_t'(step_now);
  end

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      state       <= ST_N;
      dco_en      <= 1'b0;
      loop_en     <= 1'b0;
      lock        <= 1'b0;
      first       <= 1'b0;
      track_code  <= '0;
      track_valid <= 1'b0;
      bs_step     <= 5'(BS_STEP_INIT);
      last_dir_up <= 1'b0;
      have_dir    <= 1'b0;
    end else begin
      track_valid <= 1'b0;
      unique case (state)
        ST_N:    begin state <= ST_RMID; dco_en <= 1'b1; end
        ST_RMID: state <= ST_RMAX;
        ST_RMAX: begin state <= ST_CAL; dco_en <= 1'b0; end
        ST_CAL:  state <= ST_CALC;
        ST_CALC: begin
          state   <= ST_MAINT;
          dco_en  <= 1'b1;
          loop_en <= 1'b1;
          lock    <= 1'b1;
          first   <= 1'b1;
        end
        default: begin
          first <= 1'b0;
          if (test_mode == TM_TRACK) begin
            track_code  <= next_code;
            track_valid <= 1'b1;
            if (pd_up_s ^ pd_dn_s) begin
              if (reversal && bs_step > 5'd1) bs_step <= bs_step >> 1;
              last_dir_up <= pd_up_s;
              have_dir    <= 1'b1;
            end
          end else begin
            track_code <= cur_code;
          end
        end
      endcase
    end

  // Tracking code: the loop filter's baseline once it exists, plus a
  // proportional kick of KP codes in the direction of the latest decision.
  always_comb begin
    int base;
    base = (baseline_valid && !first) ? int'(baseline) : int'(cur_code);
    if (baseline_valid && !first && pd_up_s && !pd_dn_s) base = base + int'(KP);
    if (baseline_valid && !first && pd_dn_s && !pd_up_s) base = base - int'(KP);
    if (base < 0) base = 0;
    if (base > int'(CODE_MAX)) base = int'(CODE_MAX);
    prop_code = dco_code_t'(base);
  end

  always_comb begin
    unique case (state)
      ST_N:    dco_code = '0;
      ST_RMID: dco_code = CODE_MID;
      ST_RMAX, ST_CAL, ST_CALC: dco_code = CODE_MAX;
      default: begin
        unique case (test_mode)
          TM_MIN_FREQ:   dco_code = '0;
          TM_MAX_FREQ:   dco_code = CODE_MAX;
          TM_FIRST_CODE: dco_code = init_code;
          default:       dco_code = prop_code;
        endcase
      end
    endcase
  end

  // Lock and the loop enable are high exactly in the maintenance state, and
  // the search step never leaves 1..BS_STEP_INIT.
  a_lock_state: assert property (@(posedge clk) disable iff (!rst_n)
                                 lock == (state == ST_MAINT) && loop_en == lock);
  a_step_range: assert property (@(posedge clk) disable iff (!rst_n)
                                 bs_step >= 5'd1 && bs_step <= 5'(BS_STEP_INIT));

endmodule
