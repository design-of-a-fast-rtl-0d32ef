`timescale 1ps / 1fs
// adpll_pkg: types, widths and constants shared by the fast lock-in ADPLL.
//
// The 11-bit DCO control code, its split into a 6-bit coarse field and a
// 5-bit fine field, the medium (1023) and maximum (2047) codes used by the
// frequency estimation, and the Test_N table of the test chip follow the
// design description. The fixed-point scale of the W values (2^18), the
// count width of the cyclic counter and the initial binary-search step are
// this design's own choices and are documented where they are used.
package adpll_pkg;

  // DCO control code: dco_code[10:5] coarse, dco_code[4:0] fine.
  localparam int unsigned CODE_W     = 11;
  localparam int unsigned COARSE_W   = 6;
  localparam int unsigned FINE_W     = 5;
  localparam int unsigned N_COARSE   = 63;   // coarse-tuning stages
  localparam int unsigned N_FINE     = 31;   // tri-state buffers per interpolator array
  localparam logic [CODE_W-1:0] CODE_MID = 11'd1023;
  localparam logic [CODE_W-1:0] CODE_MAX = 11'd2047;

  // Multiplication factor (feedback divide ratio), 1..511.
  localparam int unsigned N_W = 9;

  typedef logic [CODE_W-1:0] dco_code_t;

  // States of the ADPLL controller (Reset is the asynchronous reset itself;
  // ST_N is the half cycle in which W_T = 2^S / N is formed).
  typedef enum logic [2:0] {
    ST_N     = 3'd0,
    ST_RMID  = 3'd1,
    ST_RMAX  = 3'd2,
    ST_CAL   = 3'd3,
    ST_CALC  = 3'd4,
    ST_MAINT = 3'd5
  } ctrl_state_e;

  // Operation of the frequency finder's shared divider in the current cycle.
  typedef enum logic [2:0] {
    FF_IDLE = 3'd0,
    FF_WT   = 3'd1,   // W_T   = 2^S / N
    FF_WMID = 3'd2,   // W_mid = 2^S / R_mid
    FF_WMIN = 3'd3,   // W_min = 2^S / R_max
    FF_LMID = 3'd4,   // L_mid = W_min + (R_max - R_mid) * 2^S / (R_max * R_mid)
    FF_CODE = 3'd5    // init_code from Eq. (2.20)
  } ff_op_e;

  // Test_Mode[1:0]: what the DCO does after the estimation.
  typedef enum logic [1:0] {
    TM_MIN_FREQ   = 2'd0,
    TM_TRACK      = 2'd1,
    TM_FIRST_CODE = 2'd2,
    TM_MAX_FREQ   = 2'd3
  } test_mode_e;

  // Test_N pin code to multiplication factor (test chip table).
  function automatic logic [N_W-1:0] test_n_factor(input logic [3:0] code);
    unique case (code)
      4'd0:  return 9'd2;
      4'd1:  return 9'd4;
      4'd2:  return 9'd8;
      4'd3:  return 9'd16;
      4'd4:  return 9'd32;
      4'd5:  return 9'd64;
      4'd6:  return 9'd128;
      4'd7:  return 9'd256;
      4'd8:  return 9'd7;
      4'd9:  return 9'd13;
      4'd10: return 9'd19;
      4'd11: return 9'd23;
      4'd12: return 9'd47;
      4'd13: return 9'd73;
      4'd14: return 9'd131;
      default: return 9'd257;
    endcase
  endfunction

endpackage
