`timescale 1ps / 1fs
// tb_freq_finder: runs the five-step estimation sequence (W_T, W_mid,
// W_min, L_mid, init_code) for many multiplication factors, with period
// ratios taken from an ideal linear DCO (680.3 ps + (2047-code)*3.43 ps,
// 5 MHz reference, counts truncated to integers). Every register is
// compared with an integer reference model of the estimation equations,
// and the estimated code must give a DCO frequency within 3 % of N * 5 MHz
// for factors in the DCO's range. Both the calibrated and the uncalibrated
// line are exercised, and twenty random factors with counts one above or
// below the ideal test the arithmetic off the ideal points. Each result
// must appear one clock after its op.
module tb_freq_finder;
  import adpll_pkg::*;

  localparam int S = 18;

  logic clk, rst_n, use_cal;
  ff_op_e op;
  logic [N_W-1:0] n_factor;
  logic [11:0] r_count, r_mid, r_max;
  logic [S:0]  w_t, w_mid, w_min, l_mid;
  dco_code_t   init_code;
  int checks = 0, failures = 0;

  freq_finder dut (.*);

  initial begin
    clk = 1'b0;
    forever #100_000 clk = ~clk;
  end

  initial begin
    #500_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic real period_ps(input int code);
    return 680.3 + real'(2047 - code) * 3.43;
  endfunction

  task automatic check(input string what, input longint got, input longint exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("N=%0d %s: got %0d expected %0d", n_factor, what, got, exp);
    end
  endtask

  task automatic step(input ff_op_e o);
    op = o;
    @(posedge clk);
    #1;
  endtask

  task automatic run(input int n, input bit cal, input int drm = 0, input int drx = 0);
    longint rm, rx, wt, wm, wn, lm, x, top, code_exp;
    real f_est, f_tgt, err;
    rm = longint'(200_000.0 / period_ps(1023));
    rx = longint'($floor(200_000.0 / period_ps(2047)));
    rm = longint'($floor(200_000.0 / period_ps(1023)));
    rm += drm;
    rx += drx;
    n_factor = N_W'(n);
    use_cal  = cal;
    wt = (longint'(1) << S) / n;
    wm = (longint'(1) << S) / rm;
    wn = (longint'(1) << S) / rx;
    lm = wn + ((rx - rm) << S) / (rx * rm);
    top = cal ? lm : wm;
    x  = (wt > wn) ? ((wt - wn) << 10) / (top - wn) : 0;
    code_exp = (x > 2047) ? 0 : 2047 - x;
    step(FF_WT);
    check("W_T", w_t, wt);
    r_count = 12'(rm);
    step(FF_WMID);
    check("R_mid", r_mid, rm);
    check("W_mid", w_mid, wm);
    r_count = 12'(rx);
    step(FF_WMIN);
    check("R_max", r_max, rx);
    check("W_min", w_min, wn);
    r_count = 12'habc;            // must be ignored from here on
    step(FF_LMID);
    check("L_mid", l_mid, lm);
    step(FF_CODE);
    check("init_code", init_code, code_exp);
    step(FF_IDLE);
    check("init_code held", init_code, code_exp);
    f_tgt = 5.0e6 * real'(n);
    f_est = 1.0e12 / period_ps(int'(init_code));
    err   = (f_est - f_tgt) / f_tgt;
    if (drm == 0 && drx == 0 && f_tgt > 140.0e6 && f_tgt < 1.4e9) begin
      checks++;
      if (err > 0.03 || err < -0.03) begin
        failures++;
        $display("N=%0d cal=%0d: estimate %f MHz, error %f %%", n, cal, f_est / 1.0e6, err * 100.0);
      end
    end
    $display("N=%0d cal=%0d: R_mid=%0d R_max=%0d W_mid=%0d L_mid=%0d init_code=%0d error %f %%",
             n, cal, r_mid, r_max, w_mid, l_mid, init_code, err * 100.0);
  endtask

  initial begin
    rst_n = 1'b0;
    op = FF_IDLE;
    n_factor = '0;
    r_count = '0;
    use_cal = 1'b1;
    #50_000 rst_n = 1'b1;
    @(posedge clk);
    #1;
    foreach (test_n_factor_list[i]) run(test_n_factor_list[i], 1'b1);
    for (int n = 30; n <= 290; n += 13) run(n, 1'b1);
    run(30, 1'b0);
    run(52, 1'b0);
    run(150, 1'b0);
    // Random factors and counts one off the ideal (a counter's +/-1), both lines.
    repeat (20)
      run(int'($urandom_range(2, 511)), 1'($urandom_range(0, 1)),
          int'($urandom_range(0, 2)) - 1, int'($urandom_range(0, 2)) - 1);
    // Reset clears the results.
    rst_n = 1'b0;
    #10;
    check("reset", init_code, 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int test_n_factor_list[8] = '{2, 7, 13, 32, 47, 64, 73, 131};
endmodule
