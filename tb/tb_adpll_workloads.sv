`timescale 1ps / 1fs
// tb_adpll_workloads: the ADPLL at its default parameters with a 5 MHz
// reference, run at multiplication factors that the test-chip pins cannot
// select (the Test_N pins reach only sixteen factors, the loop itself takes
// any N from 2 to 511).
//
// The factor is forced onto the top's internal n_factor net. The factors are
// 52 (260 MHz) and 30 (150 MHz), the two cases used to illustrate the fast
// lock, 44 (220 MHz), the factor at which the estimation error is quoted, and
// 26, 200 and 290, which spread over the DCO's range (130 MHz to 1.47 GHz)
// with a 5 MHz reference. For each it checks:
//   - lock rises 4.5 reference cycles after reset is released;
//   - the first DCO code gives a frequency within 1 % of N * 5 MHz (the
//     frequency is computed from the code with the DCO's period line); at
//     N = 290, a few codes below the top of the range, where one count of
//     R_max moves the estimate by about 1 %, the limit is 2 %;
//   - after 300 tracking cycles the average output frequency over 100
//     reference cycles is within 0.3 % of the target.
// Both estimation functions (with and without the calibration) are run.
module tb_adpll_workloads;
  localparam real T_REF = 200_000.0;

  logic ref_clk, rst_n, change_function;
  logic [3:0] test_n;
  logic [1:0] m;
  logic [2:0] test_mode;
  logic dco_clk_o, div_clk_o, lock_o, fb_clk_o, pfd_up_o, pfd_dn_o;
  int checks = 0, failures = 0;
  realtime t_rst;

  adpll_top dut (.*);

  initial begin
    ref_clk = 1'b0;
    forever #(T_REF / 2.0) ref_clk = ~ref_clk;
  end

  initial begin
    #60_000_000_000.0;
    failures++;
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int unsigned cnt_div = 0;
  always @(posedge div_clk_o) cnt_div++;

  task automatic check_rel(input string what, input real got, input real exp, input real tol);
    real e;
    e = (got - exp) / exp;
    checks++;
    if (e > tol || e < -tol) failures++;
    $display("%s: %f MHz, expected %f MHz (error %f %%)%s", what, got / 1.0e6, exp / 1.0e6,
             e * 100.0, (e > tol || e < -tol) ? "  FAIL" : "");
  endtask

  task automatic run(input int n, input bit cal, input real est_tol = 0.01);
    real f, tgt;
    int unsigned c0;
    tgt = real'(n) * 5.0e6;
    rst_n = 1'b0;
    change_function = cal;
    force dut.n_factor = 9'(n);
    repeat (2) @(posedge ref_clk);
    @(negedge ref_clk);
    rst_n = 1'b1;
    t_rst = $realtime;
    @(posedge lock_o);
    checks++;
    if ($realtime - t_rst != 4.5 * T_REF) begin
      failures++;
      $display("N=%0d: lock after %f reference cycles", n, ($realtime - t_rst) / T_REF);
    end
    f = 1.0e12 / (680.3 + real'(2047 - int'(dut.init_code)) * 3.43);
    check_rel($sformatf("N=%0d cal=%0d first code %0d", n, cal, dut.init_code), f, tgt, est_tol);
    repeat (300) @(posedge ref_clk);
    c0 = cnt_div;
    repeat (100) @(posedge ref_clk);
    f = 2.0 * real'(cnt_div - c0) / (100.0 * T_REF * 1.0e-12);
    check_rel($sformatf("N=%0d cal=%0d tracked", n, cal), f, tgt, 0.003);
  endtask

  initial begin
    int unsigned seed_pick;
    // Drive a falling edge: flops clocked by the stopped DCO are reset
    // only by the edge of their asynchronous reset.
    rst_n = 1'b1;
    #1 rst_n = 1'b0;
    change_function = 1'b1;
    test_n = 4'($urandom_range(0, 15));  // ignored: n_factor is forced
    m = 2'd0;
    test_mode = 3'd1;
    run(52, 1'b1);
    run(30, 1'b1);
    run(44, 1'b1);
    run(26, 1'b1);
    run(200, 1'b1);
    run(290, 1'b1, 0.02);  // 3 codes below the top: R_max's +/-1 count dominates
    seed_pick = $urandom_range(0, 2);
    run(seed_pick == 0 ? 52 : seed_pick == 1 ? 30 : 44, 1'b0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
