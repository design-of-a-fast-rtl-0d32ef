`timescale 1ps / 1fs
// tb_adpll_top: end-to-end test of the ADPLL at its default parameters,
// with a 5 MHz reference.
//
// For several multiplication factors it releases reset on a falling
// reference edge and checks that lock rises exactly 4.5 reference cycles
// later, that the frequency right after the estimation is within 2 % of
// N * 5 MHz, and (in tracking mode) that after 300 cycles the average
// output frequency is within 0.3 % of the target. Frequencies are measured
// at the output pins: div_clk_o (f_dco / 2^(m+1)) or dco_clk_o. It also runs
// every test mode (DCO fixed at minimum, at the first code, at maximum;
// which output is blocked), both estimation functions and all four output
// divide settings, and counts how often each mechanism happened: a missing
// one is a failure.
module tb_adpll_top;
  localparam real T_REF = 200_000.0;

  logic ref_clk, rst_n, change_function;
  logic [3:0] test_n;
  logic [1:0] m;
  logic [2:0] test_mode;
  logic dco_clk_o, div_clk_o, lock_o, fb_clk_o, pfd_up_o, pfd_dn_o;
  int checks = 0, failures = 0;
  realtime t_rst, t_lock;

  // mechanism counters
  int n_estimate, n_halving, n_baseline, n_up, n_dn, n_mode[4], n_block_dco, n_block_div;
  int n_cal[2], n_m[4];

  adpll_top dut (.*);

  initial begin
    ref_clk = 1'b0;
    forever #(T_REF / 2.0) ref_clk = ~ref_clk;
  end

  initial begin
    #50_000_000_000.0;
    failures++;
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge pfd_up_o) n_up++;
  always @(posedge pfd_dn_o) n_dn++;
  always @(posedge dut.baseline_valid) n_baseline++;
  always @(dut.bs_step) if (rst_n && dut.bs_step < 5'd16) n_halving++;

  function automatic int factor(input logic [3:0] c);
    return int'(adpll_pkg::test_n_factor(c));
  endfunction

  // Free-running edge counters on the two clock outputs.
  int unsigned cnt_dco = 0, cnt_div = 0;
  always @(posedge dco_clk_o) cnt_dco++;
  always @(posedge div_clk_o) cnt_div++;

  // Average frequency of dco_clk_o or div_clk_o over k reference cycles, in Hz.
  task automatic measure(input bit use_dco, input int k, output real f);
    int unsigned c0, c1;
    @(posedge ref_clk);
    c0 = use_dco ? cnt_dco : cnt_div;
    repeat (k) @(posedge ref_clk);
    c1 = use_dco ? cnt_dco : cnt_div;
    f = real'(c1 - c0) / (real'(k) * T_REF * 1.0e-12);
  endtask

  task automatic check_rel(input string what, input real got, input real exp, input real tol);
    real e;
    e = (got - exp) / exp;
    checks++;
    if (e > tol || e < -tol) begin
      failures++;
      $display("%s: %f MHz, expected %f MHz (error %f %%)", what, got / 1.0e6, exp / 1.0e6, e * 100.0);
    end else
      $display("%s: %f MHz, expected %f MHz (error %f %%)", what, got / 1.0e6, exp / 1.0e6, e * 100.0);
  endtask

  task automatic start(input logic [3:0] tn, input logic [2:0] tm, input bit cal, input logic [1:0] mm);
    rst_n = 1'b0;
    test_n = tn;
    test_mode = tm;
    change_function = cal;
    m = mm;
    repeat (2) @(posedge ref_clk);
    @(negedge ref_clk);
    rst_n = 1'b1;
    t_rst = $realtime;
    @(posedge lock_o);
    t_lock = $realtime;
    checks++;
    if (t_lock - t_rst != 4.5 * T_REF) begin
      failures++;
      $display("lock after %f reference cycles", (t_lock - t_rst) / T_REF);
    end else
      n_estimate++;
    n_mode[tm[1:0]]++;
    n_cal[cal]++;
    n_m[mm]++;
  endtask

  // Tracking run at factor code tn.
  task automatic track_run(input logic [3:0] tn, input bit cal, input int cycles);
    real f, tgt;
    tgt = real'(factor(tn)) * 5.0e6;
    start(tn, 3'd1, cal, 2'd0);
    // Frequency of the estimated code, from the DCO's period line.
    f = 1.0e12 / (680.3 + real'(2047 - int'(dut.init_code)) * 3.43);
    check_rel($sformatf("N=%0d cal=%0d estimate (code %0d)", factor(tn), cal, dut.init_code), f, tgt, 0.02);
    checks++;
    if (dut.dco_code != dut.init_code) begin
      failures++;
      $display("DCO not started at the estimated code");
    end
    repeat (cycles) @(posedge ref_clk);
    measure(0, 100, f);
    check_rel($sformatf("N=%0d cal=%0d tracked", factor(tn), cal), 2.0 * f, tgt, 0.003);
    checks++;
    if (dco_clk_o !== 1'b0) begin failures++; $display("dco_clk_o not blocked"); end
    else n_block_dco++;
  endtask

  initial begin
    real f, f0;
    // Drive a falling edge: flops clocked by the stopped DCO are reset
    // only by the edge of their asynchronous reset.
    rst_n = 1'b1;
    #1 rst_n = 1'b0;
    change_function = 1'b1;
    test_n = 4'd4;
    m = 2'd0;
    test_mode = 3'd1;

    track_run(4'd4, 1'b1, 300);     // N = 32, 160 MHz
    track_run(4'd12, 1'b1, 300);    // N = 47, 235 MHz
    track_run(4'd14, 1'b0, 300);    // N = 131, 655 MHz, original function
    track_run(4'd5, 1'b0, 300);     // N = 64, 320 MHz

    // Test mode 4: DCO at minimum frequency on dco_clk_o, div_clk_o blocked.
    start(4'd4, 3'd4, 1'b1, 2'd1);
    measure(1, 4, f);
    check_rel("minimum frequency", f, 1.0e12 / (680.3 + 2047.0 * 3.43), 0.01);
    checks++;
    if (div_clk_o !== 1'b0) begin failures++; $display("div_clk_o not blocked"); end
    else n_block_div++;
    // Test mode 7: maximum frequency.
    start(4'd4, 3'd7, 1'b1, 2'd2);
    measure(1, 4, f);
    check_rel("maximum frequency", f, 1.0e12 / 680.3, 0.01);
    n_block_div++;
    // Test mode 6: DCO fixed at the first calculated code.
    start(4'd9, 3'd6, 1'b1, 2'd3);
    measure(1, 4, f0);
    // 65 MHz is below the DCO's range: the estimate clamps to the minimum.
    check_rel("first code (N=13)", f0, 1.0e12 / (680.3 + 2047.0 * 3.43), 0.02);
    repeat (20) @(posedge ref_clk);
    measure(1, 4, f);
    checks++;
    if (f != f0) begin failures++; $display("first-code mode drifted: %f -> %f", f0, f); end
    // Test mode 0: minimum frequency through the output divider, m = 3..0.
    for (int k = 3; k >= 0; k--) begin
      start(4'd4, 3'd0, 1'b1, 2'(k));
      measure(0, 8, f);
      check_rel($sformatf("divided minimum frequency m=%0d", k), f * real'(2 << k),
                1.0e12 / (680.3 + 2047.0 * 3.43), 0.02);
    end
    // Test mode 2 and 3 through the divider.
    start(4'd6, 3'd2, 1'b1, 2'd2);
    measure(0, 8, f);
    check_rel("first code (N=128)", f * 8.0, 640.0e6, 0.02);
    start(4'd6, 3'd3, 1'b1, 2'd2);
    measure(0, 8, f);
    check_rel("maximum frequency through divider", f * 8.0, 1.0e12 / 680.3, 0.02);

    $display("mechanisms: estimate %0d, step halving %0d, baseline %0d, pfd up %0d, pfd dn %0d",
             n_estimate, n_halving, n_baseline, n_up, n_dn);
    $display("modes %0d %0d %0d %0d, blocked dco %0d div %0d, cal %0d/%0d, m %0d %0d %0d %0d",
             n_mode[0], n_mode[1], n_mode[2], n_mode[3], n_block_dco, n_block_div,
             n_cal[0], n_cal[1], n_m[0], n_m[1], n_m[2], n_m[3]);
    foreach (n_mode[i]) begin checks++; if (n_mode[i] == 0) failures++; end
    foreach (n_m[i])    begin checks++; if (n_m[i] == 0) failures++; end
    foreach (n_cal[i])  begin checks++; if (n_cal[i] == 0) failures++; end
    checks++; if (n_estimate == 0) failures++;
    checks++; if (n_halving == 0) failures++;
    checks++; if (n_baseline == 0) failures++;
    checks++; if (n_up == 0) failures++;
    checks++; if (n_dn == 0) failures++;
    checks++; if (n_block_dco == 0) failures++;
    checks++; if (n_block_div == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
