`timescale 1ps / 1fs
// tb_adpll_controller: the controller alone, with the frequency finder's
// init_code, the PFD decisions and the loop filter's baseline driven by the
// testbench. Checks, cycle by cycle, the state / finder-op sequence, the DCO
// code and enable in each state, the counter enable, that lock rises
// exactly 4.5 reference cycles after reset is released on a falling edge,
// the binary search against a reference model (step 16 halving on each
// reversal down to 1, clamping at 0 and 2047), the hand-over to the loop
// filter's baseline, and the three fixed test modes.
module tb_adpll_controller;
  import adpll_pkg::*;

  localparam real T_REF = 200_000.0;

  logic clk, rst_n, pfd_up, pfd_dn, baseline_valid;
  test_mode_e test_mode;
  dco_code_t init_code, baseline, dco_code, track_code;
  ctrl_state_e state;
  ff_op_e ff_op;
  logic meas_en, dco_en, loop_en, lock, track_valid;
  logic [4:0] bs_step;
  int checks = 0, failures = 0;
  realtime t_rst, t_lock;
  int m_code, m_step, m_last, m_have;

  adpll_controller dut (.*);

  initial begin
    clk = 1'b0;
    forever #(T_REF / 2.0) clk = ~clk;
  end

  initial begin
    #100_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge lock) t_lock = $realtime;

  task automatic expect_cycle(input ff_op_e e_op, input int e_code, input bit e_en, input bit e_meas);
    checks++;
    if (ff_op != e_op || int'(dco_code) != e_code || dco_en != e_en || meas_en != e_meas) begin
      failures++;
      $display("%t: op %s code %0d en %0d meas %0d, expected %s %0d %0d %0d", $realtime,
               ff_op.name(), dco_code, dco_en, meas_en, e_op.name(), e_code, e_en, e_meas);
    end
    @(posedge clk);
    #1000;
  endtask

  // Reset, then walk the estimation sequence up to the first tracking cycle.
  task automatic start(input test_mode_e tm, input int icode);
    rst_n = 1'b0;
    test_mode = tm;
    init_code = '0;
    pfd_up = 1'b0;
    pfd_dn = 1'b0;
    baseline_valid = 1'b0;
    baseline = '0;
    @(negedge clk);
    rst_n = 1'b1;
    t_rst = $realtime;
    #1000;
    expect_cycle(FF_WT,   0,    0, 0);
    expect_cycle(FF_WMID, 1023, 1, 1);
    expect_cycle(FF_WMIN, 2047, 1, 1);
    expect_cycle(FF_LMID, 2047, 0, 0);
    init_code = dco_code_t'(icode);   // the finder's result appears with this edge
    expect_cycle(FF_CODE, 2047, 0, 0);
    checks++;
    if (!lock || !loop_en || !dco_en || state != ST_MAINT) begin
      failures++;
      $display("not tracking after the estimation");
    end
    checks++;
    if (t_lock - t_rst != 4.5 * T_REF) begin
      failures++;
      $display("lock after %f reference cycles", (t_lock - t_rst) / T_REF);
    end
  endtask

  // One tracking cycle with PFD decision d (1 up, -1 down, 0 none).
  task automatic track(input int d);
    pfd_up = (d > 0);
    pfd_dn = (d < 0);
    if (d != 0) begin
      int dir;
      dir = (d > 0) ? 1 : 0;
      if (m_have && dir != m_last && m_step > 1) m_step = m_step / 2;
      m_code = m_code + (d > 0 ? m_step : -m_step);
      if (m_code < 0) m_code = 0;
      if (m_code > 2047) m_code = 2047;
      m_last = dir;
      m_have = 1;
    end
    @(posedge clk);
    #1000;
    checks++;
    if (int'(dco_code) != m_code || int'(track_code) != m_code || !track_valid || int'(bs_step) != m_step) begin
      failures++;
      $display("%t: code %0d track %0d step %0d valid %0d, expected %0d step %0d", $realtime,
               dco_code, track_code, bs_step, track_valid, m_code, m_step);
    end
  endtask

  initial begin
    rst_n = 1'b0;
    #1000;
    // Tracking mode.
    start(TM_TRACK, 1000);
    checks++;
    if (dco_code != 11'd1000) begin failures++; $display("first code %0d", dco_code); end
    m_code = 1000; m_step = 16; m_have = 0; m_last = 0;
    track(1); track(1); track(1); track(-1); track(-1); track(1); track(0);
    track(-1); track(1); track(-1); track(1); track(1); track(1);
    for (int i = 0; i < 30; i++) track(($urandom_range(0, 1) == 1) ? 1 : -1);
    checks++;
    if (m_step != 1) begin failures++; $display("step did not reach 1"); end
    // Clamping at the top.
    for (int i = 0; i < 5; i++) track(1);
    // Loop-filter baseline takes over the DCO code.
    baseline = 11'd777;
    baseline_valid = 1'b1;
    pfd_up = 1'b0;
    pfd_dn = 1'b0;
    @(negedge clk);
    #1000;
    checks++;
    if (dco_code != 11'd777) begin failures++; $display("baseline not used: %0d", dco_code); end
    // Proportional kick of 32 codes for a decision.
    pfd_up = 1'b1;
    @(negedge clk);
    #1000;
    checks++;
    if (dco_code != 11'd809) begin failures++; $display("no upward kick: %0d", dco_code); end
    pfd_up = 1'b0;
    pfd_dn = 1'b1;
    @(negedge clk);
    #1000;
    checks++;
    if (dco_code != 11'd745) begin failures++; $display("no downward kick: %0d", dco_code); end
    pfd_dn = 1'b0;
    baseline_valid = 1'b0;
    // Clamp at 2047 and 0.
    start(TM_TRACK, 2040);
    m_code = 2040; m_step = 16; m_have = 0; m_last = 0;
    track(1); track(1);
    start(TM_TRACK, 5);
    m_code = 5; m_step = 16; m_have = 0; m_last = 0;
    track(-1);
    // Fixed test modes ignore the PFD.
    start(TM_MIN_FREQ, 900);
    pfd_up = 1'b1;
    repeat (3) @(posedge clk);
    checks++;
    if (dco_code != 11'd0) begin failures++; $display("min mode code %0d", dco_code); end
    start(TM_MAX_FREQ, 900);
    pfd_dn = 1'b1;
    repeat (3) @(posedge clk);
    checks++;
    if (dco_code != 11'd2047) begin failures++; $display("max mode code %0d", dco_code); end
    start(TM_FIRST_CODE, 900);
    pfd_up = 1'b1;
    repeat (3) @(posedge clk);
    checks++;
    if (dco_code != 11'd900) begin failures++; $display("first-code mode code %0d", dco_code); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
