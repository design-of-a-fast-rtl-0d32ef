`timescale 1ps / 1fs
// tb_freq_divider: for several factors N (including odd ones and the
// test-chip values) the feedback clock must rise on the first DCO rising
// edge after release, then every N DCO periods, and stay high for
// ceil(N/2) DCO periods. While held in reset it must stay low.
module tb_freq_divider;
  import adpll_pkg::*;

  localparam real T_DCO = 1000.0;

  logic arst_n, dco_clk, fb_clk;
  logic [N_W-1:0] n_factor;
  int checks = 0, failures = 0;
  realtime t_start, t_r0, t_r1, t_f;

  freq_divider dut (.*);

  initial begin
    dco_clk = 1'b0;
    forever #(T_DCO / 2.0) dco_clk = ~dco_clk;
  end

  initial begin
    #500_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run(input int n);
    real per, high;
    arst_n   = 1'b0;
    n_factor = N_W'(n);
    repeat (3) @(posedge dco_clk);
    checks++;
    if (fb_clk) begin failures++; $display("N=%0d: output high in reset", n); end
    @(negedge dco_clk);
    arst_n  = 1'b1;
    t_start = $realtime;
    @(posedge fb_clk);
    t_r0 = $realtime;
    @(negedge fb_clk);
    t_f = $realtime;
    @(posedge fb_clk);
    t_r1 = $realtime;
    per  = t_r1 - t_r0;
    high = t_f - t_r0;
    checks++;
    if (t_r0 - t_start > T_DCO / 2.0 + 1.0) begin
      failures++;
      $display("N=%0d: first edge %f ps after release", n, t_r0 - t_start);
    end
    checks++;
    if (per < real'(n) * T_DCO - 1.0 || per > real'(n) * T_DCO + 1.0) begin
      failures++;
      $display("N=%0d: period %f expected %f", n, per, real'(n) * T_DCO);
    end
    checks++;
    if (high < real'((n + 1) / 2) * T_DCO - 1.0 || high > real'((n + 1) / 2) * T_DCO + 1.0) begin
      failures++;
      $display("N=%0d: high time %f", n, high);
    end
  endtask

  initial begin
    arst_n = 1'b1;
    #1 arst_n = 1'b0;  // a falling edge for the asynchronous reset
    n_factor = 9'd2;
    for (int c = 0; c < 16; c++) run(int'(test_n_factor(4'(c))));
    run(3);
    run(30);
    run(511);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
