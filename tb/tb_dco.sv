`timescale 1ps / 1fs
// tb_dco: checks the behavioural DCO model through its encoder.
// The period measured between rising edges must match the straight line
// 680.3 ps + (2047 - code) * 3.43 ps at several codes (within 0.01 ps),
// the oscillator must start with a rising edge when en rises, and must
// stay low after en falls.
module tb_dco;
  import adpll_pkg::*;

  dco_code_t           code;
  logic                en;
  logic [N_COARSE-1:0] coarse;
  logic [N_FINE-1:0]   fine;
  logic                clk;
  int checks = 0, failures = 0;
  realtime t0, t1;

  dco_encoder u_enc (.dco_code(code), .coarse(coarse), .fine(fine));
  dco dut (.en(en), .coarse(coarse), .fine(fine), .clk_out(clk));

  function automatic real exp_period(input int c);
    return 680.3 + real'(2047 - c) * 3.43;
  endfunction

  task automatic check_code(input int c);
    real p;
    code = dco_code_t'(c);
    @(posedge clk);
    @(posedge clk);
    t0 = $realtime;
    @(posedge clk);
    t1 = $realtime;
    p = t1 - t0;
    checks++;
    if (p < exp_period(c) - 0.01 || p > exp_period(c) + 0.01) begin
      failures++;
      $display("code %0d: period %f ps expected %f ps", c, p, exp_period(c));
    end
  endtask

  initial begin
    #100_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    en   = 1'b0;
    code = '0;
    #1000;
    checks++;
    if (clk !== 1'b0) begin failures++; $display("clock runs while disabled"); end
    en = 1'b1;
    #0.001;
    checks++;
    if (clk !== 1'b1) begin failures++; $display("no rising edge at enable"); end
    check_code(0);
    check_code(1023);
    check_code(2047);
    check_code(1);
    check_code(31);
    check_code(32);
    check_code(1500);
    en = 1'b0;
    #20_000;
    checks++;
    if (clk !== 1'b0) begin failures++; $display("clock still runs after disable"); end
    t0 = $realtime;
    #50_000;
    checks++;
    if (clk !== 1'b0) begin failures++; $display("clock toggled while disabled"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
