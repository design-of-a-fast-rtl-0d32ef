`timescale 1ps / 1fs
// tb_output_divider: for m = 0..3 the divided clock must have a period of
// 2, 4, 8 and 16 DCO periods with a 50 % duty cycle, and reset must hold it
// low.
module tb_output_divider;
  localparam real T_DCO = 700.0;

  logic rst_n, dco_clk, div_clk;
  logic [1:0] m;
  int checks = 0, failures = 0;
  realtime t0, t1, t2;

  output_divider dut (.*);

  initial begin
    dco_clk = 1'b0;
    forever #(T_DCO / 2.0) dco_clk = ~dco_clk;
  end

  initial begin
    #100_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst_n = 1'b1;
    #1 rst_n = 1'b0;  // a falling edge for the asynchronous reset
    m = 2'd0;
    #5000;
    checks++;
    if (div_clk) begin failures++; $display("high in reset"); end
    rst_n = 1'b1;
    for (int k = 0; k < 4; k++) begin
      real exp_p;
      m = 2'(k);
      exp_p = T_DCO * real'(2 << k);
      repeat (2) @(posedge div_clk);
      t0 = $realtime;
      @(negedge div_clk);
      t1 = $realtime;
      @(posedge div_clk);
      t2 = $realtime;
      checks++;
      if (t2 - t0 < exp_p - 1.0 || t2 - t0 > exp_p + 1.0) begin
        failures++;
        $display("m=%0d: period %f expected %f", k, t2 - t0, exp_p);
      end
      checks++;
      if (t1 - t0 < exp_p / 2.0 - 1.0 || t1 - t0 > exp_p / 2.0 + 1.0) begin
        failures++;
        $display("m=%0d: high time %f", k, t1 - t0);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
