`timescale 1ps / 1fs
// tb_cyclic_counter: the captured ratio must equal T_ref / T_dco within one
// count for several DCO periods (DCO running freely, not aligned with the
// reference), must be 0 when the counter is not enabled, and must
// saturate in a narrow instance. The reference is 5 MHz (200 ns).
// In addition the testbench counts the DCO's rising and falling edges in
// each high half of the reference itself, and the captured ratio must equal
// that count exactly, for the fixed periods and for thirty random periods
// across the DCO's range (680 ps to 7.7 ns).
module tb_cyclic_counter;
  localparam real T_REF = 200_000.0;

  logic rst_n, ref_clk, dco_clk, en;
  logic [11:0] r_count;
  logic [5:0]  r_small;
  real  t_dco;
  int checks = 0, failures = 0;

  cyclic_counter dut (.rst_n(rst_n), .ref_clk(ref_clk), .dco_clk(dco_clk), .en(en), .r_count(r_count));
  cyclic_counter #(.CNT_W(6)) dut_small (.rst_n(rst_n), .ref_clk(ref_clk), .dco_clk(dco_clk), .en(en), .r_count(r_small));

  initial begin
    ref_clk = 1'b0;
    forever #(T_REF / 2.0) ref_clk = ~ref_clk;
  end

  initial begin
    dco_clk = 1'b0;
    t_dco   = 4192.0;
    #37.5;
    forever #(t_dco / 2.0) dco_clk = ~dco_clk;
  end

  initial begin
    #50_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Independent edge count over the high half of the reference.
  int unsigned edges, edges_last;
  always @(posedge dco_clk or negedge dco_clk) if (ref_clk) edges++;
  always @(posedge ref_clk) edges = 0;
  always @(negedge ref_clk) edges_last = edges;

  task automatic measure(input real period, input bit enable);
    real ratio;
    t_dco = period;
    en    = enable;
    @(posedge ref_clk);
    @(posedge ref_clk);
    @(negedge ref_clk);
    #1000;
    ratio = T_REF / period;
    checks++;
    if (enable ? (real'(r_count) < ratio - 1.0 || real'(r_count) > ratio + 1.0) : (r_count != 0)) begin
      failures++;
      $display("period %f en %0d: r_count %0d expected %f", period, enable, r_count, ratio);
    end else
      $display("period %f: r_count %0d (ratio %f)", period, r_count, ratio);
    if (enable) begin
      checks++;
      if (int'(r_count) != int'(edges_last)) begin
        failures++;
        $display("period %f: r_count %0d, %0d DCO edges counted", period, r_count, edges_last);
      end
    end
  endtask

  initial begin
    rst_n = 1'b1;
    #1 rst_n = 1'b0;  // a falling edge for the asynchronous reset
    en    = 1'b0;
    #1000 rst_n = 1'b1;
    measure(4192.0, 1);   // medium code
    measure(680.3, 1);    // maximum code
    measure(7701.5, 1);   // minimum code
    measure(6666.7, 1);   // 150 MHz
    measure(1234.5, 1);
    measure(680.3, 0);
    measure(2000.0, 1);
    checks++;
    if (r_small != 6'h3f) begin failures++; $display("no saturation: %0d", r_small); end
    repeat (30) measure(680.0 + real'($urandom_range(0, 70200)) / 10.0, 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
