`timescale 1ps / 1fs
// tb_pfd: drives a 5 MHz reference and a feedback clock of the same
// frequency with a chosen phase offset. A late feedback must give up = 1,
// dn = 0; an early feedback dn = 1, up = 0; an offset inside the 17 ps dead
// zone neither. The raw up/dn flip-flops must be reset after both edges, and
// a disabled detector must output nothing.
module tb_pfd;
  localparam real T_REF = 200_000.0;

  logic en, ref_clk, fb_clk = 1'b0, up_raw, dn_raw, up, dn;
  real  offset;
  int checks = 0, failures = 0;

  pfd dut (.*);

  initial begin
    ref_clk = 1'b0;
    forever begin
      #(T_REF / 2.0) ref_clk = 1'b1;
      #(T_REF / 2.0) ref_clk = 1'b0;
    end
  end

  // Feedback: a copy of the reference delayed by offset modulo the period,
  // so a negative offset gives an early feedback edge.
  initial begin
    forever begin
      @(posedge ref_clk);
      fork
        begin
          automatic real d = (offset >= 0.0) ? offset : T_REF + offset;
          #(d) fb_clk = 1'b1;
          #(T_REF / 2.0) fb_clk = 1'b0;
        end
      join_none
    end
  end

  initial begin
    #100_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic expect_dec(input real off, input bit e_up, input bit e_dn);
    // Restart the detector in the middle of a reference cycle so that
    // it pairs each reference edge with the nearest feedback edge.
    en = 1'b0;
    offset = off;
    @(posedge ref_clk);
    #(T_REF / 2.0 + 1000.0) en = 1'b1;
    repeat (3) @(posedge ref_clk);
    #(T_REF / 2.0 - 1000.0);     // middle of the cycle, where the controller samples
    checks++;
    if (up !== e_up || dn !== e_dn) begin
      failures++;
      $display("offset %f: up %0d dn %0d, expected %0d %0d", off, up, dn, e_up, e_dn);
    end
    checks++;
    if (up_raw || dn_raw) begin
      failures++;
      $display("offset %f: raw flip-flops not reset", off);
    end
  endtask

  initial begin
    en = 1'b0;
    offset = 5000.0;
    #250_000;
    checks++;
    if (up || dn || up_raw || dn_raw) begin failures++; $display("output while disabled"); end
    en = 1'b1;
    expect_dec(5000.0, 1, 0);
    expect_dec(-5000.0, 0, 1);
    expect_dec(30.0, 1, 0);
    expect_dec(-30.0, 0, 1);
    expect_dec(10.0, 0, 0);
    expect_dec(-10.0, 0, 0);
    expect_dec(60_000.0, 1, 0);
    // Raw pulse width from the reset loop: up_raw high while fb is late.
    offset = 5000.0;
    @(posedge ref_clk);
    #2000;
    checks++;
    if (!up_raw || dn_raw) begin failures++; $display("up_raw not set between the edges"); end
    en = 1'b0;
    #10;
    checks++;
    if (up || dn || up_raw) begin failures++; $display("disable did not clear"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
