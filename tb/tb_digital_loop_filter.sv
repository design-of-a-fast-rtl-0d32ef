`timescale 1ps / 1fs
// tb_digital_loop_filter: feeds random code sequences (with gaps between
// valid codes) and checks, against a sorting reference model, that
// ff_init_ok rises with the eighth code, that a baseline is produced one
// clock after the eighth code and after every second code after that,
// that it is the rounded mean of the middle six of the last eight codes,
// and that clear empties the history.
module tb_digital_loop_filter;
  import adpll_pkg::*;

  logic clk, rst_n, clear, code_valid;
  dco_code_t code_in, baseline;
  logic ff_init_ok, baseline_valid;
  int checks = 0, failures = 0;
  int hist[$];
  int n_in;
  int exp_base;
  int updates;

  digital_loop_filter dut (.*);

  initial begin
    clk = 1'b0;
    forever #5000 clk = ~clk;
  end

  initial begin
    #100_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int trimmed_mean(input int q[$]);
    int s[$];
    int sum;
    s = q;
    s.sort();
    sum = 0;
    for (int i = 1; i < 7; i++) sum += s[i];
    return (sum + 3) / 6;
  endfunction

  task automatic push(input int c, input int base_range, input bit gap);
    base_range = base_range;
    code_in    = dco_code_t'(c);
    code_valid = 1'b1;
    @(posedge clk);
    #1;
    code_valid = 1'b0;
    hist.push_front(c);
    if (hist.size() > 8) void'(hist.pop_back());
    n_in++;
    checks++;
    if (ff_init_ok != (n_in >= 8)) begin
      failures++;
      $display("code %0d: ff_init_ok %0d", n_in, ff_init_ok);
    end
    if (n_in == 8 || (n_in > 8 && (n_in - 8) % 2 == 0)) begin
      exp_base = trimmed_mean(hist);
      if (!gap) begin
        // Next code follows at once: the update still uses this window.
      end
      @(posedge clk);
      #1;
      updates++;
      checks++;
      if (!baseline_valid || int'(baseline) != exp_base) begin
        failures++;
        $display("after code %0d: baseline %0d (valid %0d) expected %0d", n_in, baseline, baseline_valid, exp_base);
      end
    end else if (gap) begin
      @(posedge clk);
      #1;
    end
  endtask

  initial begin
    rst_n = 1'b0;
    clear = 1'b0;
    code_valid = 1'b0;
    code_in = '0;
    n_in = 0;
    updates = 0;
    #20_000 rst_n = 1'b1;
    @(posedge clk);
    #1;
    checks++;
    if (baseline_valid || ff_init_ok) begin failures++; $display("valid after reset"); end
    for (int i = 0; i < 7; i++) begin
      push(1000 + $urandom_range(0, 40), 0, 1'b1);
      checks++;
      if (baseline_valid) begin failures++; $display("baseline before eight codes"); end
    end
    for (int i = 0; i < 40; i++) push(1000 + $urandom_range(0, 40), 0, i[0]);
    // An outlier on each side must not move the baseline.
    for (int i = 0; i < 7; i++) push(1500, 0, 1'b1);
    push(0, 0, 1'b1);
    push(2047, 0, 1'b1);
    checks++;
    if (baseline != 11'd1500) begin failures++; $display("outliers moved baseline: %0d", baseline); end
    // Clear empties the history.
    clear = 1'b1;
    @(posedge clk);
    #1;
    clear = 1'b0;
    hist.delete();
    n_in = 0;
    checks++;
    if (ff_init_ok || baseline_valid) begin failures++; $display("clear did not empty the filter"); end
    for (int i = 0; i < 12; i++) push($urandom_range(0, 2047), 0, 1'b1);
    checks++;
    if (updates < 20) begin failures++; $display("too few baseline updates: %0d", updates); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
