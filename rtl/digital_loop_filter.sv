`timescale 1ps / 1fs
// digital_loop_filter: trimmed-mean filter that turns the controller's
// cycle-by-cycle DCO codes into a steadier baseline code.
//
// Each time code_valid is high (once per reference cycle while the loop is
// tracking) the incoming code is shifted into an eight-entry history. Once
// eight codes are stored, ff_init_ok rises and a first baseline is formed;
// after that a new baseline is formed after every second new code. The
// baseline drops the smallest and the largest of the eight stored codes and
// averages the remaining six:
//     baseline = round((sum of 8 - min - max) / 6)
// This equals sorting the eight codes and averaging the middle six, which
// is the filter the design description gives (store eight codes, sort,
// remove the minimum and the maximum, average the rest, update every two
// codes); finding only the minimum and maximum instead of a full sort is
// this design's simplification with the same result.
//
// Timing: the baseline and baseline_valid update on the clock edge after the
// code_valid that completes a pair (or the eighth code). clear empties the
// history synchronously; rst_n is an asynchronous active-low reset.
module digital_loop_filter
  import adpll_pkg::*;
#(
  parameter int unsigned DEPTH = 8
) (
  input  logic      clk,
  input  logic      rst_n,
  input  logic      clear,
  input  logic      code_valid,
  input  dco_code_t code_in,
  output logic      ff_init_ok,
  output logic      baseline_valid,
  output dco_code_t baseline
);

  localparam int unsigned SUM_W = CODE_W + $clog2(DEPTH) + 1;

  dco_code_t                   hist [DEPTH];
  logic [$clog2(DEPTH+1)-1:0]  n_stored;
  logic                        pair_odd;
  logic                        update;
  logic [SUM_W-1:0]            sum_all, sum_trim;
  dco_code_t                   c_min, c_max;

  always_comb begin
    sum_all = '0;
    c_min   = hist[0];
    c_max   = hist[0];
    for (int i = 0; i < DEPTH; i++) begin
      sum_all = sum_all + SUM_W'(hist[i]);
      if (hist[i] < c_min) c_min = hist[i];
      if (hist[i] > c_max) c_max = hist[i];
    end
    sum_trim = sum_all - SUM_W'(c_min) - SUM_W'(c_max);
  end

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      for (int i = 0; i < DEPTH; i++) hist[i] <= '0;
      n_stored       <= '0;
      pair_odd       <= 1'b0;
      update         <= 1'b0;
      ff_init_ok     <= 1'b0;
      baseline_valid <= 1'b0;
      baseline       <= '0;
    end else if (clear) begin
      n_stored       <= '0;
      pair_odd       <= 1'b0;
      update         <= 1'b0;
      ff_init_ok     <= 1'b0;
      baseline_valid <= 1'b0;
    end else begin
      update <= 1'b0;
      if (code_valid) begin
        hist[0] <= code_in;
        for (int i = 1; i < DEPTH; i++) hist[i] <= hist[i-1];
        if (n_stored != DEPTH[$bits(n_stored)-1:0]) begin
          n_stored <= n_stored + 1'b1;
          if (n_stored == DEPTH[$bits(n_stored)-1:0] - 1'b1) begin
            ff_init_ok <= 1'b1;
            update     <= 1'b1;
            pair_odd   <= 1'b0;
          end
        end else begin
          pair_odd <= ~pair_odd;
          update   <= pair_odd;
        end
      end
      if (update) begin
        baseline       <= dco_code_t'((sum_trim + SUM_W'((DEPTH - 2) / 2)) / SUM_W'(DEPTH - 2));
        baseline_valid <= 1'b1;
      end
    end

endmodule
