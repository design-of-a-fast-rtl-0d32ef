`timescale 1ps / 1fs
// cyclic_counter: measures the period ratio R between the reference clock
// and the DCO clock as an integer.
//
// Two counters clocked by the DCO count its rising and its falling edges
// while ref_clk is high and en is set; while ref_clk is low they are
// cleared at each DCO edge. On the falling edge of ref_clk the sum of the
// two counts is captured in r_count. Counting both edges over the high half
// of the reference period gives
//     R = (T_ref / 2) / (T_dco / 2) = T_ref / T_dco,
// so that the ratio for the target frequency equals the multiplication
// factor N, as the estimation equations require. The description says only
// that the counter quantises half a reference period into an integer ratio;
// counting both DCO edges is this design's reading of that.
//
// Interface: r_count is valid from the falling reference edge that ends a
// measurement until the next falling edge, i.e. over the low half of the
// reference cycle, when the frequency finder reads it. The count saturates
// at all ones. rst_n is an asynchronous active-low reset.
module cyclic_counter #(
  parameter int unsigned CNT_W = 12
) (
  input  logic             rst_n,
  input  logic             ref_clk,
  input  logic             dco_clk,
  input  logic             en,
  output logic [CNT_W-1:0] r_count
);

  logic [CNT_W-1:0] cnt_p, cnt_n;
  logic [CNT_W:0]   sum;
  logic             gate;

  assign gate = ref_clk & en;

  always_ff @(posedge dco_clk or negedge rst_n)
    if (!rst_n)                 cnt_p <= '0;
    else if (!gate)             cnt_p <= '0;
    else if (cnt_p != '1)       cnt_p <= cnt_p + 1'b1;

  always_ff @(negedge dco_clk or negedge rst_n)
    if (!rst_n)                 cnt_n <= '0;
    else if (!gate)             cnt_n <= '0;
    else if (cnt_n != '1)       cnt_n <= cnt_n + 1'b1;

  assign sum = {1'b0, cnt_p} + {1'b0, cnt_n};

  always_ff @(negedge ref_clk or negedge rst_n)
    if (!rst_n) r_count <= '0;
    else        r_count <= sum[CNT_W] ? '1 : sum[CNT_W-1:0];

endmodule
