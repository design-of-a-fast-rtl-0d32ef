`timescale 1ps / 1fs
// output_divider: test-chip output divider, so that the DCO clock can be
// observed through slow I/O pads.
//
// Four toggle flip-flops form an asynchronous (ripple) binary counter: the
// first is clocked by the DCO clock and each later one by the falling edge
// of the stage before it, so stage k runs at f_dco / 2^(k+1). A multiplexer
// selects the stage given by m: m = 0, 1, 2, 3 divides by 2, 4, 8, 16. The
// ripple structure, the four flip-flops, the multiplexer and the division
// table follow the design description; it tolerates a very fast input
// because each flip-flop only sees half the rate of the one before.
// rst_n is an asynchronous active-low reset of all stages. Each stage adds
// one clock-to-output delay, which is the skew between the reference and
// the divided clock that the description points out.
module output_divider (
  input  logic       rst_n,
  input  logic       dco_clk,
  input  logic [1:0] m,
  output logic       div_clk
);

  logic q0, q1, q2, q3;

  always_ff @(posedge dco_clk or negedge rst_n)
    if (!rst_n) q0 <= 1'b0;
    else        q0 <= ~q0;

  always_ff @(negedge q0 or negedge rst_n)
    if (!rst_n) q1 <= 1'b0;
    else        q1 <= ~q1;

  always_ff @(negedge q1 or negedge rst_n)
    if (!rst_n) q2 <= 1'b0;
    else        q2 <= ~q2;

  always_ff @(negedge q2 or negedge rst_n)
    if (!rst_n) q3 <= 1'b0;
    else        q3 <= ~q3;

  always_comb begin
    unique case (m)
      2'd0:    div_clk = q0;
      2'd1:    div_clk = q1;
      2'd2:    div_clk = q2;
      default: div_clk = q3;
    endcase
  end

endmodule
