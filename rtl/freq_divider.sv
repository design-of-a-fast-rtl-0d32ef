`timescale 1ps / 1fs
// freq_divider: feedback divider that divides the DCO clock by the
// multiplication factor N to give the clock compared with the reference.
//
// A counter clocked by the DCO runs 0, 1, ..., N-1, 0, ... The feedback
// clock is registered: it goes high on every DCO rising edge at which the
// counter leaves 0 and stays high for ceil(N/2) DCO periods, so it has the
// DCO's phase and a period of N DCO periods for any N >= 2. The divider is
// held cleared (count 0, output low) while arst_n is low; the first DCO
// rising edge after release raises fb_clk, so a DCO and divider started
// together on a reference rising edge produce a feedback edge aligned with
// that reference edge.
//
// The design description names this divider and holds it stopped until the
// frequency estimation is done; the counter structure and the duty cycle
// are this design's choices. arst_n is meant to come from a register in the
// reference domain (the controller's enable), so it is glitch free.
module freq_divider
  import adpll_pkg::*;
(
  input  logic           arst_n,
  input  logic           dco_clk,
  input  logic [N_W-1:0] n_factor,
  output logic           fb_clk
);

  logic [N_W-1:0] cnt;
  logic [N_W-1:0] half;

  assign half = N_W'(({1'b0, n_factor} + 1'b1) >> 1);

  always_ff @(posedge dco_clk or negedge arst_n)
    if (!arst_n) begin
      cnt    <= '0;
      fb_clk <= 1'b0;
    end else begin
      cnt    <= (cnt >= n_factor - 1'b1) ? '0 : cnt + 1'b1;
      fb_clk <= (cnt < half);
    end

endmodule
