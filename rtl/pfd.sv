`timescale 1ps / 1fs
// pfd: behavioural model of the cell-based bang-bang phase and frequency
// detector. This is a behavioural model, not synthesizable logic: the real
// part relies on an asynchronous reset loop whose pulse width is set by a
// digital pulse amplifier (a chain of two-input AND gates).
//
// How it works: two flip-flops with D tied high are clocked by the reference
// clock (ref_clk) and the feedback clock (fb_clk). The first edge to arrive
// sets its flip-flop (up_raw for the reference, dn_raw for the feedback);
// when both are set, the AND of the two, stretched by the pulse amplifier to
// at least T_RST_PS, resets both. This is the design description's PFD.
// The bang-bang decision is this design's choice of how the controller reads
// it: at each feedback edge ref_first takes the value of up_raw, and at each
// reference edge fb_first takes the value of dn_raw. After both edges of a
// pair have arrived, exactly one of them is 1 unless the edges coincided
// within the dead zone T_DZ_PS (17 ps in the description), in which case
// both are 0. up = ref_first means the feedback is late (DCO too slow);
// dn = fb_first means the feedback is early (DCO too fast).
//
// en low clears everything; the detector is held off until the frequency
// estimation has finished.
module pfd #(
  parameter real T_RST_PS = 150.0,
  parameter real T_DZ_PS  = 17.0
) (
  input  logic en,
  input  logic ref_clk,
  input  logic fb_clk,
  output logic up_raw,
  output logic dn_raw,
  output logic up,
  output logic dn
);

  logic rst_pfd;
  logic both;
  real  t_ref, t_fb;

  assign both = up_raw & dn_raw;
  // Pulse amplifier: the reset pulse lasts at least T_RST_PS.
  assign #(T_RST_PS) rst_pfd = both | ~en;

  always @(posedge ref_clk or posedge rst_pfd or negedge en)
    if (rst_pfd || !en) up_raw <= 1'b0;
    else                up_raw <= 1'b1;

  always @(posedge fb_clk or posedge rst_pfd or negedge en)
    if (rst_pfd || !en) dn_raw <= 1'b0;
    else                dn_raw <= 1'b1;

  initial begin
    t_ref = 0.0;
    t_fb  = 0.0;
  end

  always @(posedge ref_clk) t_ref <= $realtime;
  always @(posedge fb_clk)  t_fb  <= $realtime;

  // Decision flip-flops; an edge pair closer than the dead zone gives none.
  always @(posedge fb_clk or negedge en)
    if (!en) up <= 1'b0;
    else     up <= up_raw && ($realtime - t_ref > T_DZ_PS);

  always @(posedge ref_clk or negedge en)
    if (!en) dn <= 1'b0;
    else     dn <= dn_raw && ($realtime - t_fb > T_DZ_PS);

endmodule
