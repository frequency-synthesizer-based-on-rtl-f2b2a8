// pfd: phase-frequency detector driving the PLL charge pump.
//
// The usual two-flip-flop detector: a rising edge of the reference (f_FA)
// sets UP, a rising edge of the feedback (VCO output) sets DN, and as soon as
// both are set they are cleared together. The width of UP (or DN) is the time
// by which the reference leads (or lags) the feedback, so the charge pump
// integrates the phase error, and a frequency error drives the loop in the
// right direction. The clearing path is the standard asynchronous feedback
// from both outputs into the flip-flops' reset; here it has zero delay, so
// the coincident overlap pulse has zero width (a real PFD adds a delay).
// Static timing analysis sees this feedback as a path from flop outputs
// into a reset.
// The external reset is a separate asynchronous trigger so that a falling
// rst_n clears the detector whatever state it powered up in (in hardware
// both act as one reset input, !rst_n | (up & dn)). Some synthesis flows
// refuse two asynchronous triggers on one flip-flop; they would map this
// to a flip-flop whose reset pin is driven by that OR.
module pfd (
  input  logic ref_clk,  // reference, f_FA
  input  logic fb_clk,   // feedback, VCO output f_o
  input  logic rst_n,    // asynchronous reset, active low
  output logic up,       // reference leads: raise VCO frequency
  output logic dn        // feedback leads: lower VCO frequency
);
  timeunit 1ps;
  timeprecision 1ps;

  logic both;   // both flip-flops set: clear them together
  always_comb both = up & dn;

  always_ff @(posedge ref_clk or posedge both or negedge rst_n)
    if (!rst_n)    up <= 1'b0;
    else if (both) up <= 1'b0;
    else           up <= 1'b1;

  always_ff @(posedge fb_clk or posedge both or negedge rst_n)
    if (!rst_n)    dn <= 1'b0;
    else if (both) dn <= 1'b0;
    else           dn <= 1'b1;
endmodule
