// cp_pll: conventional charge-pump phase-locked loop behind the flying adder.
//
// Locks a sine-output VCO to the flying adder output f_FA with a
// divide-by-one feedback: the VCO output f_o runs at the average frequency of
// f_FA, while the loop filter removes the fast period-to-period variation
// that the fractional flying adder produces. The cost is settling time: the
// output follows a new FW only as fast as the loop bandwidth allows.
// Structure: pfd (digital phase-frequency detector) drives pll_analog
// (charge pump, second-order loop filter and VCO, a behavioural model).
// FPLL is the coarse VCO band select from the frequency control block.
// Behavioural model as a whole, because it contains the analog part.
module cp_pll #(
  parameter int unsigned FPLL_W = fa_synth_pkg::FPLL_W_DEF
) (
  input  logic              rst_n,     // reset, active low
  input  logic              f_ref,     // reference: flying adder output f_FA
  input  logic [FPLL_W-1:0] fpll,      // coarse VCO band FPLL
  output logic              fo,        // synthesizer output f_o (logic)
  output real               vco_sine,  // synthesizer output f_o (sine)
  output real               vctrl,     // VCO control voltage
  output logic              up,        // PFD UP pulse
  output logic              dn         // PFD DN pulse
);
  timeunit 1ps;
  timeprecision 1ps;

  pfd u_pfd (
    .ref_clk(f_ref), .fb_clk(fo), .rst_n(rst_n), .up(up), .dn(dn));

  pll_analog #(.FPLL_W(FPLL_W)) u_analog (
    .rst_n(rst_n), .up(up), .dn(dn), .fpll(fpll),
    .fo(fo), .vco_sine(vco_sine), .vctrl(vctrl));
endmodule
