// pll_analog: behavioural model of the PLL's charge pump, loop filter and
// sine-output VCO.
//
// Behavioural model, not synthesizable: real-valued state advanced in fixed
// time steps of DT_PS picoseconds.
//   * Charge pump: sources ICP_A into the filter while UP is high and sinks it
//     while DN is high.
//   * Loop filter: the classic second-order passive filter, a series R-C1
//     branch to ground with C2 across it; its node voltage is vctrl. This
//     low-pass filter is what removes the flying adder's fractional spurs.
//   * VCO: frequency f = F0_HZ + FPLL * FSTEP_HZ + KV_HZ_PER_V * vctrl,
//     where the coarse code FPLL picks the band; output phase ph (cycles)
//     is integrated each step, the sine output is sin(2*pi*ph) and the
//     digital output fo is high for the first half of every cycle, so its
//     rising edges fall where the sine crosses zero going up.
// With the defaults the loop has a natural frequency of about 5 MHz and
// damping near 1 (wn^2 = ICP*KV/C1, zeta = wn*R*C1/2), well below the
// spurs of the default flying adder, which lie f_m/4 or further (over
// 100 MHz) from the carrier, f_m being the average m(t) rate.
// All component values, the band table and the reset behaviour (capacitors
// discharged, VCO phase 0 while rst_n is low) are this model's own choices.
// Real-valued state cannot be synthesized; a synthesis tool that ignores
// the delays sees the integrators as combinational loops, which stands.
module pll_analog #(
  parameter int unsigned FPLL_W      = fa_synth_pkg::FPLL_W_DEF,
  parameter int unsigned DT_PS       = 5,
  parameter real         ICP_A       = 100.0e-6,
  parameter real         R_OHM       = 3200.0,
  parameter real         C1_F        = 20.0e-12,
  parameter real         C2_F        = 2.0e-12,
  parameter real         F0_HZ       = 400.0e6,
  parameter real         FSTEP_HZ    = 100.0e6,
  parameter real         KV_HZ_PER_V = 200.0e6
) (
  input  logic              rst_n,     // reset, active low
  input  logic              up,        // charge pump source request
  input  logic              dn,        // charge pump sink request
  input  logic [FPLL_W-1:0] fpll,      // coarse VCO band FPLL
  output logic              fo,        // VCO output as a logic clock, f_o
  output real               vco_sine,  // VCO sine output
  output real               vctrl      // loop filter voltage
);
  timeunit 1ps;
  timeprecision 1ps;

  localparam real DT     = real'(DT_PS) * 1.0e-12;
  localparam real TWO_PI = 6.283185307179586;

  real vc1;   // voltage on C1, the integrating capacitor
  real ph;    // VCO phase in cycles, kept in [0, 1)
  real f;     // VCO frequency

  initial begin
    vc1      = 0.0;
    vctrl    = 0.0;
    ph       = 0.0;
    f        = F0_HZ;
    fo       = 1'b1;
    vco_sine = 0.0;
  end

  always begin
    #(DT_PS);
    if (!rst_n) begin
      vc1   = 0.0;
      vctrl = 0.0;
      ph    = 0.0;
    end else begin
      real icp, ir;
      icp   = (up ? ICP_A : 0.0) - (dn ? ICP_A : 0.0);
      ir    = (vctrl - vc1) / R_OHM;          // current into the R-C1 branch
      vc1   = vc1 + ir * DT / C1_F;
      vctrl = vctrl + (icp - ir) * DT / C2_F;
      f     = F0_HZ + real'(fpll) * FSTEP_HZ + KV_HZ_PER_V * vctrl;
      if (f < 1.0e6) f = 1.0e6;
      ph    = ph + f * DT;
      if (ph >= 1.0) ph = ph - 1.0;
    end
    vco_sine = $sin(TWO_PI * ph);
    fo       = (ph < 0.5);
  end
endmodule
