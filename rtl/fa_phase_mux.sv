// fa_phase_mux: N-to-1 multiplexer of the clock phases.
//
// Passes the phase selected by y(k) to its output m(t). In the flying adder
// loop this output clocks the register whose value drives the select, so m(t)
// is a train of rising edges whose spacing is set by the phase steps.
// Combinational; a silicon version would use a glitch-aware clock mux.
module fa_phase_mux #(
  parameter int unsigned NPHASE = fa_synth_pkg::NPHASE_DEF,
  localparam int unsigned SELW  = $clog2(NPHASE)
) (
  input  logic [NPHASE-1:0] phases,  // phase i lags phase 0 by i*T/N
  input  logic [SELW-1:0]   sel,     // y(k)
  output logic              m        // selected phase, m(t)
);
  timeunit 1ps;
  timeprecision 1ps;

  always_comb m = phases[sel];
endmodule
