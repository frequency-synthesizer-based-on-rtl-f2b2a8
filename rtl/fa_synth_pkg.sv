// fa_synth_pkg: shared constants of the flying-adder + PLL frequency synthesizer.
//
// The default configuration is the one the synthesizer is characterised in:
// an 8-phase clock (N = 8), so the phase multiplexer needs r = 3 select bits,
// and a 5-bit accumulator register (n = 5). The frequency control word FW is
// n bits wide; its r upper bits count whole phase steps and its n-r lower
// bits are the fraction of a phase step.
//
// The widths of the coarse tuning codes FPC and FPLL are not fixed by the
// architecture; 2 and 4 bits are this implementation's choice.
package fa_synth_pkg;
  timeunit 1ps;
  timeprecision 1ps;

  parameter int unsigned NPHASE_DEF = 8;   // N, number of clock phases
  parameter int unsigned NBITS_DEF  = 5;   // n, accumulator width
  parameter int unsigned RBITS_DEF  = $clog2(NPHASE_DEF);  // r = log2(N) = 3
  parameter int unsigned FPC_W_DEF  = 2;   // coarse code of the N-phase clock
  parameter int unsigned FPLL_W_DEF = 4;   // coarse code of the PLL VCO band

  // Frequency ratio f_FA / f_CLK of the flying adder, times 1000, for a
  // control word fw: f_FA = f_CLK * N * 2^(n-r) / (2 * FW).
  function automatic int unsigned ffa_ratio_milli(int unsigned fw, int unsigned nph,
                                                  int unsigned nbits);
    int unsigned frac;
    frac = (1 << nbits) / nph;
    return (1000 * nph * frac) / (2 * fw);
  endfunction
endpackage
