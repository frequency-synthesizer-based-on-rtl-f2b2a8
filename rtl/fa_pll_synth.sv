// fa_pll_synth: frequency synthesizer built from a flying adder and a PLL.
//
// The flying adder (FFA) makes any frequency f_FA = f_CLK*N*2^(n-r)/(2*FW)
// out of the N phases of a fixed clock, with instant response, but in
// fractional mode its edges are unevenly spaced, which shows as spurs. A
// conventional charge-pump PLL locked to f_FA keeps the average frequency
// and filters the spurs out of its output f_o. A frequency control block
// holds the three settings: FPC (coarse band of the N-phase clock), FPLL
// (coarse band of the PLL VCO) and FW (fine setting of the flying adder).
//
//   freq_control --FPC--> nphase_clock_gen --N phases--> flying_adder --f_FA--> cp_pll --> f_o
//        |-------------------------FW---------------------------^                 ^
//        |-------------------------FPLL-------------------------------------------|
//
// Interface: the host writes FPC, FPLL and FW together with cfg_wr on
// cfg_clk. Everything else runs on the generated clocks. The N-phase clock
// and the PLL's analog part are behavioural models, so this top simulates
// the whole mixed-signal system; the synthesizable digital part is
// freq_control, flying_adder and the PFD inside cp_pll.
// Defaults: N = 8 phases, n = 5-bit register, r = 3 select bits.
module fa_pll_synth #(
  parameter int unsigned NPHASE = fa_synth_pkg::NPHASE_DEF,
  parameter int unsigned NBITS  = fa_synth_pkg::NBITS_DEF,
  parameter int unsigned FPC_W  = fa_synth_pkg::FPC_W_DEF,
  parameter int unsigned FPLL_W = fa_synth_pkg::FPLL_W_DEF,
  localparam int unsigned RBITS = $clog2(NPHASE)
) (
  input  logic              cfg_clk,   // host interface clock
  input  logic              rst_n,     // asynchronous reset, active low
  input  logic              cfg_wr,    // write strobe for the three settings
  input  logic [FPC_W-1:0]  cfg_fpc,   // coarse code of the N-phase clock
  input  logic [FPLL_W-1:0] cfg_fpll,  // coarse code of the PLL VCO band
  input  logic [NBITS-1:0]  cfg_fw,    // frequency control word FW
  output logic [NPHASE-1:0] phases,    // N-phase clock (observation)
  output logic              m,         // multiplexer output m(t)
  output logic [NBITS-1:0]  x,         // flying adder register x(k)
  output logic [RBITS-1:0]  y,         // multiplexer select y(k)
  output logic              f_fa,      // flying adder output f_FA
  output logic              fo,        // synthesizer output f_o (logic)
  output real               fo_sine,   // synthesizer output f_o (sine)
  output real               vctrl,     // PLL control voltage
  output logic              pll_up,    // PFD UP pulse
  output logic              pll_dn     // PFD DN pulse
);
  timeunit 1ps;
  timeprecision 1ps;

  logic [FPC_W-1:0]  fpc;
  logic [FPLL_W-1:0] fpll;
  logic [NBITS-1:0]  fw;

  freq_control #(.NBITS(NBITS), .FPC_W(FPC_W), .FPLL_W(FPLL_W)) u_ctrl (
    .cfg_clk(cfg_clk), .rst_n(rst_n), .cfg_wr(cfg_wr),
    .cfg_fpc(cfg_fpc), .cfg_fpll(cfg_fpll), .cfg_fw(cfg_fw),
    .fpc(fpc), .fpll(fpll), .fw(fw));

  nphase_clock_gen #(.NPHASE(NPHASE), .FPC_W(FPC_W)) u_clk (
    .fpc(fpc), .phases(phases));

  flying_adder #(.NPHASE(NPHASE), .NBITS(NBITS)) u_ffa (
    .phases(phases), .rst_n(rst_n), .fw(fw),
    .m(m), .x(x), .y(y), .f_fa(f_fa));

  cp_pll #(.FPLL_W(FPLL_W)) u_pll (
    .rst_n(rst_n), .f_ref(f_fa), .fpll(fpll),
    .fo(fo), .vco_sine(fo_sine), .vctrl(vctrl), .up(pll_up), .dn(pll_dn));
endmodule
