// freq_control: frequency control block of the synthesizer.
//
// Holds the three tuning settings: the coarse code FPC of the N-phase clock
// (its f_CLK band), the coarse code FPLL of the PLL's VCO band, and the fine
// frequency control word FW of the flying adder. A host writes all three at
// once with a one-cycle write strobe on its own clock; the outputs are held
// in registers and change one cfg_clk edge after the strobe. Reset values are
// parameters; the default FW = 31 is the slowest word of the default
// 5-bit range.
//
// Only the role of this block is part of the architecture; the register
// interface, the reset values and how the coarse bands are chosen are this
// implementation's choices (coarse tuning itself, e.g. oscillator switching,
// lives in the N-phase clock and PLL models).
module freq_control #(
  parameter int unsigned NBITS  = fa_synth_pkg::NBITS_DEF,
  parameter int unsigned FPC_W  = fa_synth_pkg::FPC_W_DEF,
  parameter int unsigned FPLL_W = fa_synth_pkg::FPLL_W_DEF,
  parameter logic [NBITS-1:0]  FW_RST   = '1,
  parameter logic [FPC_W-1:0]  FPC_RST  = '0,
  parameter logic [FPLL_W-1:0] FPLL_RST = '0
) (
  input  logic              cfg_clk,   // host interface clock
  input  logic              rst_n,     // asynchronous reset, active low
  input  logic              cfg_wr,    // write strobe, one cfg_clk cycle
  input  logic [FPC_W-1:0]  cfg_fpc,   // new coarse code of the N-phase clock
  input  logic [FPLL_W-1:0] cfg_fpll,  // new coarse code of the PLL
  input  logic [NBITS-1:0]  cfg_fw,    // new frequency control word
  output logic [FPC_W-1:0]  fpc,       // FPC to the N-phase clock
  output logic [FPLL_W-1:0] fpll,      // FPLL to the PLL
  output logic [NBITS-1:0]  fw         // FW to the flying adder
);
  timeunit 1ps;
  timeprecision 1ps;

  always_ff @(posedge cfg_clk or negedge rst_n)
    if (!rst_n) begin
      fpc  <= FPC_RST;
      fpll <= FPLL_RST;
      fw   <= FW_RST;
    end else if (cfg_wr) begin
      fpc  <= cfg_fpc;
      fpll <= cfg_fpll;
      fw   <= cfg_fw;
    end
endmodule
