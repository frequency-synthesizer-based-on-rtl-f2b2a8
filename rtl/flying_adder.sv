// flying_adder: fractional flying-adder (FFA) frequency synthesizer core.
//
// N equally spaced phases of f_CLK (spacing Delta = 1/(N*f_CLK)) enter an
// N-to-1 multiplexer. Each rising edge of the multiplexer output m(t) clocks
// an n-bit register, x(k+1) = (x(k) + FW) mod 2^n, whose r = log2(N) upper
// bits select the next phase. The selection therefore advances by FW/2^(n-r)
// phases per edge, and the next rising edge of m(t) comes j*Delta later,
// where j = (y(k+1) - y(k)) mod N, with j = 0 meaning a full period N*Delta.
// Averaged over a register cycle the m(t) period is Delta*FW/2^(n-r); a
// toggle flip-flop halves it, so
//     f_FA = f_CLK * N * 2^(n-r) / (2 * FW).
// With the defaults (N = 8, n = 5, r = 3) this is f_CLK * 16 / FW, valid for
// FW >= 2^(n-r) = 4 so that every edge advances at least one phase. FW that
// is a multiple of 2^(n-r) gives evenly spaced edges (integer mode); any other
// FW mixes two spacings (fractional mode), which is what puts spurs into the
// spectrum.
//
// Timing: FW is sampled at each m(t) rising edge; a new word acts from the
// next edge on, so the response to a change is immediate. The register and
// toggle flip-flop reset asynchronously to 0 (implementation choice).
// The multiplexer output clocks the register that drives the multiplexer
// select; that loop is the architecture itself, and static timing analysis
// sees it as a path from a flop output into a clock.
module flying_adder #(
  parameter int unsigned NPHASE = fa_synth_pkg::NPHASE_DEF,
  parameter int unsigned NBITS  = fa_synth_pkg::NBITS_DEF,
  localparam int unsigned RBITS = $clog2(NPHASE)
) (
  input  logic [NPHASE-1:0] phases,  // N-phase clock, phase i lags by i*Delta
  input  logic              rst_n,   // asynchronous reset, active low
  input  logic [NBITS-1:0]  fw,      // frequency control word FW
  output logic              m,       // multiplexer output m(t)
  output logic [NBITS-1:0]  x,       // register value x(k)
  output logic [RBITS-1:0]  y,       // truncated select y(k)
  output logic              f_fa     // synthesizer output f_FA
);
  timeunit 1ps;
  timeprecision 1ps;

  logic [NBITS-1:0] sum;

  fa_phase_mux #(.NPHASE(NPHASE)) u_mux (
    .phases(phases), .sel(y), .m(m));

  fa_adder #(.NBITS(NBITS)) u_adder (
    .x(x), .fw(fw), .sum(sum));

  fa_register #(.NBITS(NBITS)) u_reg (
    .clk(m), .rst_n(rst_n), .d(sum), .q(x));

  // Truncation: the r most significant register bits, y = x / 2^(n-r).
  // This is wiring only, so it is a bit slice rather than a module.
  always_comb y = x[NBITS-1 -: RBITS];

  fa_toggle_ff u_dff (
    .clk(m), .rst_n(rst_n), .q(f_fa), .qn());
endmodule
