// fa_register: the flying adder's n-bit accumulator register.
//
// Loads the adder output on every rising edge of the multiplexer output m(t),
// which is the register's only clock, so k in x(k) counts the m(t) edges.
// The asynchronous active-low reset (this implementation's choice) clears
// the register to 0, which selects clock phase 0.
module fa_register #(
  parameter int unsigned NBITS = fa_synth_pkg::NBITS_DEF
) (
  input  logic             clk,    // m(t), output of the phase multiplexer
  input  logic             rst_n,  // asynchronous reset, active low
  input  logic [NBITS-1:0] d,      // next value from the adder
  output logic [NBITS-1:0] q       // register value x(k)
);
  timeunit 1ps;
  timeprecision 1ps;

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) q <= '0;
    else        q <= d;
endmodule
