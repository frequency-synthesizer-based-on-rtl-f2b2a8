// fa_adder: the flying adder's n-bit adder.
//
// Adds the frequency control word FW to the current register value and drops
// the carry, so the sum is (x + FW) mod 2^n, eq. x(k+1) = (x(k) + FW) mod 2^n.
// Purely combinational; the result is captured by fa_register on the next
// rising edge of the multiplexer output m(t).
module fa_adder #(
  parameter int unsigned NBITS = fa_synth_pkg::NBITS_DEF
) (
  input  logic [NBITS-1:0] x,    // current register value x(k)
  input  logic [NBITS-1:0] fw,   // frequency control word FW
  output logic [NBITS-1:0] sum   // (x + FW) mod 2^n
);
  timeunit 1ps;
  timeprecision 1ps;

  always_comb sum = x + fw;   // carry out discarded: modulo 2^n
endmodule
