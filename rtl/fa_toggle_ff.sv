// fa_toggle_ff: D flip-flop with its inverted output fed back to D.
//
// Toggles on every rising edge of m(t), dividing it by two and giving the
// flying adder output f_FA with one rising edge per two m(t) pulses. The
// asynchronous active-low reset to 0 is this implementation's choice.
module fa_toggle_ff (
  input  logic clk,    // m(t)
  input  logic rst_n,  // asynchronous reset, active low
  output logic q,      // f_FA
  output logic qn      // inverted output, fed back to D
);
  timeunit 1ps;
  timeprecision 1ps;

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) q <= 1'b0;
    else        q <= qn;

  always_comb qn = ~q;
endmodule
