// nphase_clock_gen: behavioural model of the N-phase clock generator.
//
// Behavioural model, not synthesizable: it stands for an N-stage VCO or ring
// oscillator and uses delays. It produces N clocks of equal frequency f_CLK
// and 50 % duty cycle, phase i lagging phase 0 by i*Delta with
// Delta = 1/(N*f_CLK), i.e. the phases split one clock period evenly.
// The coarse code FPC selects the oscillator band: the phase spacing is
//     Delta = DELTA0_PS + FPC * DELTA_STEP_PS   (picoseconds),
// so with the defaults f_CLK is 1 GHz (FPC = 0), 833 MHz, 714 MHz or 625 MHz.
// The band table is this model's own choice; only the existence of a coarse
// setting is part of the architecture. A new FPC value takes effect from the
// next phase step. All N phases change together in one update, so a reader
// never sees a half-updated phase vector.
//
// Phase i is high while ((s - i) mod N) < N/2, where s counts phase steps of
// Delta modulo N; phase i therefore rises when s becomes i.
// A synthesis tool that ignores the delays sees the step counter as a
// combinational loop; that is expected of a timed model and stands.
module nphase_clock_gen #(
  parameter int unsigned NPHASE        = fa_synth_pkg::NPHASE_DEF,
  parameter int unsigned FPC_W         = fa_synth_pkg::FPC_W_DEF,
  parameter int unsigned DELTA0_PS     = 125,
  parameter int unsigned DELTA_STEP_PS = 25
) (
  input  logic [FPC_W-1:0]  fpc,     // coarse frequency code FPC
  output logic [NPHASE-1:0] phases   // phase i lags phase 0 by i*Delta
);
  timeunit 1ps;
  timeprecision 1ps;

  localparam int unsigned SW = $clog2(NPHASE);

  initial assert (NPHASE >= 2 && NPHASE == (1 << SW))
    else $error("nphase_clock_gen: NPHASE must be a power of two");

  function automatic logic [NPHASE-1:0] phase_vector(logic [SW-1:0] s);
    logic [NPHASE-1:0] v;
    for (int i = 0; i < NPHASE; i++) begin
      logic [SW-1:0] d;
      d    = s - SW'(i);
      v[i] = (int'(d) < NPHASE / 2);
    end
    return v;
  endfunction

  logic [SW-1:0] s;

  initial begin
    s      = '0;
    phases = phase_vector('0);
  end

  always begin
    #(DELTA0_PS + int'(fpc) * DELTA_STEP_PS);
    s      = s + 1'b1;
    phases = phase_vector(s);
  end
endmodule
