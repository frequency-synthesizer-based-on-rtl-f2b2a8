// tb_nphase_clock_gen: phase spacing, period and duty cycle of the N-phase
// clock model for every coarse code FPC (Delta = 125 + 25*FPC ps).
// For each phase i the rising edges must come i*Delta after those of
// phase 0, every N*Delta, and the phase must stay high N/2*Delta.
module tb_nphase_clock_gen;
  timeunit 1ps;
  timeprecision 1ps;

  localparam int N = 8;
  logic [1:0] fpc = 2'd0;
  logic [7:0] phases;
  int checks = 0, failures = 0;
  longint t_rise [N];
  longint t_fall [N];
  longint t_prev_rise [N];

  nphase_clock_gen dut (.fpc(fpc), .phases(phases));

  for (genvar g = 0; g < N; g++) begin : g_mon
    always @(posedge phases[g]) begin
      t_prev_rise[g] = t_rise[g];
      t_rise[g]      = $time;
    end
    always @(negedge phases[g]) t_fall[g] = $time;
  end

  initial begin
    #100000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int c = 0; c < 4; c++) begin
      int delta;
      fpc   = 2'(c);
      delta = 125 + 25 * c;
      repeat (4) @(posedge phases[0]);     // settle on the new band
      for (int k = 0; k < 5; k++) begin
        @(posedge phases[N-1]);            // last phase of this period
        #1;
        for (int i = 0; i < N; i++) begin
          checks++;
          if (t_rise[i] - t_rise[0] != longint'(i * delta)) begin
            failures++;
            $display("FAIL fpc=%0d phase %0d lags %0d ps, expected %0d",
                     c, i, t_rise[i] - t_rise[0], i * delta);
          end
          checks++;
          if (t_rise[i] - t_prev_rise[i] != longint'(N * delta)) begin
            failures++;
            $display("FAIL fpc=%0d phase %0d period %0d ps", c, i, t_rise[i] - t_prev_rise[i]);
          end
        end
        // phase 0 fell N/2 Delta after it rose
        checks++;
        if (t_fall[0] - t_rise[0] != longint'(N / 2 * delta)) begin
          failures++;
          $display("FAIL fpc=%0d phase 0 high for %0d ps", c, t_fall[0] - t_rise[0]);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
