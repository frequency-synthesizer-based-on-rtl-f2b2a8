// tb_flying_adder: cycle-accurate check of the flying adder at the default
// N = 8, n = 5, r = 3, and the f_FA-versus-FW curve over FW = 4..31.
//
// The testbench makes its own 8-phase clock (Delta = 125 ps, f_CLK = 1 GHz)
// and keeps its own model of the register. At every rising edge of m(t) it
// checks
//   * the register value against x(k+1) = (x(k) + FW) mod 32,
//   * the time since the previous edge against j*Delta, with
//     j = (y(k) - y(k-1)) mod 8 and j = 0 meaning a full period of 8*Delta,
//   * that f_FA toggled.
// Over each full register cycle (32 edges) the m(t) edges must span exactly
// 32 * FW/4 * Delta = FW ns, i.e. f_FA = 16/FW * f_CLK. A control word change
// in the middle of a run must act from the next edge on.
module tb_flying_adder;
  timeunit 1ps;
  timeprecision 1ps;

  localparam int DELTA = 125;
  localparam int N     = 8;

  logic [7:0] phases;
  logic       rst_n = 1'b1;
  initial #1 rst_n = 1'b0;              // a real falling edge of the reset
  logic [4:0] fw    = 5'd31;
  logic       m, f_fa;
  logic [4:0] x;
  logic [2:0] y;
  int checks = 0, failures = 0;
  int s = 0;

  flying_adder dut (.phases(phases), .rst_n(rst_n), .fw(fw),
                    .m(m), .x(x), .y(y), .f_fa(f_fa));

  // Phase i high while (s - i) mod 8 < 4; s advances every Delta.
  function automatic logic [7:0] pv(int st);
    logic [7:0] v;
    for (int i = 0; i < N; i++) v[i] = (((st - i) % N + N) % N) < N / 2;
    return v;
  endfunction

  initial begin
    phases = pv(0);
    forever begin
      #(DELTA);
      s      = (s + 1) % N;
      phases = pv(s);
    end
  end

  initial begin
    #50000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic fail(string msg);
    failures++;
    if (failures < 20) $display("FAIL t=%0t %s", $time, msg);
  endtask

  // Runs nedges m(t) edges from the current state, checking each one.
  int        xm;          // model register value
  longint    t_prev;
  logic      fa_prev;
  task automatic run_edges(int nedges, output longint span);
    longint t0;
    t0 = t_prev;
    for (int e = 0; e < nedges; e++) begin
      int ynew, yold, j;
      @(posedge m);
      yold = xm / 4;
      xm   = (xm + int'(fw)) % 32;
      ynew = xm / 4;
      j    = ((ynew - yold) % N + N) % N;
      if (j == 0) j = N;
      #1;
      checks++;
      if (int'(x) != xm) fail($sformatf("x=%0d expected %0d (fw=%0d)", x, xm, fw));
      checks++;
      if (int'(y) != ynew) fail($sformatf("y=%0d expected %0d", y, ynew));
      checks++;
      if (f_fa == fa_prev) fail("f_FA did not toggle");
      fa_prev = f_fa;
      // edge k+1 must come j*Delta after edge k, where j is set by the
      // select change made at edge k; check the previous interval now.
      if (e > 0 || t_prev >= 0) begin
        longint dt;
        dt = ($time - 1) - t_prev;
        checks++;
        if (dt != longint'(pend_j) * DELTA)
          fail($sformatf("edge spacing %0d ps, expected %0d ps (fw=%0d)", dt, pend_j * DELTA, fw));
      end
      pend_j = j;
      t_prev = $time - 1;
    end
    span = t_prev - t0;
  endtask
  int pend_j;

  initial begin
    longint span;
    // Sweep of the control word: f_FA = 16/FW * f_CLK (frequency curve).
    for (int w = 4; w <= 31; w++) begin
      #2 rst_n = 1'b0;
      fw    = 5'(w);
      // release reset while phase 0 is low, so the first edge is clean
      wait (phases[0] == 1'b0);
      #10 rst_n = 1'b1;
      xm      = 0;
      fa_prev = 1'b0;
      @(posedge m);                     // first edge: loads FW
      xm      = w;
      #1;
      checks++;
      if (int'(x) != xm) fail($sformatf("first load x=%0d fw=%0d", x, w));
      fa_prev = f_fa;
      pend_j  = ((xm / 4) % N == 0) ? N : (xm / 4);
      t_prev  = $time - 1;
      run_edges(32, span);
      checks++;
      if (span != longint'(w) * 1000)
        fail($sformatf("32 edges took %0d ps, expected %0d (fw=%0d)", span, w * 1000, w));
      checks++;
      if (16000 / w != int'(fa_synth_pkg::ffa_ratio_milli(w, N, 5)) ||
          (1000 * 1000 * 16) / int'(span) != int'(fa_synth_pkg::ffa_ratio_milli(w, N, 5)))
        fail($sformatf("f_FA/f_CLK x1000 = %0d, formula gives %0d", (1000 * 1000 * 16) / int'(span),
                       fa_synth_pkg::ffa_ratio_milli(w, N, 5)));
      if (span == longint'(w) * 1000)
        $display("FW=%0d  f_FA/f_CLK = 16/%0d = %0.4f  (32 m(t) edges in %0d ps)",
                 w, w, 16.0 / w, span);
    end
    // Control word change while running: acts from the next edge.
    fw = 5'd24;
    run_edges(20, span);
    @(negedge m);
    fw = 5'd13;
    run_edges(40, span);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
