// tb_cp_pll: closed-loop checks of the charge-pump PLL with an ideal
// reference clock.
//   * lock: after settling, the average output period over 200 cycles must
//     equal the reference period within 0.2 %, and the output edges must
//     stay within 100 ps of the reference edges;
//   * relock: after a reference step of about +20 % the loop locks again;
//   * filtering: with a reference whose period alternates between 1875 ps
//     and 2000 ps (the pattern a fractional flying adder produces), the
//     output period spread must be under a third of the reference spread.
module tb_cp_pll;
  timeunit 1ps;
  timeprecision 1ps;

  logic       rst_n = 1'b1, f_ref = 1'b0, fo, up, dn;
  initial #1 rst_n = 1'b0;              // a real falling edge of the reset
  logic [3:0] fpll = 4'd1;
  real        vco_sine, vctrl;
  int         half_a = 969, half_b = 969;   // reference half periods
  int checks = 0, failures = 0;
  longint     t_ref, t_fo;

  cp_pll dut (.rst_n(rst_n), .f_ref(f_ref), .fpll(fpll), .fo(fo),
              .vco_sine(vco_sine), .vctrl(vctrl), .up(up), .dn(dn));

  // reference: one period of 2*half_a, then one of 2*half_b, repeated
  initial forever begin
    #(half_a) f_ref = 1'b1; #(half_a) f_ref = 1'b0;
    #(half_b) f_ref = 1'b1; #(half_b) f_ref = 1'b0;
  end
  always @(posedge f_ref) t_ref = $time;
  always @(posedge fo)    t_fo  = $time;

  initial begin
    #200000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // measures average, min and max output period over n cycles
  task automatic fo_periods(int n, output real avg, output longint pmin, output longint pmax);
    longint t0, tp;
    @(posedge fo) t0 = $time;
    tp = t0; pmin = 1 << 30; pmax = 0;
    repeat (n) begin
      @(posedge fo);
      if ($time - tp < pmin) pmin = $time - tp;
      if ($time - tp > pmax) pmax = $time - tp;
      tp = $time;
    end
    avg = real'(tp - t0) / n;
  endtask

  task automatic check_lock(real ref_period, string what);
    real avg; longint pmin, pmax, err;
    fo_periods(200, avg, pmin, pmax);
    checks++;
    if (avg < ref_period * 0.998 || avg > ref_period * 1.002) begin
      failures++;
      $display("FAIL %s: output period %0.1f ps, reference %0.1f ps", what, avg, ref_period);
    end else
      $display("%s: output period %0.1f ps, reference %0.1f ps, spread %0d ps",
               what, avg, ref_period, pmax - pmin);
    @(posedge fo); #1;
    err = t_fo - t_ref;
    if (err > 1000) err = err - longint'(ref_period);
    checks++;
    if (err > 100 || err < -100) begin
      failures++;
      $display("FAIL %s: phase error %0d ps", what, err);
    end
  endtask

  initial begin
    real avg; longint pmin, pmax;
    #1000 rst_n = 1'b1;
    #4000000;  check_lock(1938.0, "lock at 516 MHz");
    half_a = 806; half_b = 806;
    #4000000;  check_lock(1612.0, "relock at 620 MHz");
    half_a = 938; half_b = 1000;
    #4000000;  check_lock(1938.0, "lock to alternating reference");
    fo_periods(400, avg, pmin, pmax);
    checks++;
    if (3 * (pmax - pmin) >= 125) begin
      failures++;
      $display("FAIL output period spread %0d ps against 125 ps at the input", pmax - pmin);
    end else
      $display("period spread: reference 125 ps, output %0d ps", pmax - pmin);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
