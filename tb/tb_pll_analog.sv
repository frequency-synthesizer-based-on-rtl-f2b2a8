// tb_pll_analog: open-loop checks of the charge pump, loop filter and VCO.
//   * free-running frequency in each coarse band: F0 + FPLL*FSTEP
//     (400 MHz + FPLL * 100 MHz with the defaults), measured over 1 us;
//   * charge conservation: an UP pulse of T ns puts ICP*T on C1 + C2, so
//     once the filter settles vctrl = ICP*T/(C1+C2); a DN pulse removes it;
//   * VCO gain: after the UP pulse the frequency rises by KV*vctrl;
//   * sine output in [-1, 1] and non-negative exactly while fo is high.
module tb_pll_analog;
  timeunit 1ps;
  timeprecision 1ps;

  logic       rst_n = 1'b1, up = 1'b0, dn = 1'b0, fo;
  initial #1 rst_n = 1'b0;              // a real falling edge of the reset
  logic [3:0] fpll = 4'd0;
  real        vco_sine, vctrl;
  int checks = 0, failures = 0;
  int edges = 0;

  pll_analog dut (.rst_n(rst_n), .up(up), .dn(dn), .fpll(fpll),
                  .fo(fo), .vco_sine(vco_sine), .vctrl(vctrl));

  always @(posedge fo) edges++;

  // sine / logic output consistency, sampled between model steps
  always #7 if (rst_n) begin
    checks++;
    if (vco_sine > 1.0 || vco_sine < -1.0 || (fo && vco_sine < -1.0e-9) ||
        (!fo && vco_sine > 1.0e-9)) begin
      failures++;
      if (failures < 10) $display("FAIL sine %f with fo=%b", vco_sine, fo);
    end
  end

  initial begin
    #100000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic real absr(real v);
    return v < 0.0 ? -v : v;
  endfunction

  task automatic measure(real expect_hz, string what);
    int  e0;
    real f;
    e0 = edges;
    #1000000;                                   // 1 us
    f = real'(edges - e0) * 1.0e6;
    checks++;
    if (absr(f - expect_hz) > 0.002 * expect_hz + 1.0e6) begin
      failures++;
      $display("FAIL %s: %0.1f MHz, expected %0.1f MHz", what, f / 1.0e6, expect_hz / 1.0e6);
    end else
      $display("%s: %0.1f MHz (expected %0.1f MHz)", what, f / 1.0e6, expect_hz / 1.0e6);
  endtask

  initial begin
    real v_exp;
    #100 rst_n = 1'b1;
    for (int b = 0; b < 16; b += 5) begin
      fpll = 4'(b);
      measure(400.0e6 + b * 100.0e6, $sformatf("band %0d", b));
    end
    // 50 ns UP pulse: 100 uA * 50 ns / 22 pF = 227.3 mV
    fpll = 4'd1;
    up = 1'b1; #50000; up = 1'b0;
    #300000;
    v_exp = 100.0e-6 * 50.0e-9 / 22.0e-12;
    checks++;
    if (absr(vctrl - v_exp) > 0.02 * v_exp) begin
      failures++;
      $display("FAIL vctrl after UP %f V, expected %f V", vctrl, v_exp);
    end
    measure(500.0e6 + 200.0e6 * v_exp, "band 1 after UP pulse");
    // 20 ns DN pulse removes 2/5 of the charge
    dn = 1'b1; #20000; dn = 1'b0;
    #300000;
    checks++;
    if (absr(vctrl - 0.6 * v_exp) > 0.02 * v_exp) begin
      failures++;
      $display("FAIL vctrl after DN %f V, expected %f V", vctrl, 0.6 * v_exp);
    end
    // reset discharges the filter
    rst_n = 1'b0; #100;
    checks++;
    if (vctrl != 0.0) begin failures++; $display("FAIL reset vctrl=%f", vctrl); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
