// tb_fa_pll_synth: end-to-end test of the synthesizer at its default size
// (N = 8 phases, n = 5, r = 3), through a sequence of settings written to
// the frequency control block:
//   1. FPC 0 (f_CLK 1 GHz), FW 31, FPLL 1  - fractional mode, 516.1 MHz
//   2. FW 24, FPLL 2                       - integer mode, 666.7 MHz
//   3. FPC 1 (f_CLK 833 MHz), FW 31, FPLL 0 - coarse change, 430.1 MHz
//   4. FPC 0, FW 13, FPLL 8                - fractional mode, 1230.8 MHz
// For each setting it checks
//   * the flying adder: any 32 consecutive m(t) edges span 8*FW*Delta, so
//     f_FA = f_CLK*16/FW, starting with the second edge after FW changes
//     (instant response);
//   * the PLL: after settling, the average f_o period equals FW*Delta/2
//     within 0.2 %, and in fractional mode the f_o period spread is below
//     a third of the f_FA period spread (spur filtering).
// It counts each mechanism (fractional mode, integer mode, register
// wrap-around, FW switch, FPC switch, FPLL switch, PLL lock, PFD UP and DN
// pulses) and counts a failure for any that never happened.
module tb_fa_pll_synth;
  timeunit 1ps;
  timeprecision 1ps;

  logic       cfg_clk = 1'b0, rst_n = 1'b1, cfg_wr = 1'b0;
  initial #1 rst_n = 1'b0;              // a real falling edge of the reset
  logic [1:0] cfg_fpc = '0;
  logic [3:0] cfg_fpll = '0;
  logic [4:0] cfg_fw = '0;
  logic [7:0] phases;
  logic       m, f_fa, fo, pll_up, pll_dn;
  logic [4:0] x;
  logic [2:0] y;
  real        fo_sine, vctrl;
  int checks = 0, failures = 0;

  int n_frac = 0, n_int = 0, n_wrap = 0, n_fw_sw = 0, n_fpc_sw = 0,
      n_fpll_sw = 0, n_lock = 0, n_up = 0, n_dn = 0, n_filter = 0;

  fa_pll_synth dut (
    .cfg_clk(cfg_clk), .rst_n(rst_n), .cfg_wr(cfg_wr),
    .cfg_fpc(cfg_fpc), .cfg_fpll(cfg_fpll), .cfg_fw(cfg_fw),
    .phases(phases), .m(m), .x(x), .y(y), .f_fa(f_fa),
    .fo(fo), .fo_sine(fo_sine), .vctrl(vctrl), .pll_up(pll_up), .pll_dn(pll_dn));

  always #5000 cfg_clk = ~cfg_clk;       // 100 MHz host clock

  logic [4:0] x_prev = '0;
  always @(posedge m) begin
    #1;
    if (rst_n && x < x_prev) n_wrap++;
    x_prev = x;
  end
  always @(posedge pll_up) n_up++;
  always @(posedge pll_dn) n_dn++;

  initial begin
    #100000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic fail(string msg);
    failures++;
    $display("FAIL t=%0t %s", $time, msg);
  endtask

  task automatic write_cfg(int fpc, int fpll, int fw);
    @(negedge cfg_clk);
    if (fw != int'(cfg_fw))     n_fw_sw++;
    if (fpc != int'(cfg_fpc))   n_fpc_sw++;
    if (fpll != int'(cfg_fpll)) n_fpll_sw++;
    cfg_fpc = 2'(fpc); cfg_fpll = 4'(fpll); cfg_fw = 5'(fw); cfg_wr = 1'b1;
    @(negedge cfg_clk);
    cfg_wr = 1'b0;
  endtask

  // Span of 32 consecutive m(t) edges, skipping the first skip edges, and
  // the spread (max - min) of the f_FA periods among them.
  task automatic ffa_span(int skip, output longint span, output longint spread);
    longint t0, tp, pmin, pmax;
    repeat (skip) @(posedge m);
    @(posedge f_fa) t0 = $time;
    tp = t0; pmin = 1 << 30; pmax = 0;
    // 32 m(t) edges = 16 f_FA periods
    repeat (16) begin
      @(posedge f_fa);
      if ($time - tp < pmin) pmin = $time - tp;
      if ($time - tp > pmax) pmax = $time - tp;
      tp = $time;
    end
    span   = tp - t0;
    spread = pmax - pmin;
  endtask

  task automatic fo_periods(int n, output real avg, output longint spread);
    longint t0, tp, pmin, pmax;
    @(posedge fo) t0 = $time;
    tp = t0; pmin = 1 << 30; pmax = 0;
    repeat (n) begin
      @(posedge fo);
      if ($time - tp < pmin) pmin = $time - tp;
      if ($time - tp > pmax) pmax = $time - tp;
      tp = $time;
    end
    avg    = real'(tp - t0) / n;
    spread = pmax - pmin;
  endtask

  task automatic step(int fpc, int fpll, int fw);
    int     delta;
    longint span, fa_spread, fo_spread;
    real    fo_avg, expect_p;
    delta    = 125 + 25 * fpc;
    expect_p = real'(fw * delta) / 2.0;
    write_cfg(fpc, fpll, fw);
    if (fw % 4 == 0) n_int++; else n_frac++;
    // f_FA right after the change: skip one edge (old select step)
    ffa_span(1, span, fa_spread);
    checks++;
    if (span != longint'(8 * fw * delta))
      fail($sformatf("FW=%0d FPC=%0d: 32 m(t) edges took %0d ps, expected %0d",
                     fw, fpc, span, 8 * fw * delta));
    // PLL settles
    #5000000;
    ffa_span(0, span, fa_spread);
    fo_periods(200, fo_avg, fo_spread);
    checks++;
    if (fo_avg < expect_p * 0.998 || fo_avg > expect_p * 1.002)
      fail($sformatf("FW=%0d FPC=%0d: f_o period %0.1f ps, expected %0.1f ps",
                     fw, fpc, fo_avg, expect_p));
    else begin
      n_lock++;
      $display("FPC=%0d FW=%0d FPLL=%0d: f_FA %0.2f MHz, f_o %0.2f MHz, period spread f_FA %0d ps, f_o %0d ps",
               fpc, fw, fpll, 1.0e6 / expect_p, 1.0e6 / fo_avg, fa_spread, fo_spread);
    end
    if (fw % 4 != 0) begin
      checks++;
      if (3 * fo_spread >= fa_spread)
        fail($sformatf("FW=%0d: f_o spread %0d ps not well below f_FA spread %0d ps",
                       fw, fo_spread, fa_spread));
      else n_filter++;
    end
  endtask

  task automatic need(int count, string what);
    checks++;
    if (count == 0) fail($sformatf("mechanism never exercised: %s", what));
    else $display("  %-26s %0d", what, count);
  endtask

  initial begin
    #20000 rst_n = 1'b1;
    step(0, 1, 31);
    step(0, 2, 24);
    step(1, 0, 31);
    step(0, 8, 13);
    $display("mechanisms:");
    need(n_frac,    "fractional FW");
    need(n_int,     "integer FW");
    need(n_wrap,    "register wrap-around");
    need(n_fw_sw,   "FW switch");
    need(n_fpc_sw,  "FPC coarse switch");
    need(n_fpll_sw, "FPLL band switch");
    need(n_lock,    "PLL lock");
    need(n_filter,  "spur filtering");
    need(n_up,      "PFD UP pulses");
    need(n_dn,      "PFD DN pulses");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
