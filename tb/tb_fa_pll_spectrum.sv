// tb_fa_pll_spectrum: spectrum of the flying adder output and of the PLL
// output for the fractional word FW = 31 at the default size (N = 8, n = 5,
// r = 3, f_CLK = 1 GHz, FPLL = 1).
//
// With FW = 31 the flying adder's waveform is periodic within one register
// cycle of 32 m(t) edges, 31 ns, so all its energy sits at multiples of
// 1/31 ns = 32.26 MHz: the carrier is the 16th (516.13 MHz). Its edge
// pattern (16, 15 Delta) in fact repeats every 3.875 ns, so the spurs fall
// at +-258 MHz (the 8th and 24th multiples).
// After the PLL has locked, both f_FA (as +-1) and the VCO sine output are
// sampled every 125 ps over 100 pattern periods (3.1 us, 24800 samples), so
// every harmonic of 32.26 MHz falls exactly on a DFT bin. The testbench
// evaluates those bins from 8 to 24 times 32.26 MHz and compares the largest
// spur, relative to the carrier, before and after the PLL. It checks that
//   * both spectra peak at the carrier, 516.13 MHz;
//   * f_FA carries spurs (the worst one within 40 dB of the carrier);
//   * the PLL output's worst spur is at least 30 dB lower, relative to its
//     carrier, than that of f_FA.
module tb_fa_pll_spectrum;
  timeunit 1ps;
  timeprecision 1ps;

  localparam int    NS      = 24800;      // samples
  localparam int    TS      = 125;        // sample step, ps
  localparam real   PI2     = 6.283185307179586;
  localparam int    NPAT    = 100;        // pattern periods in the window

  logic       cfg_clk = 1'b0, rst_n = 1'b1, cfg_wr = 1'b0;
  initial #1 rst_n = 1'b0;
  logic [1:0] cfg_fpc = '0;
  logic [3:0] cfg_fpll = '0;
  logic [4:0] cfg_fw = '0;
  logic [7:0] phases;
  logic       m, f_fa, fo, pll_up, pll_dn;
  logic [4:0] x;
  logic [2:0] y;
  real        fo_sine, vctrl;
  int checks = 0, failures = 0;

  real sa [NS];   // f_FA as +-1
  real sb [NS];   // PLL sine output

  fa_pll_synth dut (
    .cfg_clk(cfg_clk), .rst_n(rst_n), .cfg_wr(cfg_wr),
    .cfg_fpc(cfg_fpc), .cfg_fpll(cfg_fpll), .cfg_fw(cfg_fw),
    .phases(phases), .m(m), .x(x), .y(y), .f_fa(f_fa),
    .fo(fo), .fo_sine(fo_sine), .vctrl(vctrl), .pll_up(pll_up), .pll_dn(pll_dn));

  always #5000 cfg_clk = ~cfg_clk;

  initial begin
    #100000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // magnitude in dB of the DFT bin at h harmonics of the pattern rate
  function automatic real bin_db(ref real s [NS], input int h);
    real re, im, w;
    re = 0.0; im = 0.0;
    w  = PI2 * real'(h * NPAT) / real'(NS);
    for (int i = 0; i < NS; i++) begin
      re += s[i] * $cos(w * i);
      im -= s[i] * $sin(w * i);
    end
    return 10.0 * $log10((re * re + im * im) / (real'(NS) * real'(NS)) + 1.0e-30);
  endfunction

  initial begin
    real da [25], db [25];
    real spur_a, spur_b;
    int  peak_a, peak_b;
    #20000 rst_n = 1'b1;
    @(negedge cfg_clk);
    cfg_fpc = 2'd0; cfg_fpll = 4'd1; cfg_fw = 5'd31; cfg_wr = 1'b1;
    @(negedge cfg_clk) cfg_wr = 1'b0;
    #6000000;                                    // PLL settles
    // sample midway between the 125 ps phase steps
    #(TS - ($time % TS) + TS / 2);
    for (int i = 0; i < NS; i++) begin
      sa[i] = f_fa ? 1.0 : -1.0;
      sb[i] = fo_sine;
      #(TS);
    end
    peak_a = 8; peak_b = 8;
    for (int h = 8; h <= 24; h++) begin
      da[h] = bin_db(sa, h);
      db[h] = bin_db(sb, h);
      if (da[h] > da[peak_a]) peak_a = h;
      if (db[h] > db[peak_b]) peak_b = h;
    end
    spur_a = -200.0; spur_b = -200.0;
    $display("  freq (MHz)   f_FA (dBc)   f_o (dBc)");
    for (int h = 8; h <= 24; h++) begin
      $display("  %9.2f   %9.1f   %9.1f", 1000.0 * h / 31.0, da[h] - da[16], db[h] - db[16]);
      if (h != 16) begin
        if (da[h] - da[16] > spur_a) spur_a = da[h] - da[16];
        if (db[h] - db[16] > spur_b) spur_b = db[h] - db[16];
      end
    end
    $display("worst spur: f_FA %0.1f dBc, f_o %0.1f dBc", spur_a, spur_b);
    checks++;
    if (peak_a != 16 || peak_b != 16) begin
      failures++;
      $display("FAIL spectral peaks at %0d and %0d x 32.26 MHz, expected 16", peak_a, peak_b);
    end
    checks++;
    if (spur_a < -40.0) begin
      failures++;
      $display("FAIL f_FA shows no fractional spurs (%0.1f dBc)", spur_a);
    end
    checks++;
    if (spur_b > spur_a - 30.0) begin
      failures++;
      $display("FAIL PLL output spur %0.1f dBc not 30 dB below f_FA's %0.1f dBc", spur_b, spur_a);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
