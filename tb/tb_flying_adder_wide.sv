// tb_flying_adder_wide: the flying adder with a longer accumulator and with
// more phases, the two ways to refine the frequency step.
//   * N = 8, n = 8 (5 fraction bits): FW = 32..255 in steps of 7;
//   * N = 16, n = 7 (3 fraction bits): FW = 8..127 in steps of 5.
// For each word, one full register cycle of 2^n m(t) edges must span
// 2^n * FW/2^(n-r) * Delta, i.e. f_FA = f_CLK * N * 2^(n-r) / (2 * FW),
// the same law as the default size with a finer step. The phases come from
// the testbench: Delta = 125 ps for N = 8 and Delta = 64 ps for N = 16.
module tb_flying_adder_wide;
  timeunit 1ps;
  timeprecision 1ps;

  int checks = 0, failures = 0;

  // ---- N = 8, n = 8 ----
  logic [7:0]  ph8;
  logic        rst8_n = 1'b1;
  logic [7:0]  fw8 = 8'd32;
  logic        m8, fa8;
  logic [7:0]  x8;
  logic [2:0]  y8;
  flying_adder #(.NPHASE(8), .NBITS(8)) dut8 (
    .phases(ph8), .rst_n(rst8_n), .fw(fw8), .m(m8), .x(x8), .y(y8), .f_fa(fa8));

  // ---- N = 16, n = 7 ----
  logic [15:0] ph16;
  logic        rst16_n = 1'b1;
  logic [6:0]  fw16 = 7'd8;
  logic        m16, fa16;
  logic [6:0]  x16;
  logic [3:0]  y16;
  flying_adder #(.NPHASE(16), .NBITS(7)) dut16 (
    .phases(ph16), .rst_n(rst16_n), .fw(fw16), .m(m16), .x(x16), .y(y16), .f_fa(fa16));

  // N evenly spaced 50 % phases; phase i high while (s - i) mod N < N/2
  initial begin
    int s = 0;
    forever begin
      for (int i = 0; i < 8; i++) ph8[i] = (((s - i) % 8 + 8) % 8) < 4;
      #125 s = (s + 1) % 8;
    end
  end
  initial begin
    int s = 0;
    forever begin
      for (int i = 0; i < 16; i++) ph16[i] = (((s - i) % 16 + 16) % 16) < 8;
      #64 s = (s + 1) % 16;
    end
  end

  initial begin
    #200000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    longint t0, span, expect_span;
    #1 rst8_n = 1'b0;
    for (int w = 32; w < 256; w += 7) begin
      fw8 = 8'(w);
      #10 rst8_n = 1'b1;
      repeat (3) @(posedge m8);
      t0 = $time;
      repeat (256) @(posedge m8);
      span        = $time - t0;
      expect_span = longint'(w) * 8 * 125;     // 256 * w/32 * Delta
      checks++;
      if (span != expect_span) begin
        failures++;
        $display("FAIL N=8 n=8 FW=%0d: 256 edges took %0d ps, expected %0d", w, span, expect_span);
      end
      rst8_n = 1'b0;
    end
    #1 rst16_n = 1'b0;
    for (int w = 8; w < 128; w += 5) begin
      fw16 = 7'(w);
      #10 rst16_n = 1'b1;
      repeat (3) @(posedge m16);
      t0 = $time;
      repeat (128) @(posedge m16);
      span        = $time - t0;
      expect_span = longint'(w) * 16 * 64;     // 128 * w/8 * Delta
      checks++;
      if (span != expect_span) begin
        failures++;
        $display("FAIL N=16 n=7 FW=%0d: 128 edges took %0d ps, expected %0d", w, span, expect_span);
      end
      rst16_n = 1'b0;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
