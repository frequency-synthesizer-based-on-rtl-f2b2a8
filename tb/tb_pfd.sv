// tb_pfd: the phase-frequency detector must give an UP pulse as wide as the
// lead of the reference over the feedback, a DN pulse as wide as its lag,
// never both at once outside the zero-width overlap, and drive UP steadily
// when the reference runs faster than the feedback.
module tb_pfd;
  timeunit 1ps;
  timeprecision 1ps;

  logic ref_clk = 1'b0, fb_clk = 1'b0, rst_n = 1'b1, up, dn;
  initial #1 rst_n = 1'b0;              // a real falling edge of the reset
  int checks = 0, failures = 0;
  longint up_time = 0, dn_time = 0;

  pfd dut (.ref_clk(ref_clk), .fb_clk(fb_clk), .rst_n(rst_n), .up(up), .dn(dn));

  // integrate UP and DN high time in 1 ps steps
  always #1 begin
    if (up) up_time++;
    if (dn) dn_time++;
  end

  initial begin
    #100000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic pair(int lead);   // lead > 0: reference first
    longint u0, d0;
    u0 = up_time; d0 = dn_time;
    if (lead >= 0) begin
      ref_clk = 1'b1; #(lead); fb_clk = 1'b1;
    end else begin
      fb_clk = 1'b1; #(-lead); ref_clk = 1'b1;
    end
    #200;
    checks++;
    if (up || dn) begin failures++; $display("FAIL outputs not cleared after both edges"); end
    checks++;
    if (up_time - u0 != longint'(lead > 0 ? lead : 0) ||
        dn_time - d0 != longint'(lead < 0 ? -lead : 0)) begin
      failures++;
      $display("FAIL lead %0d: up %0d ps, dn %0d ps", lead, up_time - u0, dn_time - d0);
    end
    ref_clk = 1'b0; fb_clk = 1'b0;
    #300;
  endtask

  initial begin
    #50;
    checks++;
    if (up || dn) begin failures++; $display("FAIL reset"); end
    rst_n = 1'b1;
    #50;
    for (int i = 0; i < 60; i++) pair(int'($urandom % 400) - 200);
    // frequency error: reference twice as fast, UP must dominate
    begin
      longint u0, d0;
      u0 = up_time; d0 = dn_time;
      fork
        repeat (40) begin ref_clk = 1'b1; #250; ref_clk = 1'b0; #250; end
        repeat (20) begin #300; fb_clk = 1'b1; #500; fb_clk = 1'b0; #200; end
      join
      checks++;
      if (!(up_time - u0 > 4 * (dn_time - d0))) begin
        failures++;
        $display("FAIL fast reference: up %0d ps, dn %0d ps", up_time - u0, dn_time - d0);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
