// tb_fa_toggle_ff: the flip-flop must change state on every rising edge of
// its clock, keep qn the inverse of q, and clear on reset; an output of half
// the input frequency.
module tb_fa_toggle_ff;
  timeunit 1ps;
  timeprecision 1ps;

  logic clk = 1'b0, rst_n = 1'b1, q, qn;
  initial #1 rst_n = 1'b0;              // a real falling edge of the reset
  logic expect_q;
  int checks = 0, failures = 0;

  fa_toggle_ff dut (.clk(clk), .rst_n(rst_n), .q(q), .qn(qn));

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #5;
    checks++;
    if (q !== 1'b0 || qn !== 1'b1) begin failures++; $display("FAIL reset"); end
    rst_n    = 1'b1;
    expect_q = 1'b0;
    for (int i = 0; i < 100; i++) begin
      #(5 + ($urandom % 20)) clk = 1'b1;
      expect_q = ~expect_q;
      #1;
      checks++;
      if (q !== expect_q || qn !== ~expect_q) begin
        failures++;
        $display("FAIL edge %0d q=%b expected %b", i, q, expect_q);
      end
      #(5 + ($urandom % 20)) clk = 1'b0;
      #1;
      checks++;
      if (q !== expect_q) begin failures++; $display("FAIL falling edge %0d", i); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
