// tb_fa_register: the register must load d on each rising clock edge, hold
// between edges and clear asynchronously on reset.
module tb_fa_register;
  timeunit 1ps;
  timeprecision 1ps;

  logic       clk = 1'b0, rst_n = 1'b1;
  initial #1 rst_n = 1'b0;              // a real falling edge of the reset
  logic [4:0] d, q, expect_q;
  int checks = 0, failures = 0;

  fa_register dut (.clk(clk), .rst_n(rst_n), .d(d), .q(q));

  task automatic check(string what);
    checks++;
    if (q !== expect_q) begin
      failures++;
      $display("FAIL %s q=%0d expected %0d", what, q, expect_q);
    end
  endtask

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    d = 5'd17;
    #10 expect_q = '0; check("reset");
    rst_n = 1'b1;
    for (int i = 0; i < 200; i++) begin
      d = 5'($urandom);
      #10 clk = 1'b1;
      expect_q = d;
      #1 check("load");
      d = ~d;
      #10 check("hold high");
      clk = 1'b0;
      #10 check("hold low");
    end
    rst_n = 1'b0;
    #1 expect_q = '0; check("async reset");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
