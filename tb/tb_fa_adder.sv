// tb_fa_adder: exhaustive check of the modulo-2^n adder at the default n = 5.
// Every pair (x, FW) is applied and the sum compared with (x + FW) mod 32
// computed in integer arithmetic.
module tb_fa_adder;
  timeunit 1ps;
  timeprecision 1ps;

  localparam int unsigned NBITS = 5;
  logic [NBITS-1:0] x, fw, sum;
  int checks = 0, failures = 0;

  fa_adder dut (.x(x), .fw(fw), .sum(sum));

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int a = 0; a < 32; a++)
      for (int b = 0; b < 32; b++) begin
        x  = NBITS'(a);
        fw = NBITS'(b);
        #10;
        checks++;
        if (int'(sum) != (a + b) % 32) begin
          failures++;
          $display("FAIL x=%0d fw=%0d sum=%0d", a, b, sum);
        end
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
