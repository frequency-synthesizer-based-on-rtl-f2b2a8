// tb_freq_control: reset values, load on write strobe, hold without it.
module tb_freq_control;
  timeunit 1ps;
  timeprecision 1ps;

  logic       clk = 1'b0, rst_n = 1'b1, wr = 1'b0;
  initial #1 rst_n = 1'b0;              // a real falling edge of the reset
  logic [1:0] cfg_fpc, fpc;
  logic [3:0] cfg_fpll, fpll;
  logic [4:0] cfg_fw, fw;
  logic [1:0] e_fpc;
  logic [3:0] e_fpll;
  logic [4:0] e_fw;
  int checks = 0, failures = 0;

  freq_control dut (
    .cfg_clk(clk), .rst_n(rst_n), .cfg_wr(wr),
    .cfg_fpc(cfg_fpc), .cfg_fpll(cfg_fpll), .cfg_fw(cfg_fw),
    .fpc(fpc), .fpll(fpll), .fw(fw));

  always #500 clk = ~clk;

  task automatic check(string what);
    checks++;
    if (fpc !== e_fpc || fpll !== e_fpll || fw !== e_fw) begin
      failures++;
      $display("FAIL %s: fpc=%0d fpll=%0d fw=%0d, expected %0d %0d %0d",
               what, fpc, fpll, fw, e_fpc, e_fpll, e_fw);
    end
  endtask

  initial begin
    #10000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    cfg_fpc = 2'd3; cfg_fpll = 4'd9; cfg_fw = 5'd7;
    e_fpc = 2'd0; e_fpll = 4'd0; e_fw = 5'd31;
    #1200 check("reset");
    @(negedge clk) rst_n = 1'b1;
    @(negedge clk) check("hold after reset");
    for (int i = 0; i < 100; i++) begin
      @(negedge clk);
      cfg_fpc  = 2'($urandom);
      cfg_fpll = 4'($urandom);
      cfg_fw   = 5'($urandom);
      wr       = ($urandom % 2) == 1;
      if (wr) begin
        e_fpc = cfg_fpc; e_fpll = cfg_fpll; e_fw = cfg_fw;
      end
      @(negedge clk);
      wr = 1'b0;
      check("write cycle");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
