// tb_fa_phase_mux: random phase vectors and selects; the output must equal
// the selected bit of the vector.
module tb_fa_phase_mux;
  timeunit 1ps;
  timeprecision 1ps;

  logic [7:0] phases;
  logic [2:0] sel;
  logic       m;
  int checks = 0, failures = 0;

  fa_phase_mux dut (.phases(phases), .sel(sel), .m(m));

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 2000; i++) begin
      phases = 8'($urandom);
      sel    = 3'($urandom);
      #10;
      checks++;
      if (m != ((phases >> sel) & 8'd1)) begin
        failures++;
        $display("FAIL phases=%b sel=%0d m=%b", phases, sel, m);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
