`timescale 1ps/1ps
// Testbench for path_mux: random inputs and selects against a shift.
module tb_path_mux;
  logic [31:0] path_out;
  logic [4:0] sel;
  logic y;
  int checks = 0, failures = 0;

  path_mux #(.N(32)) dut (.*);

  initial begin
    #10_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 1000; i++) begin
      path_out = $urandom; sel = 5'($urandom);
      #10;
      checks++;
      if (y !== ((path_out >> sel) & 1)) begin failures++; $display("mux wrong"); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
