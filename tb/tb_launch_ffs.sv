`timescale 1ps/1ps
// Testbench for launch_ffs: random load_v1/launch sequences; checks that q
// holds, takes V1 on load_v1 and V2 on launch (launch wins).
module tb_launch_ffs;
  logic clk = 0, rst_n = 0, load_v1 = 0, launch = 0;
  logic [31:0] v1 = 0, v2 = 0, q, model = 0;
  int checks = 0, failures = 0;

  launch_ffs #(.N(32)) dut (.*);
  always #10000 clk = ~clk;

  initial begin
    #100_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < 400; i++) begin
      @(negedge clk);
      v1 = $urandom; v2 = $urandom;
      load_v1 = ($urandom_range(2, 0) == 0);
      launch  = ($urandom_range(2, 0) == 0);
      if (launch) model = v2; else if (load_v1) model = v1;
      @(posedge clk); #1;
      checks++;
      if (q !== model) begin failures++; $display("q %h exp %h", q, model); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
