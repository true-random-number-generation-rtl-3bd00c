`timescale 1ps/1ps
// Testbench for gpio_in: random word writes, checks the seed halves and the
// start bit against a shadow copy, and that other addresses change nothing.
module tb_gpio_in;
  logic clk = 0, rst_n = 0, ps_wr = 0;
  logic [1:0] ps_addr = 0;
  logic [31:0] ps_wdata = 0;
  logic [63:0] seed, exp_seed = 0;
  logic start, exp_start = 0;
  int checks = 0, failures = 0;

  gpio_in dut (.*);
  always #10000 clk = ~clk;

  initial begin
    #50_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < 400; i++) begin
      @(negedge clk);
      ps_wr    = ($urandom_range(3, 0) != 0);
      ps_addr  = 2'($urandom_range(3, 0));
      ps_wdata = $urandom;
      if (ps_wr) begin
        if (ps_addr == 0) exp_seed[31:0]  = ps_wdata;
        if (ps_addr == 1) exp_seed[63:32] = ps_wdata;
        if (ps_addr == 2) exp_start       = ps_wdata[0];
      end
      @(posedge clk); #1;
      checks++;
      if (seed !== exp_seed || start !== exp_start) begin
        failures++;
        $display("mismatch seed %h/%h start %b/%b", seed, exp_seed, start, exp_start);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
