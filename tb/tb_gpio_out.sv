`timescale 1ps/1ps
// Testbench for gpio_out: random producer and host-read timing; every byte
// must arrive once, in order, and the producer must be stalled while the
// host has not read.
module tb_gpio_out;
  logic clk = 0, rst_n = 0, in_valid = 0, ps_ack = 0;
  logic [7:0] in_data = 0, ps_data;
  logic in_ready, ps_valid;
  int checks = 0, failures = 0, stalls = 0;
  logic [7:0] q[$];

  gpio_out dut (.*);
  always #10000 clk = ~clk;

  always @(posedge clk) begin
    if (in_valid && in_ready) q.push_back(in_data);
    if (in_valid && !in_ready) stalls++;
    if (ps_ack && ps_valid) begin : rd
      logic [7:0] e;
      e = q.pop_front();
      checks++;
      if (ps_data !== e) begin failures++; $display("read %h exp %h", ps_data, e); end
    end
  end

  initial begin
    #200_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < 2000; i++) begin
      @(negedge clk);
      if (!(in_valid && !in_ready)) begin in_valid = ($urandom_range(1, 0) == 1); in_data = 8'($urandom); end
      ps_ack = ps_valid && ($urandom_range(2, 0) == 0);
    end
    @(negedge clk); in_valid = 0; ps_ack = 0;
    checks++;
    if (stalls == 0) begin failures++; $display("no stall"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
