`timescale 1ps/1ps
// Testbench for bitgen (OUT_BYTES = 256): random DVD_c LSBs with random
// input gaps and output backpressure; each byte must hold the next 8 bits,
// first bit in bit 0; done must pulse with the 256th byte; a new start
// begins a second iteration.
module tb_bitgen;
  logic clk = 0, rst_n = 0, start = 0, dvdc_lsb = 0, in_valid = 0, byte_ready = 0;
  logic in_ready, byte_valid, done;
  logic [7:0] byte_out;
  int checks = 0, failures = 0;
  logic bitq[$];
  int nbytes = 0, ndone = 0, stalls = 0;

  bitgen #(.OUT_BYTES(256)) dut (.*);
  always #10000 clk = ~clk;

  always @(posedge clk) begin
    if (in_valid && in_ready) bitq.push_back(dvdc_lsb);
    if (in_valid && !in_ready) stalls++;
    if (done && rst_n) ndone++;
    if (byte_valid && byte_ready) begin : chk
      logic [7:0] e;
      for (int b = 0; b < 8; b++) e[b] = bitq.pop_front();
      checks++;
      if (byte_out !== e) begin failures++; $display("byte %h exp %h", byte_out, e); end
      nbytes++;
    end
  end

  initial begin
    #2_000_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int it = 0; it < 2; it++) begin
      @(negedge clk); start = 1; @(negedge clk); start = 0;
      while (nbytes < 256 * (it + 1)) begin
        @(negedge clk);
        in_valid = ($urandom_range(3, 0) != 0);
        dvdc_lsb = 1'($urandom);
        byte_ready = ($urandom_range(2, 0) != 0);
        if (nbytes >= 256 * (it + 1) - 1 && bitq.size() >= 8) in_valid = 0;
      end
      @(negedge clk); in_valid = 0; byte_ready = 0;
      repeat (3) @(negedge clk);
      checks++;
      if (ndone != it + 1) begin failures++; $display("done count %0d", ndone); end
      bitq.delete();
    end
    checks++;
    if (stalls == 0) begin failures++; $display("no stall seen"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
