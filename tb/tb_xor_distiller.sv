`timescale 1ps/1ps
// Testbench for xor_distiller (OUT_BITS = 64): a random DV LSB stream with
// gaps and en toggling; the expected register is built from the XOR of each
// group of 12 accepted LSBs; checks full, the bit order and that input is
// ignored once full and after clear.
module tb_xor_distiller;
  logic clk = 0, rst_n = 0, clear = 0, en = 0, dv_valid = 0, dv_lsb = 0;
  logic [63:0] bits;
  logic full;
  int checks = 0, failures = 0;
  logic [63:0] exp_bits;
  int nacc = 0, nbits = 0;
  logic acc = 0;

  xor_distiller #(.OUT_BITS(64), .DISTILL(12)) dut (.*);
  always #10000 clk = ~clk;

  initial begin
    #500_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    exp_bits = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int round = 0; round < 2; round++) begin
      @(negedge clk); clear = 1; @(negedge clk); clear = 0;
      exp_bits = '0; nacc = 0; nbits = 0; acc = 0;
      for (int i = 0; i < 64*12*2 + 200; i++) begin
        @(negedge clk);
        en = ($urandom_range(7, 0) != 0);
        dv_valid = ($urandom_range(3, 0) != 0);
        dv_lsb = 1'($urandom);
        if (en && dv_valid && nbits < 64) begin
          acc ^= dv_lsb; nacc++;
          if (nacc == 12) begin
            exp_bits[nbits] = acc; nbits++; acc = 0; nacc = 0;
          end
        end
        @(posedge clk); #1;
        if (nbits == 64 || (i % 97) == 0) begin
          checks++;
          if ((nbits == 64) !== full) begin failures++; $display("full wrong"); end
        end
      end
      checks++;
      if (bits !== exp_bits) begin failures++; $display("bits %h exp %h", bits, exp_bits); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
