`timescale 1ps/1ps
// Testbench for dv_bram: fills all 4096 words with random data, then reads
// random addresses on both ports against a shadow array (1-clk latency).
module tb_dv_bram;
  logic clk = 0, a_we = 0;
  logic [11:0] a_addr = 0, b_addr = 0;
  logic [15:0] a_wdata = 0, a_rdata, b_rdata;
  logic [15:0] shadow [4096];
  int checks = 0, failures = 0;

  dv_bram #(.DEPTH(4096), .W(16)) dut (.*);
  always #10000 clk = ~clk;

  initial begin
    #1_000_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 4096; i++) begin
      @(negedge clk); a_we = 1; a_addr = 12'(i); a_wdata = 16'($urandom); shadow[i] = a_wdata;
    end
    @(negedge clk); a_we = 0;
    for (int i = 0; i < 2000; i++) begin
      @(negedge clk);
      a_addr = 12'($urandom); b_addr = 12'($urandom);
      a_we = ($urandom_range(3, 0) == 0); a_wdata = 16'($urandom);
      @(posedge clk); #1;
      checks++;
      if (a_rdata !== shadow[a_addr] || b_rdata !== shadow[b_addr]) begin
        failures++; $display("read mismatch at %0d/%0d", a_addr, b_addr);
      end
      if (a_we) shadow[a_addr] = a_wdata;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
