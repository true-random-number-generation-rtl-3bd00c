`timescale 1ps/1ps
// Testbench for vector_gen: random LFSR states and requests; checks the
// V1/V2 split, the cyclic output selection, vld one clk after req and that
// the LFSR is stepped exactly on req.
module tb_vector_gen;
  logic clk = 0, rst_n = 0, req = 0;
  logic [63:0] lfsr_state = 0, held;
  logic lfsr_step, vld;
  logic [31:0] v1, v2;
  logic [4:0] sel;
  int checks = 0, failures = 0, nreq = 0;

  vector_gen #(.N(32), .NO(32)) dut (.*);
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
    for (int i = 0; i < 300; i++) begin
      @(negedge clk);
      lfsr_state = {$urandom, $urandom};
      req = ($urandom_range(1, 0) == 1);
      held = lfsr_state;
      checks++;
      if (lfsr_step !== req) begin failures++; $display("step != req"); end
      @(posedge clk); #1;
      checks++;
      if (vld !== req) begin failures++; $display("vld wrong"); end
      if (req) begin
        checks++;
        if (v1 !== held[31:0] || v2 !== held[63:32] || sel !== 5'(nreq % 32)) begin
          failures++;
          $display("vector mismatch v1 %h v2 %h sel %0d (exp %0d)", v1, v2, sel, nreq % 32);
        end
        nreq++;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
