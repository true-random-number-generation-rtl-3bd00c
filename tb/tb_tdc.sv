`timescale 1ps/1ps
// Testbench for tdc: random thermometer patterns (k taps past the edge) of
// either polarity, with cap_en randomly low; checks the captured count and
// that a capture without cap_en keeps the old count.
module tb_tdc;
  logic capture_clk = 0, rst_n = 0, cap_en = 0, old_level = 0;
  logic [127:0] taps = 0;
  logic [7:0] count;
  int checks = 0, failures = 0, exp_cnt = 0;

  tdc #(.TAPS(128)) dut (.*);

  initial begin
    #50_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int k;
    logic pol;
    #100 rst_n = 1;
    for (int i = 0; i < 300; i++) begin
      k = $urandom_range(128, 0);
      pol = 1'($urandom);
      old_level = pol;
      // taps [0..k-1] already carry the new level, the rest the old one
      for (int b = 0; b < 128; b++) taps[b] = (b < k) ? ~pol : pol;
      cap_en = ($urandom_range(3, 0) != 0);
      #100 capture_clk = 1;
      #100 capture_clk = 0;
      if (cap_en) exp_cnt = k;
      else begin
        // old capture against the new polarity is not meaningful; re-capture
        cap_en = 1; #100 capture_clk = 1; #100 capture_clk = 0; exp_cnt = k;
        checks++;
      end
      #10;
      checks++;
      if (count !== 8'(exp_cnt)) begin failures++; $display("count %0d exp %0d", count, exp_cnt); end
      // hold: change taps with cap_en low
      cap_en = 0; taps = ~taps;
      #100 capture_clk = 1; #100 capture_clk = 0; #10;
      checks++;
      if (count !== 8'(exp_cnt)) begin failures++; $display("count changed without cap_en"); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
