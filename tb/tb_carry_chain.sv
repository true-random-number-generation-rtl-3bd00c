`timescale 1ps/1ps
// Testbench for the carry_chain model: rising and falling edges on din.
// The taps are sampled every picosecond; tap i must show the new level
// from exactly (i+1)*18 ps after the edge on, and the old level before.
module tb_carry_chain;
  logic din = 0;
  logic [127:0] taps;
  int checks = 0, failures = 0;

  carry_chain #(.TAPS(128), .TAP_PS(18)) dut (.*);

  initial begin
    #10_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [127:0] expv;
    int bad [128];
    #5000;
    for (int e = 0; e < 4; e++) begin
      foreach (bad[i]) bad[i] = 0;
      din = ~din;
      for (int t = 0; t <= 128 * 18 + 20; t++) begin
        for (int i = 0; i < 128; i++) expv[i] = (t >= (i + 1) * 18) ? din : ~din;
        for (int i = 0; i < 128; i++) if (taps[i] !== expv[i]) bad[i]++;
        #1;
      end
      for (int i = 0; i < 128; i++) begin
        checks++;
        if (bad[i] != 0) begin failures++; if (failures < 5) $display("tap %0d wrong at %0d instants", i, bad[i]); end
      end
      #3000;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
