`timescale 1ps/1ps
// Testbench for lfsr64: compares every state with a reference written as a
// bit loop over the tap list {64,63,61,60}, 64 shifts per step; checks load
// priority, the zero-seed guard and that states do not repeat early.
module tb_lfsr64;
  logic clk = 0, rst_n = 0, load_gpio = 0, load_te = 0, step = 0;
  logic [63:0] gpio_seed = 0, te_seed = 0, state, model;
  int checks = 0, failures = 0;

  lfsr64 dut (.*);
  always #10000 clk = ~clk;

  // one step of the register = 64 single-bit shifts
  function automatic logic [63:0] ref_next(input logic [63:0] s);
    int taps[4] = '{64, 63, 61, 60};
    logic b;
    for (int n = 0; n < 64; n++) begin
      b = 0;
      foreach (taps[t]) b ^= s[taps[t]-1];
      s = (s << 1) | 64'(b);
    end
    return s;
  endfunction

  task automatic chk(input string what);
    checks++;
    if (state !== model) begin
      failures++;
      $display("%s: state %h expected %h", what, state, model);
    end
  endtask

  initial begin
    #200_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    model = 64'd1;
    repeat (2) @(posedge clk);
    rst_n = 1; #1; chk("reset");
    // load from host seed, with te_seed also presented: host wins
    @(negedge clk); load_gpio = 1; load_te = 1; gpio_seed = 64'hDEADBEEF_01234567; te_seed = 64'h5;
    @(posedge clk); #1; model = gpio_seed; chk("gpio load");
    @(negedge clk); load_gpio = 0; load_te = 0;
    for (int i = 0; i < 500; i++) begin
      @(negedge clk); step = ($urandom_range(1, 0) == 1);
      @(posedge clk); #1; if (step) model = ref_next(model); chk("step");
    end
    @(negedge clk); step = 0; load_te = 1; te_seed = 64'h0;
    @(posedge clk); #1; model = 64'd1; chk("zero seed guard");
    @(negedge clk); load_te = 1; te_seed = 64'hA5A5_0000_FFFF_1234; step = 1;
    @(posedge clk); #1; model = te_seed; chk("te load over step");
    @(negedge clk); load_te = 0;
    for (int i = 0; i < 300; i++) begin
      @(posedge clk); #1; model = ref_next(model); chk("run");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
