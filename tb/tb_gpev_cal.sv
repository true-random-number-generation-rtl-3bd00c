`timescale 1ps/1ps
// Testbench for gpev_cal: a statistics pass over 2048 random DVDs, then a
// calibration pass over the same values with random control bits and
// random backpressure. The expected DVD_c is computed here with integer
// arithmetic from the formula (mean = floor(sum/2048), range = max-min,
// Rref = 64+4*c[4:0], Mref = signed c[9:5], 4 fraction bits, truncation
// toward zero). A second set checks that a shift of all DVDs by a constant
// and their scaling by 2 leave DVD_c nearly unchanged (the calibration).
module tb_gpev_cal;
  import sirf_pkg::*;
  logic clk = 0, rst_n = 0, clear = 0, mode_cal = 0, dvd_valid = 0, dvdc_ready = 0;
  logic [9:0] ctrl = 0;
  dvd_t dvd = 0;
  logic dvd_ready, dvdc_valid;
  dvdc_t dvdc;
  int checks = 0, failures = 0;
  int vals [2048];
  int outs [2048];

  gpev_cal #(.N_LOG2(11), .FRAC(4)) dut (.*);
  always #10000 clk = ~clk;

  initial begin
    #20_000_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run(input logic [9:0] c, input bit check_formula);
    longint sum, mn, mx, mean, rng, rref, mref, e;
    sum = 0; mn = 1 << 30; mx = -(1 << 30);
    foreach (vals[i]) begin sum += vals[i]; if (vals[i] < mn) mn = vals[i]; if (vals[i] > mx) mx = vals[i]; end
    mean = sum >>> 11; rng = mx - mn; if (rng < 1) rng = 1;
    rref = 64 + 4 * longint'(c[4:0]); mref = longint'($signed(c[9:5]));
    @(negedge clk); clear = 1; mode_cal = 0; ctrl = c;
    @(negedge clk); clear = 0;
    foreach (vals[i]) begin
      dvd = dvd_t'(vals[i]); dvd_valid = 1;
      @(negedge clk);
    end
    dvd_valid = 0; mode_cal = 1;
    foreach (vals[i]) begin
      while (!dvd_ready) @(negedge clk);
      dvd = dvd_t'(vals[i]); dvd_valid = 1;
      @(negedge clk);
      dvd_valid = 0;
      forever begin
        dvdc_ready = ($urandom_range(3, 0) != 0);
        if (dvdc_valid && dvdc_ready) break;
        @(negedge clk);
      end
      outs[i] = int'(dvdc);
      if (check_formula) begin
        e = ((longint'(vals[i]) - mean) * rref * 16) / rng + mref * 16;
        checks++;
        if (longint'(dvdc) != e) begin failures++; $display("dvdc %0d exp %0d", dvdc, e); end
      end
      @(negedge clk); dvdc_ready = 0;
    end
    mode_cal = 0;
  endtask

  initial begin
    int base_out [2048];
    int close;
    repeat (2) @(posedge clk);
    rst_n = 1;
    foreach (vals[i]) vals[i] = int'($urandom_range(400, 0)) - 250;
    run(10'($urandom), 1);
    // calibration: shift and scale all values, same control bits
    foreach (vals[i]) base_out[i] = 0;
    foreach (vals[i]) vals[i] = int'($urandom_range(200, 0)) - 100;
    run(10'h155, 1);
    foreach (vals[i]) base_out[i] = outs[i];
    foreach (vals[i]) vals[i] = vals[i] * 2 + 37;
    run(10'h155, 1);
    close = 0;
    foreach (vals[i]) if (outs[i] - base_out[i] <= 16 && base_out[i] - outs[i] <= 16) close++;
    checks++;
    if (close < 2000) begin failures++; $display("calibration does not remove shift/scale: %0d close", close); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
