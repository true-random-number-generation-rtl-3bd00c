`timescale 1ps/1ps
// Testbench for the sirf_network behavioural model. Two instances with
// different CHIP_ID see the same launches. Checks: every output change
// arrives inside BASE-NOISE .. BASE+SPREAD+NOISE after the launch; repeating
// the same V1->V2 launch reproduces each delay within 2*NOISE (fixed part);
// the two devices differ in most delays; about half the outputs toggle.
// Output changes are found by polling every picosecond.
module tb_sirf_network;
  localparam int BASE = 1500, SPREAD = 8000, NOISE = 12;
  logic [63:0] chlng = 64'h0123_4567_89AB_CDEF;
  logic [31:0] vec = 0;
  logic [31:0] pa, pb;
  int checks = 0, failures = 0;
  longint t_launch;
  longint arr_a[32], arr_b[32], first_a[32];
  int ntog;

  sirf_network #(.CHIP_ID(1), .BASE_PS(BASE), .SPREAD_PS(SPREAD), .NOISE_PS(NOISE)) dut_a (.chlng, .launch_vec(vec), .path_out(pa));
  sirf_network #(.CHIP_ID(2), .BASE_PS(BASE), .SPREAD_PS(SPREAD), .NOISE_PS(NOISE)) dut_b (.chlng, .launch_vec(vec), .path_out(pb));


  initial begin
    #100_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // launch v and record, by polling every picosecond, when each output changes
  task automatic do_launch(input logic [31:0] v);
    logic [31:0] la, lb;
    foreach (arr_a[j]) begin arr_a[j] = -1; arr_b[j] = -1; end
    la = pa; lb = pb;
    t_launch = $time;
    vec = v;
    for (int t = 0; t < 20000; t++) begin
      #1;
      if (pa != la || pb != lb)
        for (int j = 0; j < 32; j++) begin
          if (pa[j] != la[j]) arr_a[j] = t + 1;
          if (pb[j] != lb[j]) arr_b[j] = t + 1;
        end
      la = pa; lb = pb;
    end
  endtask

  initial begin
    logic [31:0] v1, v2;
    int diff_dev, tog_total, same_ok;
    diff_dev = 0; tog_total = 0;
    #20000;
    for (int t = 0; t < 40; t++) begin
      v1 = $urandom; v2 = $urandom;
      do_launch(v1);
      do_launch(v2);
      foreach (arr_a[j]) begin
        first_a[j] = arr_a[j];
        if (arr_a[j] >= 0) begin
          tog_total++;
          checks++;
          if (arr_a[j] < BASE - NOISE || arr_a[j] > BASE + SPREAD + NOISE) begin
            failures++; $display("delay %0d out of range", arr_a[j]);
          end
          if (arr_b[j] >= 0 && (arr_b[j] - arr_a[j] > 2*NOISE || arr_a[j] - arr_b[j] > 2*NOISE)) diff_dev++;
        end
      end
      // same transition again: same fixed delay up to noise
      do_launch(v1);
      do_launch(v2);
      foreach (arr_a[j]) begin
        checks++;
        if ((first_a[j] < 0) != (arr_a[j] < 0)) begin
          failures++; $display("logic function not repeatable on output %0d", j);
        end else if (first_a[j] >= 0 &&
                     (arr_a[j] - first_a[j] > 2*NOISE || first_a[j] - arr_a[j] > 2*NOISE)) begin
          failures++; $display("fixed delay not repeatable: %0d vs %0d", first_a[j], arr_a[j]);
        end
      end
    end
    checks++;
    if (tog_total < 40*32/4 || tog_total > 40*32*3/4) begin failures++; $display("toggle share %0d", tog_total); end
    checks++;
    if (diff_dev < tog_total / 2) begin failures++; $display("devices too alike: %0d of %0d", diff_dev, tog_total); end
    $display("toggles %0d, device-distinct delays %0d", tog_total, diff_dev);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
