`timescale 1ps/1ps
// Testbench for master_control: the testbench answers for the Timing
// Engine, DVD module and BitGen with done pulses after random delays, and
// checks the order of the flow: start falling edge, seed run of 768 paths
// with the seed distiller, LFSR reseed, nonce run of 4096 paths with store
// and nonce distiller, then 20 iterations each with a statistics pass and a
// calibration pass whose chunk is nonce[16*i +: 32], and the final done.
module tb_master_control;
  import sirf_pkg::*;
  logic clk = 0, rst_n = 0, start = 0;
  logic te_start, te_done = 0, seed_en, nonce_en, distill_clear, lfsr_load_te, store_en;
  logic [NP_W-1:0] te_n_paths;
  logic [NONCE_BITS-1:0] nonce;
  logic dvd_start, dvd_done = 0, gpev_clear, gpev_mode_cal, bitgen_start, bitgen_done = 0, busy, done;
  logic [10:0] seed_a, seed_b;
  logic [9:0] gpev_ctrl;
  logic [4:0] iter;
  int checks = 0, failures = 0;
  string log[$];

  master_control dut (.*);
  always #10000 clk = ~clk;

  task automatic expect_eq(input bit cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    #2_000_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [31:0] chunk;
    for (int i = 0; i < NONCE_BITS; i += 32) nonce[i +: 32] = $urandom;
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(negedge clk); start = 1;
    repeat (3) @(negedge clk);
    expect_eq(!busy, "waits while start is high");
    start = 0;
    // seed run
    while (!te_start) @(negedge clk);
    expect_eq(te_n_paths == 768 && seed_en && !nonce_en && !store_en, "seed run setup");
    repeat ($urandom_range(20, 2)) @(negedge clk);
    expect_eq(seed_en && !lfsr_load_te, "seed run in progress");
    te_done = 1; @(negedge clk); te_done = 0;
    expect_eq(lfsr_load_te == 1, "reseed after seed run");
    @(negedge clk);
    expect_eq(te_start && te_n_paths == 4096 && nonce_en && store_en, "nonce run setup");
    repeat ($urandom_range(20, 2)) @(negedge clk);
    te_done = 1; @(negedge clk); te_done = 0;
    for (int it = 0; it < 20; it++) begin
      chunk = nonce[16*it +: 32];
      expect_eq(gpev_clear && dvd_start && !gpev_mode_cal, $sformatf("stats pass %0d", it));
      expect_eq(seed_a == chunk[10:0] && seed_b == chunk[21:11] && gpev_ctrl == chunk[31:22], "chunk fields");
      repeat ($urandom_range(10, 2)) @(negedge clk);
      dvd_done = 1; @(negedge clk); dvd_done = 0;
      expect_eq(dvd_start && bitgen_start && gpev_mode_cal, "cal pass start");
      repeat ($urandom_range(10, 2)) @(negedge clk);
      expect_eq(gpev_mode_cal && !dvd_start, "cal pass running");
      bitgen_done = 1; @(negedge clk); bitgen_done = 0;
    end
    @(posedge clk); #1;
    expect_eq(done == 1, "done after 20 iterations");
    @(posedge clk); #1;
    expect_eq(!busy, "idle again");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
