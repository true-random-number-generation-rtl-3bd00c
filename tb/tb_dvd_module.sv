`timescale 1ps/1ps
// Testbench for dvd_module: a memory model with 1-clk read latency holds
// random DVs; the expected pairs come from an 11-bit LFSR model written
// here from the polynomial x^11+x^9+1. Random backpressure on dvd_ready.
// Checks every DVD, that each DV index is used once per pass, the done
// pulse and two passes with different seeds (one of them zero).
module tb_dvd_module;
  import sirf_pkg::*;
  logic clk = 0, rst_n = 0, start = 0, dvd_ready = 0;
  logic [10:0] seed_a = 0, seed_b = 0;
  logic [11:0] a_addr, b_addr;
  logic [15:0] a_rdata, b_rdata;
  dvd_t dvd;
  logic dvd_valid, busy, done;
  logic [15:0] mem [4096];
  int checks = 0, failures = 0;

  dvd_module dut (.*);
  always #10000 clk = ~clk;
  always @(posedge clk) begin
    a_rdata <= mem[a_addr];
    b_rdata <= mem[b_addr];
  end

  function automatic logic [10:0] nxt(input logic [10:0] s);
    logic fb;
    fb = s[10] ^ s[8];
    return {s[9:0], fb};
  endfunction

  initial begin
    #5_000_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [10:0] la, lb;
    bit used [4096];
    int ndone;
    foreach (mem[i]) mem[i] = 16'($urandom_range(3000, 0));
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int pass = 0; pass < 2; pass++) begin
      @(negedge clk);
      seed_a = (pass == 0) ? 11'h0 : 11'($urandom);
      seed_b = 11'($urandom);
      la = (seed_a == 0) ? 11'd1 : seed_a;
      lb = (seed_b == 0) ? 11'd1 : seed_b;
      foreach (used[i]) used[i] = 0;
      start = 1; @(negedge clk); start = 0;
      ndone = 0;
      for (int k = 0; k < 2048; k++) begin : pair
        int ia, ib;
        ia = (k == 2047) ? 0 : int'(la);
        ib = 2048 + ((k == 2047) ? 0 : int'(lb));
        // wait for valid with random ready
        forever begin
          @(negedge clk);
          dvd_ready = ($urandom_range(2, 0) != 0);
          if (dvd_valid && dvd_ready) break;
        end
        checks++;
        if (dvd !== dvd_t'(int'(mem[ia]) - int'(mem[ib]))) begin
          failures++; $display("pair %0d: dvd %0d exp %0d", k, dvd, int'(mem[ia]) - int'(mem[ib]));
        end
        used[ia] = 1; used[ib] = 1;
        la = nxt(la); lb = nxt(lb);
        @(posedge clk); #1;
        if (done) ndone++;
        dvd_ready = 0;
      end
      checks++;
      if (ndone != 1) begin failures++; $display("done not at end"); end
      checks++;
      foreach (used[i]) if (!used[i]) begin failures++; $display("DV %0d unused", i); break; end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
