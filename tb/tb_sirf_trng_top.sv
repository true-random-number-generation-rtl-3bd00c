`timescale 1ps/1ps
// End-to-end testbench for sirf_trng_top at its default parameters: one
// full TRNG request of 20 x 256 = 5120 bytes.
// The testbench plays the host (writes the seed, pulses start, reads GPIO
// Out with random delays) and the capture-clock phase shifter (capture_clk
// = clk delayed by phase*STEP_TAPS*18 ps + 500 ps).
// It records the delay values the Timing Engine produces and from them
// recomputes, with its own code, the distilled LFSR seed, the nonce, the
// DVD pairings, the GPEV calibration and the bytes BitGen must emit; every
// byte read from GPIO Out is compared. It also counts the mechanisms of the
// design (phase retries, skipped vector pairs, rising and falling edges,
// reseed, stored DVs, iterations, GPIO Out stalls) and fails if one never
// happened, and checks the output rate against the 30 KB/s reported for
// the FPGA implementation (at the 50 MHz clock used here).
module tb_sirf_trng_top;
  import sirf_pkg::*;
  localparam int STEP_PS = 56 * 18, OFFSET_PS = 500, HALF = 10000;
  logic clk = 0, rst_n = 0, capture_clk = 0;
  logic [PHASE_W-1:0] phase;
  logic [CHLNG_W-1:0] chlng = 64'hC0FF_EE00_1234_5678;
  logic ps_wr = 0, ps_out_ack = 0, ps_out_valid, busy, done;
  logic [1:0] ps_addr = 0;
  logic [31:0] ps_wdata = 0;
  logic [7:0] ps_out_data;
  int checks = 0, failures = 0;

  sirf_trng_top dut (.*);

  always #HALF clk = ~clk;
  always @(clk) capture_clk <= #(int'(phase) * STEP_PS + OFFSET_PS) clk;

  // ---- observation ----
  int seed_dvs[$], nonce_dvs[$];
  int dv_mem [4096];
  int retries = 0, skipped = 0, vreqs = 0, rises = 0, falls = 0, reseeds = 0, stalls = 0;
  int stats_passes = 0, cal_passes = 0, tests = 0;
  logic [63:0] reseed_val;

  always @(posedge clk) if (rst_n) begin
    if (dut.u_te.dv_valid) begin
      if (dut.store_en) begin
        nonce_dvs.push_back(int'(dut.u_te.dv));
        dv_mem[dut.u_te.dv_index[11:0]] = int'(dut.u_te.dv);
      end else seed_dvs.push_back(int'(dut.u_te.dv));
      if (dut.u_te.rise) rises++; else falls++;
    end
    if (dut.u_te.launch) tests++;
    if (dut.u_te.launch && dut.u_te.phase != 0) retries++;
    if (dut.u_te.vg_req) vreqs++;
    if (dut.lfsr_load_te) reseeds++;
    if (dut.bg_valid && !dut.bg_ready) stalls++;
    if (dut.dvd_start && !dut.gpev_mode_cal) stats_passes++;
    if (dut.dvd_start && dut.gpev_mode_cal) cal_passes++;
  end
  always @(posedge clk) if (dut.lfsr_load_te) #1 reseed_val = dut.lfsr_state;

  // ---- reference model ----
  function automatic logic [10:0] l11(input logic [10:0] s);
    return {s[9:0], s[10] ^ s[8]};
  endfunction

  function automatic logic [63:0] distill64(input int dvs[$]);
    logic [63:0] r;
    for (int b = 0; b < 64; b++) begin
      r[b] = 0;
      for (int k = 0; k < 12; k++) r[b] ^= dvs[12*b + k][0];
    end
    return r;
  endfunction

  logic [NONCE_BITS-1:0] exp_nonce;
  logic [7:0] exp_bytes [20*256];

  task automatic build_expected();
    for (int b = 0; b < NONCE_BITS; b++) begin
      exp_nonce[b] = 0;
      for (int k = 0; k < 12; k++) exp_nonce[b] ^= nonce_dvs[12*b + k][0];
    end
    for (int it = 0; it < 20; it++) begin : iter_blk
      logic [31:0] ch;
      logic [10:0] la, lb;
      longint d [2048];
      longint sum, mn, mx, mean, rng, rref, mref, c;
      ch = exp_nonce[16*it +: 32];
      la = (ch[10:0] == 0) ? 11'd1 : ch[10:0];
      lb = (ch[21:11] == 0) ? 11'd1 : ch[21:11];
      sum = 0; mn = 1 << 40; mx = -(1 << 40);
      for (int k = 0; k < 2048; k++) begin
        int ia, ib;
        ia = (k == 2047) ? 0 : int'(la);
        ib = 2048 + ((k == 2047) ? 0 : int'(lb));
        d[k] = longint'(dv_mem[ia]) - longint'(dv_mem[ib]);
        sum += d[k]; if (d[k] < mn) mn = d[k]; if (d[k] > mx) mx = d[k];
        la = l11(la); lb = l11(lb);
      end
      mean = sum >>> 11; rng = mx - mn; if (rng < 1) rng = 1;
      rref = 64 + 4 * longint'(ch[26:22]); mref = longint'($signed(ch[31:27]));
      for (int k = 0; k < 2048; k++) begin
        c = ((d[k] - mean) * rref * 16) / rng + mref * 16;
        exp_bytes[it*256 + k/8][k%8] = c[0];
      end
    end
  endtask

  // ---- watchdog ----
  initial begin
    #400_000_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic host_write(input logic [1:0] a, input logic [31:0] d);
    @(negedge clk); ps_wr = 1; ps_addr = a; ps_wdata = d;
    @(negedge clk); ps_wr = 0;
  endtask

  initial begin
    int nread, ones;
    longint t_start, t_end;
    bit built;
    logic [7:0] got [20*256];
    reseed_val = 'x;
    built = 0; nread = 0; ones = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    host_write(2, 1);                       // start high: LFSR takes the host seed
    host_write(0, 32'h89AB_CDEF);
    host_write(1, 32'h0123_4567);
    repeat (2) @(negedge clk);
    checks++;
    if (dut.lfsr_state !== 64'h0123_4567_89AB_CDEF) begin failures++; $display("host seed not in LFSR"); end
    host_write(2, 0);                       // falling start begins the flow
    t_start = $time;
    while (nread < 20*256) begin
      @(negedge clk);
      ps_out_ack = 0;
      if (nread == 1000) repeat (3000) @(negedge clk);   // slow host: BitGen must stall
      if (ps_out_valid && $urandom_range(3, 0) == 0) begin
        ps_out_ack = 1;
        got[nread] = ps_out_data;
        nread++;
      end
    end
    @(negedge clk); ps_out_ack = 0;
    t_end = $time;
    repeat (5) @(negedge clk);
    build_expected();
    skipped = vreqs - (768 + 4096);
    checks++;
    if (seed_dvs.size() != 768 || nonce_dvs.size() != 4096) begin
      failures++; $display("DV counts %0d / %0d", seed_dvs.size(), nonce_dvs.size());
    end
    checks++;
    if (reseed_val !== distill64(seed_dvs)) begin failures++; $display("LFSR reseed %h exp %h", reseed_val, distill64(seed_dvs)); end
    checks++;
    if (dut.nonce_bits !== exp_nonce) begin failures++; $display("nonce mismatch"); end
    for (int i = 0; i < 20*256; i++) begin
      checks++;
      if (got[i] !== exp_bytes[i]) begin
        failures++;
        if (failures < 10) $display("byte %0d: %h exp %h", i, got[i], exp_bytes[i]);
      end
      ones += $countones(got[i]);
    end
    checks++;
    if (ones < 20*256*8*45/100 || ones > 20*256*8*55/100) begin failures++; $display("bias: %0d ones", ones); end
    // mechanisms
    checks++; if (retries == 0)     begin failures++; $display("no phase retry"); end
    checks++; if (skipped == 0)     begin failures++; $display("no skipped pair"); end
    checks++; if (rises == 0 || falls == 0) begin failures++; $display("edges %0d/%0d", rises, falls); end
    checks++; if (reseeds != 1)     begin failures++; $display("reseeds %0d", reseeds); end
    checks++; if (stalls == 0)      begin failures++; $display("no GPIO Out stall"); end
    checks++; if (stats_passes != 20 || cal_passes != 20) begin failures++; $display("passes %0d/%0d", stats_passes, cal_passes); end
    checks++; if (busy)             begin failures++; $display("still busy"); end
    // rate: bytes per second at the simulated 50 MHz clock
    begin : rate
      real secs, rate_kbs;
      secs = real'(t_end - t_start) * 1.0e-12;
      rate_kbs = 5120.0 / secs / 1000.0;
      $display("5120 bytes in %0d clk cycles = %0.1f KB/s at 50 MHz", (t_end - t_start) / (2*HALF), rate_kbs);
      checks++;
      if (rate_kbs < 30.0) begin failures++; $display("slower than 30 KB/s"); end
    end
    $display("launch-capture tests %0d, phase retries %0d, skipped pairs %0d, rising %0d, falling %0d, GPIO stalls %0d, ones %0d of %0d",
             tests, retries, skipped, rises, falls, stalls, ones, 20*256*8);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
