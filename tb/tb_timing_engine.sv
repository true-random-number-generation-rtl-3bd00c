`timescale 1ps/1ps
// Testbench for timing_engine. The testbench plays vector generator, path
// and TDC: each vector pair gets a random path delay (or no transition at
// all); at every launch it computes the TDC count the capture clock would
// see, count = clamp(floor((phase*STEP_PS + OFFSET - delay)/18), 0, 128).
// The expected DV of a pair is found by the same phase search done here
// independently; pairs without a transition or never reached are skipped.
module tb_timing_engine;
  import sirf_pkg::*;
  localparam int STEP_TAPS = 56, TAP_PS = 18, OFFSET = 500, MAXP = 19;
  logic clk = 0, rst_n = 0, start = 0;
  logic [NP_W-1:0] n_paths = 0;
  logic vg_req, vg_vld = 0, load_v1, launch, cap_en, path_level = 0, old_level;
  logic [7:0] tdc_count = 0;
  logic [PHASE_W-1:0] phase;
  logic [DV_W-1:0] dv;
  logic [NP_W-1:0] dv_index;
  logic dv_valid, rise, busy, done;
  int checks = 0, failures = 0;
  int cur_delay, cur_excite, base_lvl;
  int exp_q[$], got = 0, retries = 0, skipped = 0, launches = 0;

  timing_engine #(.STEP_TAPS(STEP_TAPS), .MAX_PHASE(MAXP)) dut (.*);
  always #10000 clk = ~clk;

  function automatic int cnt_at(int p, int d);
    int c;
    c = p * STEP_TAPS * TAP_PS + OFFSET - d;
    if (c < 0) return 0;
    c = c / TAP_PS;
    return (c > 128) ? 128 : c;
  endfunction

  // vector generator and path model
  always @(posedge clk) begin
    vg_vld <= vg_req;
    if (vg_req) begin
      cur_excite = ($urandom_range(9, 0) < 8);
      cur_delay  = ($urandom_range(19, 0) == 0) ? 19800 : int'($urandom_range(9500, 600));
      base_lvl   = int'($urandom_range(1, 0));
      if (cur_excite) begin : exp
        int p;
        for (p = 0; p <= MAXP; p++) if (cnt_at(p, cur_delay) > 0) break;
        if (p <= MAXP && cnt_at(p, cur_delay) < 128)
          exp_q.push_back(p * STEP_TAPS + 128 - cnt_at(p, cur_delay));
        else skipped++;
      end else skipped++;
    end
    if (load_v1) path_level <= 1'(base_lvl);
    if (launch) begin
      launches++;
      if (phase != 0) retries++;
      tdc_count <= cur_excite ? 8'(cnt_at(int'(phase), cur_delay)) : 8'd0;
      if (cur_excite)
        fork
          begin : edge_at
            automatic int   dd = cur_delay;
            automatic logic nl = 1'(~base_lvl);
            #(dd) path_level = nl;
          end
        join_none
    end
  end

  always @(posedge clk) if (rst_n && dv_valid) begin
    checks++;
    if (exp_q.size() == 0) begin failures++; $display("unexpected DV"); end
    else begin : cmp
      int e;
      e = exp_q.pop_front();
      if (dv !== DV_W'(e) || dv_index !== NP_W'(got) || rise !== ~old_level) begin
        failures++; $display("DV %0d exp %0d index %0d", dv, e, dv_index);
      end
    end
    got++;
  end

  initial begin
    #5_000_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(negedge clk); start = 1; n_paths = 200;
    @(negedge clk); start = 0;
    wait (done);
    @(posedge clk); #1;
    checks++;
    if (got != 200 || busy) begin failures++; $display("got %0d DVs", got); end
    checks++;
    if (retries == 0 || skipped == 0) begin failures++; $display("retries %0d skipped %0d", retries, skipped); end
    $display("launch-capture tests %0d, phase retries %0d, skipped pairs %0d", launches, retries, skipped);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
