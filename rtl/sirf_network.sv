`timescale 1ps/1ps
// BEHAVIOURAL MODEL (not synthesizable) of the SiRF logic network: the rows
// of challenge-configured shift-register LUTs and the reconvergent-fanout
// gate network between the launch flip-flops and the path MUX. In silicon
// the path delays are the entropy source; the gate-level netlist is not
// published, so this model reproduces only what the TRNG relies on:
//  * logic: output j is the parity of a subset of the launch inputs; the
//    subset is chosen by the challenge (chlng) that configures the LUTs;
//  * fixed entropy: the delay of output j after a launch is a hash of
//    (CHIP_ID, chlng, j, set of toggled inputs in its subset), spread over
//    BASE_PS .. BASE_PS+SPREAD_PS-1, so it differs per device and per test;
//  * noise: uniform jitter of +/-NOISE_PS on every transition.
// Interface: launch_vec from the launch flip-flops, path_out to the MUX.
// Timing: path_out[j] takes its new value the model's delay after
// launch_vec changes (transport delay).
module sirf_network #(
  parameter int unsigned N_IN      = 32,
  parameter int unsigned N_OUT     = 32,
  parameter int unsigned CHLNG_W   = 64,
  parameter int unsigned CHIP_ID   = 1,
  parameter int unsigned BASE_PS   = 1500,
  parameter int unsigned SPREAD_PS = 8000,
  parameter int unsigned NOISE_PS  = 12
) (
  input  logic [CHLNG_W-1:0] chlng,
  input  logic [N_IN-1:0]    launch_vec,
  output logic [N_OUT-1:0]   path_out
);
  // 32-bit integer hash (xorshift-multiply finaliser)
  function automatic logic [31:0] mix(input logic [31:0] x);
    logic [31:0] h;
    h = x ^ (x >> 16);
    h = h * 32'h7feb352d;
    h = h ^ (h >> 15);
    h = h * 32'h846ca68b;
    return h ^ (h >> 16);
  endfunction

  function automatic logic [31:0] fold(input logic [CHLNG_W-1:0] c);
    logic [31:0] h;
    h = 32'h9e3779b9;
    for (int k = 0; k < CHLNG_W; k += 32) h = mix(h ^ 32'(c >> k));
    return h;
  endfunction

  for (genvar j = 0; j < N_OUT; j++) begin : g_out
    logic [N_IN-1:0] mask;
    logic            o;
    logic [N_IN-1:0] last_vec;
    logic [31:0]     fixed_h;

    // LUT configuration: which launch inputs reach output j
    assign mask = N_IN'({mix(fold(chlng) ^ 32'(j)), mix(fold(chlng) ^ 32'(j) ^ 32'h5555)})
                  | (N_IN'(1) << (j % N_IN));
    assign path_out[j] = o;

    initial begin
      o        = 1'b0;
      last_vec = '0;
      fixed_h  = '0;
    end

    always @(launch_vec) begin : p_delay
      logic [N_IN-1:0] tog;
      int              jit;
      int unsigned     d;
      tog      = (launch_vec ^ last_vec) & mask;
      last_vec = launch_vec;
      fixed_h  = mix(mix(CHIP_ID) ^ fold(chlng) ^ mix(32'(j) + 32'h1234) ^ mix(32'(tog)));
      jit      = int'($urandom_range(2 * NOISE_PS, 0)) - int'(NOISE_PS);
      d        = BASE_PS + (fixed_h % SPREAD_PS);
      d        = unsigned'(int'(d) + jit);
      // transport delay: each transition is scheduled in its own thread
      fork
        begin : p_fire
          automatic int unsigned dd = d;
          automatic logic        vv = ^(launch_vec & mask);
          #(dd) o = vv;
        end
      join_none
    end
  end
endmodule
