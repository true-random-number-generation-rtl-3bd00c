`timescale 1ps/1ps
// 64-bit LFSR that drives the vector generator. In front of it sits the
// two-input load multiplexer of the flow: while load_gpio is high (the
// host's start signal) it loads the host seed; load_te loads the seed the
// Timing Engine distilled from path delays; step advances the sequence.
// Feedback x^64+x^63+x^61+x^60+1 in Fibonacci form (a maximal-length choice,
// the polynomial is not given). One step shifts in STEP_BITS = 64 new bits
// (a leap-forward LFSR, the single-bit update unrolled 64 times), so
// successive 64-bit numbers share no bits. A zero seed is replaced by 1 so
// the register can never lock up. Priority: load_gpio, load_te, step.
// One clk per action.
module lfsr64 #(
  parameter int unsigned STEP_BITS = 64
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        load_gpio,
  input  logic        load_te,
  input  logic [63:0] gpio_seed,
  input  logic [63:0] te_seed,
  input  logic        step,
  output logic [63:0] state
);
  logic [63:0] load_val, leap;

  always_comb begin
    load_val = load_gpio ? gpio_seed : te_seed;
    if (load_val == '0) load_val = 64'd1;
    leap = state;
    for (int i = 0; i < STEP_BITS; i++)
      leap = {leap[62:0], leap[63] ^ leap[62] ^ leap[60] ^ leap[59]};
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)                    state <= 64'd1;
    else if (load_gpio || load_te) state <= load_val;
    else if (step)                 state <= leap;
  end
endmodule
