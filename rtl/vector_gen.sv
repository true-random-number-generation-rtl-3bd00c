`timescale 1ps/1ps
// Vector generator: turns the LFSR into 2-vector launch sequences. On req it
// takes the current 64-bit LFSR state, registers V1 = state[31:0] and
// V2 = state[63:32] for the 32 launch flip-flops, picks the next path output
// of the MUX (a counter, so outputs are used uniformly) and steps the LFSR.
// vld is high the clk after req, together with the new v1/v2/sel.
// Splitting one 64-bit number into two 32-bit vectors follows the
// description; the output counter is this design's choice.
module vector_gen
  import sirf_pkg::*;
#(
  parameter int unsigned N = N_LAUNCH,
  parameter int unsigned NO = N_OUT
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  req,
  input  logic [2*N-1:0]        lfsr_state,
  output logic                  lfsr_step,
  output logic [N-1:0]          v1,
  output logic [N-1:0]          v2,
  output logic [$clog2(NO)-1:0] sel,
  output logic                  vld
);
  logic [$clog2(NO)-1:0] out_cnt;

  assign lfsr_step = req;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      v1 <= '0; v2 <= '0; sel <= '0; out_cnt <= '0; vld <= 1'b0;
    end else begin
      vld <= req;
      if (req) begin
        v1      <= lfsr_state[N-1:0];
        v2      <= lfsr_state[2*N-1:N];
        sel     <= out_cnt;
        out_cnt <= (out_cnt == $clog2(NO)'(NO-1)) ? '0 : out_cnt + 1'b1;
      end
    end
  end
endmodule
