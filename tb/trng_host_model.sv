`timescale 1ps/1ps
// Host-side model for the TRNG testbenches: performs N_REQ requests on one
// sirf_trng_top. For each request it writes start=1, the 64-bit seed,
// start=0, then reads 5120 bytes from GPIO Out (acknowledging each byte
// with probability 1/2) into bytes[]. finished goes high after the last.
// It also generates that device's capture clock from clk and phase.
module trng_host_model #(
  parameter int unsigned N_REQ   = 1,
  parameter logic [63:0] SEED    = 64'h0123_4567_89AB_CDEF,
  parameter int unsigned STEP_PS = 56 * 18,
  parameter int unsigned OFFSET  = 500
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic [4:0]  phase,
  output logic        capture_clk,
  output logic        ps_wr,
  output logic [1:0]  ps_addr,
  output logic [31:0] ps_wdata,
  input  logic [7:0]  ps_out_data,
  input  logic        ps_out_valid,
  output logic        ps_out_ack,
  output logic        finished
);
  logic [7:0] bytes [N_REQ*5120];

  initial capture_clk = 0;
  always @(clk) capture_clk <= #(int'(phase) * STEP_PS + OFFSET) clk;

  task automatic wr(input logic [1:0] a, input logic [31:0] d);
    @(negedge clk); ps_wr = 1; ps_addr = a; ps_wdata = d;
    @(negedge clk); ps_wr = 0;
  endtask

  initial begin
    int n;
    ps_wr = 0; ps_addr = 0; ps_wdata = 0; ps_out_ack = 0; finished = 0;
    @(posedge rst_n);
    for (int r = 0; r < N_REQ; r++) begin
      wr(2, 1); wr(0, SEED[31:0]); wr(1, SEED[63:32]); wr(2, 0);
      n = 0;
      while (n < 5120) begin
        @(negedge clk);
        ps_out_ack = 0;
        if (ps_out_valid && $urandom_range(1, 0) == 1) begin
          ps_out_ack = 1;
          bytes[r*5120 + n] = ps_out_data;
          n++;
        end
      end
      @(negedge clk); ps_out_ack = 0;
      repeat (10) @(negedge clk);
    end
    finished = 1;
  end
endmodule
