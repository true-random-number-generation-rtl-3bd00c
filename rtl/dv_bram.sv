`timescale 1ps/1ps
// Block RAM for the delay values of one nonce run (4096 x DV_W bits).
// Port A writes (Timing Engine) or reads; port B only reads; both reads are
// registered (data the clk after the address), as in an FPGA block RAM.
// The DVD module reads the two DVs of a pairing in the same cycle.
module dv_bram #(
  parameter int unsigned DEPTH = 4096,
  parameter int unsigned W     = 16
) (
  input  logic                     clk,
  input  logic                     a_we,
  input  logic [$clog2(DEPTH)-1:0] a_addr,
  input  logic [W-1:0]             a_wdata,
  output logic [W-1:0]             a_rdata,
  input  logic [$clog2(DEPTH)-1:0] b_addr,
  output logic [W-1:0]             b_rdata
);
  logic [W-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (a_we) mem[a_addr] <= a_wdata;
    a_rdata <= mem[a_addr];
  end

  always_ff @(posedge clk) b_rdata <= mem[b_addr];
endmodule
