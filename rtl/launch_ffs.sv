`timescale 1ps/1ps
// Launch flip-flops: the n = 32 registers at the inputs of the logic network.
// A test first loads V1 (load_v1) and lets the network settle, then on the
// launch edge (launch) switches to V2, so each input whose bit differs sends
// a rising or falling transition into the network. Both strobes act on the
// rising clk edge (the launch clock is the system clock here).
module launch_ffs #(
  parameter int unsigned N = 32
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         load_v1,
  input  logic         launch,
  input  logic [N-1:0] v1,
  input  logic [N-1:0] v2,
  output logic [N-1:0] q
);
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)       q <= '0;
    else if (launch)  q <= v2;
    else if (load_v1) q <= v1;
  end
endmodule
