`timescale 1ps/1ps
// GPIO Out: the register from which the host reads the random bytes. It
// holds one byte with a valid flag; the host acknowledges a read with
// ps_ack (one clk), which frees the register for the next byte from BitGen.
// While the host has not read, in_ready is low and BitGen stalls.
// The description names the register; the handshake is this design's.
module gpio_out (
  input  logic       clk,
  input  logic       rst_n,
  input  logic [7:0] in_data,
  input  logic       in_valid,
  output logic       in_ready,
  output logic [7:0] ps_data,
  output logic       ps_valid,
  input  logic       ps_ack
);
  assign in_ready = !ps_valid;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ps_data  <= '0;
      ps_valid <= 1'b0;
    end else if (ps_valid) begin
      if (ps_ack) ps_valid <= 1'b0;
    end else if (in_valid) begin
      ps_data  <= in_data;
      ps_valid <= 1'b1;
    end
  end

  // the host acknowledges only a byte that is there
  a_ack_valid: assert property (@(posedge clk) disable iff (!rst_n) ps_ack |-> ps_valid);
endmodule
