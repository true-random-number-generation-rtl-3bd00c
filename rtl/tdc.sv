`timescale 1ps/1ps
// TDC capture and decoder. The thermometer flip-flops sample the 128 carry
// chain taps on the rising edge of the phase-shifted capture clock when
// cap_en is high (cap_en comes from the launch clock domain and is held for
// the whole launch cycle). The decoder counts the taps whose captured level
// differs from the level the path had before the launch (old_level): that is
// how many 18 ps buffers the edge travelled before capture, for rising and
// falling edges alike. count is valid from the capture edge on and is read
// by the Timing Engine a clk cycle later; 0 means the edge had not arrived,
// TAPS that it left the chain. The ones-count decoder is this design's
// choice; the description names only "ThermFFs" and "Decoder".
module tdc #(
  parameter int unsigned TAPS = 128
) (
  input  logic                      capture_clk,
  input  logic                      rst_n,
  input  logic                      cap_en,
  input  logic [TAPS-1:0]           taps,
  input  logic                      old_level,
  output logic [$clog2(TAPS+1)-1:0] count
);
  logic [TAPS-1:0] therm;

  always_ff @(posedge capture_clk or negedge rst_n) begin
    if (!rst_n)      therm <= '0;
    else if (cap_en) therm <= taps;
  end

  always_comb begin
    count = '0;
    for (int i = 0; i < TAPS; i++)
      count += $clog2(TAPS+1)'(therm[i] ^ old_level);
  end
endmodule
