`timescale 1ps/1ps
// XOR distiller: compresses delay values into random bits. Each output bit is
// the XOR of the least significant bits of DISTILL = 12 consecutive DVs, as
// the flow prescribes for both the 64-bit LFSR seed and the 42-byte nonce.
// Bits enter at the top of a right-shifting register, so after OUT_BITS bits
// the first one sits in bits[0]. Once full, further DVs are ignored (the
// nonce run measures 4096 paths but only 336*12 = 4032 feed the nonce).
// clear empties it. One DV per clk at most, when dv_valid and en are high.
module xor_distiller #(
  parameter int unsigned OUT_BITS = 64,
  parameter int unsigned DISTILL  = 12
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                clear,
  input  logic                en,
  input  logic                dv_valid,
  input  logic                dv_lsb,
  output logic [OUT_BITS-1:0] bits,
  output logic                full
);
  logic                           acc;
  logic [$clog2(DISTILL)-1:0]     k;
  logic [$clog2(OUT_BITS+1)-1:0]  n;

  assign full = (n == ($clog2(OUT_BITS+1))'(OUT_BITS));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      acc <= 1'b0; k <= '0; n <= '0; bits <= '0;
    end else if (clear) begin
      acc <= 1'b0; k <= '0; n <= '0; bits <= '0;
    end else if (en && dv_valid && !full) begin
      if (k == ($clog2(DISTILL))'(DISTILL-1)) begin
        bits <= {acc ^ dv_lsb, bits[OUT_BITS-1:1]};
        n    <= n + 1'b1;
        acc  <= 1'b0;
        k    <= '0;
      end else begin
        acc <= acc ^ dv_lsb;
        k   <= k + 1'b1;
      end
    end
  end
endmodule
