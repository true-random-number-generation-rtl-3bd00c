`timescale 1ps/1ps
// BitGen: the TRNG bit of each calibrated difference is the lowest bit of
// DVD_c. Bits are packed into bytes, first bit in bit 0; after OUT_BYTES
// bytes (2048 bits, one per pairing) done pulses. start clears the byte
// counter for a new iteration. A full byte is held in byte_out with
// byte_valid until byte_ready; meanwhile in_ready is low.
module bitgen #(
  parameter int unsigned OUT_BYTES = 256
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       start,
  input  logic       dvdc_lsb,
  input  logic       in_valid,
  output logic       in_ready,
  output logic [7:0] byte_out,
  output logic       byte_valid,
  input  logic       byte_ready,
  output logic       done
);
  logic [2:0]                         nbit;
  logic [7:0]                         shreg;
  logic [$clog2(OUT_BYTES+1)-1:0]     nbyte;

  assign in_ready = !byte_valid;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      nbit <= '0; shreg <= '0; nbyte <= '0; byte_out <= '0; byte_valid <= 1'b0; done <= 1'b0;
    end else begin
      done <= 1'b0;
      if (start) begin
        nbit <= '0; nbyte <= '0; byte_valid <= 1'b0;
      end else begin
        if (byte_valid && byte_ready) begin
          byte_valid <= 1'b0;
          nbyte      <= nbyte + 1'b1;
          if (nbyte + 1'b1 == ($clog2(OUT_BYTES+1))'(OUT_BYTES)) done <= 1'b1;
        end
        if (in_valid && in_ready) begin
          shreg <= {dvdc_lsb, shreg[7:1]};
          nbit  <= nbit + 1'b1;
          if (nbit == 3'd7) begin
            byte_out   <= {dvdc_lsb, shreg[7:1]};
            byte_valid <= 1'b1;
          end
        end
      end
    end
  end
endmodule
