`timescale 1ps/1ps
// GPIO In: memory-mapped register through which the host processor hands the
// programmable logic its 64-bit LFSR seed and the start signal.
// Word 0 holds seed[31:0], word 1 seed[63:32], word 2 bit 0 is start. A write
// (ps_wr high for one clk) updates one word. The register map is this
// design's choice; the description only says the seed and start travel
// through a memory-mapped GPIO register. Outputs change the clk after a write.
module gpio_in (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        ps_wr,
  input  logic [1:0]  ps_addr,
  input  logic [31:0] ps_wdata,
  output logic [63:0] seed,
  output logic        start
);
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      seed  <= '0;
      start <= 1'b0;
    end else if (ps_wr) begin
      unique case (ps_addr)
        2'd0: seed[31:0]  <= ps_wdata;
        2'd1: seed[63:32] <= ps_wdata;
        2'd2: start       <= ps_wdata[0];
        default: ;
      endcase
    end
  end
endmodule
