`timescale 1ps/1ps
// DVD module: forms delay-value differences from pairs of stored DVs.
// Two 11-bit LFSRs (x^11+x^9+1, seeded from the nonce chunk, a zero seed
// becomes 1) choose the pairs: pair k subtracts DV[2048 + b_k] from DV[a_k],
// where a_k and b_k are the LFSR states; the last pair (k = 2047) uses
// index 0, so each of the 4096 DVs is used exactly once per pass.
// start begins a pass of N_PAIRS = 2048 differences. Each DVD is offered
// with dvd_valid until dvd_ready (3 clks minimum per pair); done pulses
// with the last handshake. The two LFSRs are from the description; the
// half-split and the index-0 rule are this design's choices.
module dvd_module
  import sirf_pkg::*;
#(
  parameter int unsigned LW = PAIR_LW
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              start,
  input  logic [LW-1:0]     seed_a,
  input  logic [LW-1:0]     seed_b,
  output logic [LW:0]       a_addr,
  output logic [LW:0]       b_addr,
  input  logic [DV_W-1:0]   a_rdata,
  input  logic [DV_W-1:0]   b_rdata,
  output dvd_t              dvd,
  output logic              dvd_valid,
  input  logic              dvd_ready,
  output logic              busy,
  output logic              done
);
  typedef enum logic [1:0] {S_IDLE, S_RD, S_DATA, S_OUT} state_t;
  state_t        st;
  logic [LW-1:0] la, lb;
  logic [LW-1:0] k;
  logic          last;

  function automatic logic [LW-1:0] lfsr_next(input logic [LW-1:0] s);
    return {s[LW-2:0], s[LW-1] ^ s[LW-3]};
  endfunction

  assign last   = (k == '1);
  assign a_addr = {1'b0, last ? '0 : la};
  assign b_addr = {1'b1, last ? '0 : lb};
  assign busy   = (st != S_IDLE);
  assign dvd_valid = (st == S_OUT);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st <= S_IDLE; la <= 1; lb <= 1; k <= '0; dvd <= '0; done <= 1'b0;
    end else begin
      done <= 1'b0;
      unique case (st)
        S_IDLE: if (start) begin
          la <= (seed_a == '0) ? LW'(1) : seed_a;
          lb <= (seed_b == '0) ? LW'(1) : seed_b;
          k  <= '0;
          st <= S_RD;
        end
        S_RD:   st <= S_DATA;          // block RAM latches the addresses
        S_DATA: begin
          dvd <= dvd_t'({1'b0, a_rdata}) - dvd_t'({1'b0, b_rdata});
          st  <= S_OUT;
        end
        S_OUT: if (dvd_ready) begin
          la <= lfsr_next(la);
          lb <= lfsr_next(lb);
          k  <= k + 1'b1;
          if (last) begin
            done <= 1'b1;
            st   <= S_IDLE;
          end else st <= S_RD;
        end
        default: st <= S_IDLE;
      endcase
    end
  end
endmodule
