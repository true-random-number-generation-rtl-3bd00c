`timescale 1ps/1ps
// Master Control: sequences one TRNG request (5120 bytes).
//  1. The host raises start (the LFSR then loads the host seed) and drops
//     it; the falling edge begins the flow.
//  2. Seed run: the Timing Engine measures 64*12 paths; the seed distiller
//     turns them into a new 64-bit LFSR seed, which is then loaded.
//  3. Nonce run: 4096 paths; every DV is written to the block RAM and the
//     first 336*12 also feed the 42-byte nonce distiller.
//  4. ITERATIONS = 20 iterations; iteration i takes the 32-bit chunk
//     nonce[16*i +: 32] (chunks overlap by 16 bits and exactly cover the
//     336 nonce bits): bits [10:0] and [21:11] seed the two pairing LFSRs,
//     bits [31:22] control the GPEV mapping. Each iteration runs the DVD
//     module twice: a statistics pass, then a calibration pass whose 2048
//     bits BitGen packs into 256 bytes for GPIO Out.
//  done pulses after the last byte of the last iteration left BitGen.
// The order of the steps follows the description; the chunk layout and the
// two-pass organisation are this design's choices.
module master_control
  import sirf_pkg::*;
#(
  parameter int unsigned ITER = ITERATIONS
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic                   start,
  // Timing Engine and distillers
  output logic                   te_start,
  output logic [NP_W-1:0]        te_n_paths,
  input  logic                   te_done,
  output logic                   seed_en,
  output logic                   nonce_en,
  output logic                   distill_clear,
  output logic                   lfsr_load_te,
  output logic                   store_en,
  input  logic [NONCE_BITS-1:0]  nonce,
  // post-processing
  output logic                   dvd_start,
  input  logic                   dvd_done,
  output logic [PAIR_LW-1:0]     seed_a,
  output logic [PAIR_LW-1:0]     seed_b,
  output logic                   gpev_clear,
  output logic                   gpev_mode_cal,
  output logic [GPEV_CTRL_W-1:0] gpev_ctrl,
  output logic                   bitgen_start,
  input  logic                   bitgen_done,
  output logic [4:0]             iter,
  output logic                   busy,
  output logic                   done
);
  typedef enum logic [3:0] {
    S_IDLE, S_CLR, S_SEED, S_SEED_W, S_RESEED, S_NONCE, S_NONCE_W,
    S_STATS, S_STATS_W, S_CAL, S_CAL_W, S_DONE
  } state_t;
  state_t      st;
  logic        start_q;
  logic [31:0] chunk;

  assign chunk     = nonce[16*iter +: 32];
  assign seed_a    = chunk[10:0];
  assign seed_b    = chunk[21:11];
  assign gpev_ctrl = chunk[31:22];
  assign busy      = (st != S_IDLE);

  always_comb begin
    te_start      = (st == S_SEED) || (st == S_NONCE);
    te_n_paths    = (st == S_SEED) ? NP_W'(SEED_BITS * DISTILL) : NP_W'(NONCE_PATHS);
    distill_clear = (st == S_CLR);
    lfsr_load_te  = (st == S_RESEED);
    seed_en       = (st == S_SEED) || (st == S_SEED_W);
    nonce_en      = (st == S_NONCE) || (st == S_NONCE_W);
    store_en      = nonce_en;
    gpev_clear    = (st == S_STATS);
    dvd_start     = (st == S_STATS) || (st == S_CAL);
    bitgen_start  = (st == S_CAL);
    gpev_mode_cal = (st == S_CAL) || (st == S_CAL_W);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st <= S_IDLE; start_q <= 1'b0; iter <= '0; done <= 1'b0;
    end else begin
      start_q <= start;
      done    <= 1'b0;
      unique case (st)
        S_IDLE:    if (start_q && !start) st <= S_CLR;
        S_CLR:     st <= S_SEED;
        S_SEED:    st <= S_SEED_W;
        S_SEED_W:  if (te_done) st <= S_RESEED;
        S_RESEED:  st <= S_NONCE;
        S_NONCE:   st <= S_NONCE_W;
        S_NONCE_W: if (te_done) begin
          iter <= '0;
          st   <= S_STATS;
        end
        S_STATS:   st <= S_STATS_W;
        S_STATS_W: if (dvd_done) st <= S_CAL;
        S_CAL:     st <= S_CAL_W;
        S_CAL_W:   if (bitgen_done) begin
          if (iter == 5'(ITER - 1)) st <= S_DONE;
          else begin
            iter <= iter + 1'b1;
            st   <= S_STATS;
          end
        end
        S_DONE: begin
          done <= 1'b1;
          st   <= S_IDLE;
        end
        default: st <= S_IDLE;
      endcase
    end
  end
endmodule
