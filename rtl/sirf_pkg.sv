`timescale 1ps/1ps
// Shared sizes of the SiRF PUF-TRNG (programmable-logic side).
// The numbers that come from the design description: 32 launch flip-flops,
// a 128-tap TDC (32 four-bit carry elements), 12 delay values XOR-distilled
// per seed/nonce bit, 4096 paths per nonce run, a 42-byte (336-bit) nonce,
// 11-bit pairing LFSRs, 10 calibration control bits, 256 output bytes per
// iteration and 20 iterations (5120 bytes per request).
// Widths of the delay value, the number of path outputs and the fixed-point
// precision of the calibration are choices of this implementation.
package sirf_pkg;
  localparam int unsigned N_LAUNCH    = 32;    // launch flip-flops
  localparam int unsigned N_OUT       = 32;    // path outputs into the MUX
  localparam int unsigned SEL_W       = $clog2(N_OUT);
  localparam int unsigned TDC_TAPS    = 128;   // carry-chain buffers
  localparam int unsigned CNT_W       = 8;     // TDC count 0..128
  localparam int unsigned DV_W        = 16;    // delay value width
  localparam int unsigned PHASE_W     = 5;     // capture phase steps
  localparam int unsigned DISTILL     = 12;    // DV LSBs XORed per bit
  localparam int unsigned SEED_BITS   = 64;
  localparam int unsigned NONCE_BITS  = 336;   // 42 bytes
  localparam int unsigned NONCE_PATHS = 4096;
  localparam int unsigned ADDR_W      = 12;
  localparam int unsigned PAIR_LW     = 11;    // pairing LFSR width
  localparam int unsigned N_PAIRS     = 2048;
  localparam int unsigned GPEV_CTRL_W = 10;
  localparam int unsigned DVD_W       = DV_W + 1;
  localparam int unsigned DVDC_W      = 24;
  localparam int unsigned OUT_BYTES   = 256;
  localparam int unsigned ITERATIONS  = 20;
  localparam int unsigned CHLNG_W     = 64;    // shift-register LUT configuration
  localparam int unsigned NP_W        = 13;    // path-count width

  typedef logic [DV_W-1:0] dv_t;
  typedef logic signed [DVD_W-1:0] dvd_t;
  typedef logic signed [DVDC_W-1:0] dvdc_t;
endpackage
