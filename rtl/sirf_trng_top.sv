`timescale 1ps/1ps
// SiRF PUF-TRNG, programmable-logic side.
// Random bits are distilled from the measured propagation delays of paths
// through an engineered logic network. Each delay combines a fixed,
// device-specific part (process variation) and measurement noise; delays
// are digitised by a carry-chain TDC, paired into differences (DVD),
// calibrated against global shifts such as temperature and voltage (GPEV)
// and the lowest bit of each calibrated difference is emitted.
// Data path: LFSR -> vector generator -> launch flip-flops -> logic network
// -> path MUX -> carry chain -> TDC -> Timing Engine -> XOR distillers and
// block RAM -> DVD -> GPEV -> BitGen -> GPIO Out; Master Control sequences
// the steps (see master_control.sv).
// Host side: word writes into GPIO In (ps_wr/ps_addr/ps_wdata), byte reads
// from GPIO Out (ps_out_data/ps_out_valid, ps_out_ack). Clocks: clk is the
// system and launch clock; capture_clk must be clk delayed by the step
// number output on phase (an external phase shifter, a clock-management
// block of the FPGA). chlng configures the logic network (held constant in
// TRNG mode). The network and the carry chain are behavioural models.
module sirf_trng_top
  import sirf_pkg::*;
#(
  parameter int unsigned CHIP_ID   = 1,
  parameter int unsigned NOISE_PS  = 12,
  parameter int unsigned STEP_TAPS = 56
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               capture_clk,
  output logic [PHASE_W-1:0] phase,
  input  logic [CHLNG_W-1:0] chlng,
  input  logic               ps_wr,
  input  logic [1:0]         ps_addr,
  input  logic [31:0]        ps_wdata,
  output logic [7:0]         ps_out_data,
  output logic               ps_out_valid,
  input  logic               ps_out_ack,
  output logic               busy,
  output logic               done
);
  // host interface
  logic [63:0] gpio_seed;
  logic        start;
  // challenge generation
  logic [63:0] lfsr_state;
  logic        lfsr_step, lfsr_load_te;
  logic [N_LAUNCH-1:0] v1, v2, launch_q;
  logic [SEL_W-1:0]    sel;
  logic                vg_req, vg_vld;
  // measurement
  logic [N_OUT-1:0]    path_out;
  logic                path_y;
  logic [TDC_TAPS-1:0] taps;
  logic [CNT_W-1:0]    tdc_count;
  logic                load_v1, launch, cap_en, old_level, rise;
  logic [DV_W-1:0]     dv;
  logic [NP_W-1:0]     dv_index, te_n_paths;
  logic                dv_valid, te_start, te_done, te_busy;
  // distillation and storage
  logic [SEED_BITS-1:0]  seed_bits;
  logic [NONCE_BITS-1:0] nonce_bits;
  logic                  seed_full, nonce_full, seed_en, nonce_en, distill_clear, store_en;
  logic [DV_W-1:0]       a_rdata, b_rdata;
  logic [ADDR_W-1:0]     a_addr, dvd_a_addr, dvd_b_addr;
  // post-processing
  logic                   dvd_start, dvd_done, dvd_busy, dvd_valid, dvd_ready;
  dvd_t                   dvd;
  logic [PAIR_LW-1:0]     seed_a, seed_b;
  logic                   gpev_clear, gpev_mode_cal;
  logic [GPEV_CTRL_W-1:0] gpev_ctrl;
  dvdc_t                  dvdc;
  logic                   dvdc_valid, dvdc_ready;
  logic                   bitgen_start, bitgen_done;
  logic [7:0]             bg_byte;
  logic                   bg_valid, bg_ready;
  logic [4:0]             iter;

  gpio_in u_gpio_in (
    .clk, .rst_n, .ps_wr, .ps_addr, .ps_wdata, .seed(gpio_seed), .start);

  lfsr64 u_lfsr (
    .clk, .rst_n, .load_gpio(start), .load_te(lfsr_load_te),
    .gpio_seed, .te_seed(seed_bits), .step(lfsr_step), .state(lfsr_state));

  vector_gen #(.N(N_LAUNCH), .NO(N_OUT)) u_vgen (
    .clk, .rst_n, .req(vg_req), .lfsr_state, .lfsr_step, .v1, .v2, .sel, .vld(vg_vld));

  launch_ffs #(.N(N_LAUNCH)) u_launch (
    .clk, .rst_n, .load_v1, .launch, .v1, .v2, .q(launch_q));

  sirf_network #(.N_IN(N_LAUNCH), .N_OUT(N_OUT), .CHLNG_W(CHLNG_W),
                 .CHIP_ID(CHIP_ID), .NOISE_PS(NOISE_PS)) u_net (
    .chlng, .launch_vec(launch_q), .path_out);

  path_mux #(.N(N_OUT)) u_mux (.path_out, .sel, .y(path_y));

  carry_chain #(.TAPS(TDC_TAPS)) u_chain (.din(path_y), .taps);

  tdc #(.TAPS(TDC_TAPS)) u_tdc (
    .capture_clk, .rst_n, .cap_en, .taps, .old_level, .count(tdc_count));

  timing_engine #(.TAPS(TDC_TAPS), .STEP_TAPS(STEP_TAPS)) u_te (
    .clk, .rst_n, .start(te_start), .n_paths(te_n_paths),
    .vg_req, .vg_vld, .load_v1, .launch, .cap_en, .path_level(path_y),
    .old_level, .tdc_count, .phase, .dv, .dv_index, .dv_valid, .rise,
    .busy(te_busy), .done(te_done));

  xor_distiller #(.OUT_BITS(SEED_BITS), .DISTILL(DISTILL)) u_seed_dist (
    .clk, .rst_n, .clear(distill_clear), .en(seed_en), .dv_valid, .dv_lsb(dv[0]),
    .bits(seed_bits), .full(seed_full));

  xor_distiller #(.OUT_BITS(NONCE_BITS), .DISTILL(DISTILL)) u_nonce_dist (
    .clk, .rst_n, .clear(distill_clear), .en(nonce_en), .dv_valid, .dv_lsb(dv[0]),
    .bits(nonce_bits), .full(nonce_full));

  assign a_addr = store_en ? dv_index[ADDR_W-1:0] : dvd_a_addr;

  dv_bram #(.DEPTH(NONCE_PATHS), .W(DV_W)) u_bram (
    .clk, .a_we(dv_valid && store_en), .a_addr, .a_wdata(dv), .a_rdata,
    .b_addr(dvd_b_addr), .b_rdata);

  master_control #(.ITER(ITERATIONS)) u_mc (
    .clk, .rst_n, .start, .te_start, .te_n_paths, .te_done, .seed_en, .nonce_en,
    .distill_clear, .lfsr_load_te, .store_en, .nonce(nonce_bits),
    .dvd_start, .dvd_done, .seed_a, .seed_b, .gpev_clear, .gpev_mode_cal, .gpev_ctrl,
    .bitgen_start, .bitgen_done, .iter, .busy, .done);

  dvd_module #(.LW(PAIR_LW)) u_dvd (
    .clk, .rst_n, .start(dvd_start), .seed_a, .seed_b,
    .a_addr(dvd_a_addr), .b_addr(dvd_b_addr), .a_rdata, .b_rdata,
    .dvd, .dvd_valid, .dvd_ready, .busy(dvd_busy), .done(dvd_done));

  gpev_cal #(.N_LOG2($clog2(N_PAIRS))) u_gpev (
    .clk, .rst_n, .clear(gpev_clear), .mode_cal(gpev_mode_cal), .ctrl(gpev_ctrl),
    .dvd, .dvd_valid, .dvd_ready, .dvdc, .dvdc_valid, .dvdc_ready);

  bitgen #(.OUT_BYTES(OUT_BYTES)) u_bitgen (
    .clk, .rst_n, .start(bitgen_start), .dvdc_lsb(dvdc[0]), .in_valid(dvdc_valid),
    .in_ready(dvdc_ready), .byte_out(bg_byte), .byte_valid(bg_valid),
    .byte_ready(bg_ready), .done(bitgen_done));

  gpio_out u_gpio_out (
    .clk, .rst_n, .in_data(bg_byte), .in_valid(bg_valid), .in_ready(bg_ready),
    .ps_data(ps_out_data), .ps_valid(ps_out_valid), .ps_ack(ps_out_ack));
endmodule
