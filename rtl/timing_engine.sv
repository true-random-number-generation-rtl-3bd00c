`timescale 1ps/1ps
// Timing Engine: measures the delay of n_paths network paths, one at a time,
// and emits each as a delay value (DV).
// Per path it requests a 2-vector pair from the vector generator, loads V1
// into the launch flip-flops, waits SETTLE_CYC cycles and records the level
// of the selected path (old_level). It then launches V2 and arms the TDC
// flip-flops (cap_en) for that one cycle; the capture clock is the launch
// clock delayed by phase steps. CAPT_CYC cycles later it reads the TDC count:
//  * the path level did not change: this vector pair does not excite the
//    path; the pair is skipped and a new one requested;
//  * count = 0: the edge had not reached the chain at capture time; the
//    phase is advanced one step and the same launch-capture test repeated
//    (up to MAX_PHASE, after which the pair is skipped);
//  * 0 < count < TAPS: valid; DV = phase*STEP_TAPS + (TAPS - count), i.e.
//    the arrival time in tap units plus a constant;
//  * count = TAPS: the edge ran past the chain; the pair is skipped.
// dv_valid pulses for one clk with dv, dv_index (0,1,2,...) and rise (1 for
// a rising edge). done pulses one clk after the last DV.
// The repeat-until-valid behaviour follows the description; the phase-step
// search, the skip rules and all cycle counts are this design's choices.
module timing_engine
  import sirf_pkg::*;
#(
  parameter int unsigned TAPS       = TDC_TAPS,
  parameter int unsigned STEP_TAPS  = 56,
  parameter int unsigned MAX_PHASE  = 19,
  parameter int unsigned SETTLE_CYC = 2,
  parameter int unsigned CAPT_CYC   = 2
) (
  input  logic                      clk,
  input  logic                      rst_n,
  input  logic                      start,
  input  logic [NP_W-1:0]           n_paths,
  // vector generator
  output logic                      vg_req,
  input  logic                      vg_vld,
  // launch flip-flops and TDC
  output logic                      load_v1,
  output logic                      launch,
  output logic                      cap_en,
  input  logic                      path_level,
  output logic                      old_level,
  input  logic [$clog2(TAPS+1)-1:0] tdc_count,
  output logic [PHASE_W-1:0]        phase,
  // results
  output logic [DV_W-1:0]           dv,
  output logic [NP_W-1:0]           dv_index,
  output logic                      dv_valid,
  output logic                      rise,
  output logic                      busy,
  output logic                      done
);
  typedef enum logic [2:0] {S_IDLE, S_REQ, S_WAITV, S_LOAD, S_SETTLE, S_LAUNCH, S_CAPT, S_EVAL} state_t;
  state_t           st;
  logic [3:0]       wcnt;
  logic [NP_W-1:0]  n_target, n_done;

  assign busy = (st != S_IDLE);

  always_comb begin
    vg_req  = (st == S_REQ);
    load_v1 = (st == S_LOAD);
    launch  = (st == S_LAUNCH);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st <= S_IDLE; wcnt <= '0; n_target <= '0; n_done <= '0;
      phase <= '0; old_level <= 1'b0; cap_en <= 1'b0;
      dv <= '0; dv_index <= '0; dv_valid <= 1'b0; rise <= 1'b0; done <= 1'b0;
    end else begin
      dv_valid <= 1'b0;
      done     <= 1'b0;
      cap_en   <= 1'b0;
      unique case (st)
        S_IDLE: if (start) begin
          n_target <= n_paths;
          n_done   <= '0;
          st       <= (n_paths == '0) ? S_IDLE : S_REQ;
        end
        S_REQ: st <= S_WAITV;
        S_WAITV: if (vg_vld) begin
          phase <= '0;
          st    <= S_LOAD;
        end
        S_LOAD: begin
          wcnt <= 4'(SETTLE_CYC);
          st   <= S_SETTLE;
        end
        S_SETTLE: if (wcnt == '0) begin
          old_level <= path_level;
          st        <= S_LAUNCH;
        end else wcnt <= wcnt - 1'b1;
        S_LAUNCH: begin
          cap_en <= 1'b1;                // armed for exactly the launch cycle
          wcnt   <= 4'(CAPT_CYC);
          st     <= S_CAPT;
        end
        S_CAPT: if (wcnt == '0) st <= S_EVAL;
                else wcnt <= wcnt - 1'b1;
        S_EVAL: begin
          if (path_level == old_level) begin
            st <= S_REQ;                                  // path not excited
          end else if (tdc_count == '0) begin
            if (phase == PHASE_W'(MAX_PHASE)) st <= S_REQ; // never reached
            else begin
              phase <= phase + 1'b1;                      // capture later
              st    <= S_LOAD;
            end
          end else if (tdc_count >= ($clog2(TAPS+1))'(TAPS)) begin
            st <= S_REQ;                                  // edge overran chain
          end else begin
            dv       <= DV_W'(phase * STEP_TAPS) + DV_W'(TAPS) - DV_W'(tdc_count);
            dv_index <= n_done;
            dv_valid <= 1'b1;
            rise     <= ~old_level;
            n_done   <= n_done + 1'b1;
            if (n_done + 1'b1 == n_target) begin
              done <= 1'b1;
              st   <= S_IDLE;
            end else st <= S_REQ;
          end
        end
        default: st <= S_IDLE;
      endcase
    end
  end

  // a DV is only produced from a code strictly inside the chain
  a_dv_range: assert property (@(posedge clk) disable iff (!rst_n)
      (st == S_EVAL && path_level != old_level && tdc_count != '0 &&
       tdc_count < ($clog2(TAPS+1))'(TAPS)) |=> dv_valid);
endmodule
