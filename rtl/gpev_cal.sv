`timescale 1ps/1ps
// GPEV calibration (global process / environmental variation): removes
// shifts and scaling that affect all delays of a device at once, e.g. from
// temperature and supply voltage, by normalising the distribution of the
// DVDs of one pass to a reference distribution.
// Statistics pass (mode_cal = 0, after clear): every DVD is accepted at once
// and its sum, minimum and maximum are accumulated over 2^N_LOG2 values.
// Calibration pass (mode_cal = 1): each DVD is mapped to
//   DVD_c = trunc((DVD - mean) * Rref * 2^FRAC / range) + Mref * 2^FRAC
// with mean = floor(sum / 2^N_LOG2), range = max - min (at least 1),
// Rref = 64 + 4*ctrl[4:0] and Mref = signed ctrl[9:5]. DVD_c carries FRAC
// fraction bits; its lowest bit is the TRNG bit. The division is a
// restoring divider, one quotient bit per clk (DIV_W + 2 clks per value);
// the result is offered with dvdc_valid until dvdc_ready.
// That GPEV normalises the distribution and takes 10 control bits is from
// the description; the mean/range statistics, the mapping of the control
// bits and the fixed-point format are this design's choices.
module gpev_cal
  import sirf_pkg::*;
#(
  parameter int unsigned N_LOG2 = 11,
  parameter int unsigned FRAC   = 4
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic                   clear,
  input  logic                   mode_cal,
  input  logic [GPEV_CTRL_W-1:0] ctrl,
  input  dvd_t                   dvd,
  input  logic                   dvd_valid,
  output logic                   dvd_ready,
  output dvdc_t                  dvdc,
  output logic                   dvdc_valid,
  input  logic                   dvdc_ready
);
  localparam int unsigned SUM_W = DVD_W + N_LOG2 + 1;
  localparam int unsigned DIV_W = 32;

  logic signed [SUM_W-1:0] sum;
  dvd_t                    dmin, dmax;
  logic signed [DVD_W:0]   mean, range_s;
  logic [DVD_W:0]          range_u;
  logic [7:0]              rref;
  logic signed [5:0]       mref;

  typedef enum logic [1:0] {S_IDLE, S_DIV, S_FIX, S_OUT} state_t;
  state_t                  st;
  logic [DIV_W-1:0]        num, quo, rem;
  logic                    neg;
  logic [5:0]              bitc;
  logic signed [DVD_W+1:0] cent;
  logic [DIV_W-1:0]        rem_sh, mag, scaled;

  always_comb begin
    mean    = (DVD_W+1)'(sum >>> N_LOG2);
    range_s = (DVD_W+1)'(dmax) - (DVD_W+1)'(dmin);
    range_u = (range_s <= 0) ? (DVD_W+1)'(1) : (DVD_W+1)'(range_s);
    rref    = 8'd64 + {1'b0, ctrl[4:0], 2'b00};
    mref    = 6'(signed'(ctrl[9:5]));
    cent    = (DVD_W+2)'(dvd) - (DVD_W+2)'(mean);
    rem_sh  = {rem[DIV_W-2:0], num[DIV_W-1]};
    mag     = (cent < 0) ? DIV_W'(-cent) : DIV_W'(cent);
    scaled  = (mag * DIV_W'(rref)) << FRAC;
  end

  assign dvd_ready  = !mode_cal || (st == S_IDLE);
  assign dvdc_valid = (st == S_OUT);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sum <= '0; dmin <= '0; dmax <= '0; st <= S_IDLE;
      num <= '0; quo <= '0; rem <= '0; neg <= 1'b0; bitc <= '0; dvdc <= '0;
    end else if (clear) begin
      sum  <= '0;
      dmin <= dvd_t'({1'b0, {(DVD_W-1){1'b1}}});
      dmax <= dvd_t'({1'b1, {(DVD_W-1){1'b0}}});
      st   <= S_IDLE;
    end else if (!mode_cal) begin
      if (dvd_valid) begin
        sum <= sum + SUM_W'(dvd);
        if (dvd < dmin) dmin <= dvd;
        if (dvd > dmax) dmax <= dvd;
      end
    end else begin
      unique case (st)
        S_IDLE: if (dvd_valid) begin
          // |cent| * rref * 2^FRAC fits DIV_W bits
          neg  <= cent < 0;
          num  <= scaled;
          rem  <= '0;
          quo  <= '0;
          bitc <= 6'(DIV_W);
          st   <= S_DIV;
        end
        S_DIV: begin
          num <= num << 1;
          if (rem_sh >= DIV_W'(range_u)) begin
            rem <= rem_sh - DIV_W'(range_u);
            quo <= {quo[DIV_W-2:0], 1'b1};
          end else begin
            rem <= rem_sh;
            quo <= {quo[DIV_W-2:0], 1'b0};
          end
          bitc <= bitc - 1'b1;
          if (bitc == 6'd1) st <= S_FIX;
        end
        S_FIX: begin
          dvdc <= (neg ? -dvdc_t'(quo) : dvdc_t'(quo)) + (dvdc_t'(mref) <<< FRAC);
          st   <= S_OUT;
        end
        S_OUT: if (dvdc_ready) st <= S_IDLE;
        default: st <= S_IDLE;
      endcase
    end
  end
endmodule
