`timescale 1ps/1ps
// BEHAVIOURAL MODEL (not synthesizable) of the TDC delay line: 32 four-bit
// FPGA carry elements chained into TAPS = 128 buffers. The edge of the
// selected path enters at din and reaches tap i after (i+1)*TAP_PS; the
// description gives the resolution as about 18 ps per tap. taps[i] feeds
// thermometer flip-flop i of the TDC. Transport delay per buffer.
module carry_chain #(
  parameter int unsigned TAPS   = 128,
  parameter int unsigned TAP_PS = 18
) (
  input  logic            din,
  output logic [TAPS-1:0] taps
);
  assign #(TAP_PS) taps[0] = din;
  for (genvar i = 1; i < TAPS; i++) begin : g_buf
    assign #(TAP_PS) taps[i] = taps[i-1];
  end
endmodule
