`timescale 1ps/1ps
// Path MUX: selects which network output is timed and forwards it to the
// TDC carry chain. Purely combinational; the number of inputs is a choice.
module path_mux #(
  parameter int unsigned N = 32
) (
  input  logic [N-1:0]         path_out,
  input  logic [$clog2(N)-1:0] sel,
  output logic                 y
);
  always_comb y = path_out[sel];
endmodule
