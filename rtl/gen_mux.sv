// gen_mux: the plain multiplexer inside a programmable multiplexer.
//
// Selects one of the L input bits x[L-1:0] by the index sel and drives it on
// y. An index at or above L gives 0. Purely combinational.
//
// The block and its parameter L follow the reference design (Gen_Mux, with a
// select width S); the out-of-range behaviour is this design's choice.
module gen_mux #(
  parameter int unsigned L = 8,
  parameter int unsigned S = (L > 1) ? $clog2(L) : 1
) (
  input  logic [S-1:0] sel,
  input  logic [L-1:0] x,
  output logic         y
);

  assign y = (32'(sel) < L) ? x[sel] : 1'b0;

endmodule
