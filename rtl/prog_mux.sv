// prog_mux: programmable multiplexer of one RFSM level.
//
// A RAM with 2**R words, addressed by the current (dummy) state ds, holds for
// each state the index of the RFSM input that state tests. A gen_mux then
// picks that input out of x and drives it on m_out. Reloading the RAM changes
// which condition each state branches on.
//
// Interface: wem/ar/di write the index RAM (synchronous, rising edge; ar's
// low R bits address it, di's low clog2(L) bits are stored). ds and x in,
// m_out out are combinational.
//
// The structure (RAM plus multiplexer M, read by the dummy state) and the
// defaults L=8, R=3 follow the reference design.
module prog_mux #(
  parameter int unsigned L = 8,
  parameter int unsigned R = 3,
  parameter int unsigned S = (L > 1) ? $clog2(L) : 1
) (
  input  logic         clk,
  input  logic         wem,  // write enable of the index RAM
  input  logic [S-1:0] di,   // input index to store
  input  logic [R-1:0] ar,   // write address (state)
  input  logic [R-1:0] ds,   // current dummy state (read address)
  input  logic [L-1:0] x,    // RFSM inputs
  output logic         m_out // selected input
);

  logic [S-1:0] sel;

  rfsm_ram #(.N(S), .DEEP(2 ** R), .R(R)) u_sel_ram (
    .clk (clk),
    .we  (wem),
    .di  (di),
    .addr(ds),
    .ar  (ar),
    .dout(sel)
  );

  gen_mux #(.L(L), .S(S)) u_mux (
    .sel(sel),
    .x  (x),
    .y  (m_out)
  );

endmodule
