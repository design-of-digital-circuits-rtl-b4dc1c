// rfsm_level: one reprogrammable level of the cascaded RFSM.
//
// Given the dummy state ds coming from the level below (or the state
// register), the programmable multiplexer tests one RFSM input, and the level
// RAM, addressed by {ds, tested bit}, yields the dummy state T passed to the
// next level. Each level thus performs one binary branch of the state
// transition; G levels in a row allow a state to branch on up to G inputs in
// one cycle. A state that does not branch at a level simply maps to itself.
//
// Interface: we writes the level RAM (address ar, R+1 bits; data di[R-1:0]),
// wem writes the multiplexer's index RAM (address ar[R-1:0]; data
// di[S-1:0]). Writes are synchronous; ds -> T is combinational.
//
// The composition ({ds, m_out} as level RAM address, 2**(R+1) words of R
// bits) and the defaults L=8, R=3 follow the reference design.
module rfsm_level #(
  parameter int unsigned L  = 8,
  parameter int unsigned R  = 3,
  parameter int unsigned S  = (L > 1) ? $clog2(L) : 1,
  parameter int unsigned DW = (R > S) ? R : S
) (
  input  logic          clk,
  input  logic          we,   // write enable of the level RAM
  input  logic          wem,  // write enable of the multiplexer RAM
  input  logic [DW-1:0] di,   // write data
  input  logic [R:0]    ar,   // write address
  input  logic [L-1:0]  x,    // RFSM inputs
  input  logic [R-1:0]  ds,   // dummy state from the previous level
  output logic [R-1:0]  t     // dummy state to the next level
);

  logic         m_out;
  logic [R:0]   composed;

  prog_mux #(.L(L), .R(R), .S(S)) u_level_cc (
    .clk  (clk),
    .wem  (wem),
    .di   (di[S-1:0]),
    .ar   (ar[R-1:0]),
    .ds   (ds),
    .x    (x),
    .m_out(m_out)
  );

  assign composed = {ds, m_out};

  rfsm_ram #(.N(R), .DEEP(2 ** (R + 1)), .R(R + 1)) u_level_ram (
    .clk (clk),
    .we  (we),
    .di  (di[R-1:0]),
    .addr(composed),
    .ar  (ar),
    .dout(t)
  );

endmodule
