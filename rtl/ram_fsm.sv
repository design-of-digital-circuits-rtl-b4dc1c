// ram_fsm: cascaded RAM-based reprogrammable finite state machine (RFSM).
//
// The machine is a Moore FSM whose whole behaviour lives in RAM:
//   * an R-bit state register (cleared to state 0 by rst);
//   * G levels in a cascade. Level 1 receives the current state; each level
//     tests one input chosen by its multiplexer RAM and maps
//     {dummy state, tested bit} to a new dummy state through its level RAM.
//     The dummy state leaving level G is the next state. Intermediate dummy
//     states need not be real states: they carry "which branch so far";
//   * an output RAM, 2**R words of N bits, addressed by the current state,
//     giving y.
// Reloading the RAMs implements any FSM with at most 2**R states, L inputs
// and N outputs in which every transition is decided by at most G input tests.
// A transition takes one clock cycle.
//
// Interface:
//   we_a[g-1]  write enable of the level RAM of level g (address ar, R+1 bits)
//   wem_a[g-1] write enable of the mux RAM of level g (address ar[R-1:0])
//   weo        write enable of the output RAM (address ar[R-1:0])
//   di         write data; level RAMs store di[R-1:0], mux RAMs the low
//              clog2(L) bits, the output RAM all N bits
//   x          inputs; y outputs of the current state; state the current state
// All writes and the state update happen at the rising clock edge; y follows
// the state register combinationally.
//
// Following the reference design: the parameter names and defaults
// (L=8, R=3, N=4, G=2), the port list, the cascade of levels and the output
// RAM read through the state. This design's choices: level 1 is the level
// nearest the register (it sees the current state), rst is an asynchronous
// clear, and the extra state output exists for observation.
module ram_fsm #(
  parameter int unsigned L = 8,
  parameter int unsigned R = 3,
  parameter int unsigned N = 4,
  parameter int unsigned G = 2
) (
  input  logic         clk,
  input  logic         rst,
  input  logic [G-1:0] we_a,
  input  logic [G-1:0] wem_a,
  input  logic         weo,
  input  logic [N-1:0] di,
  input  logic [R:0]   ar,
  input  logic [L-1:0] x,
  output logic [N-1:0] y,
  output logic [R-1:0] state
);

  localparam int unsigned S  = (L > 1) ? $clog2(L) : 1;
  localparam int unsigned DW = (R > S) ? R : S;

  // The data bus must be wide enough for a state and for an input index.
  if (N < DW) begin : g_bad_width
    $error("ram_fsm: N must be at least R and clog2(L)");
  end

  logic [R-1:0] dummy_state [G+1];
  logic [R-1:0] next_state;

  rfsm_state_reg #(.R(R)) u_state_reg (
    .clk(clk),
    .rst(rst),
    .d  (next_state),
    .q  (state)
  );

  assign dummy_state[0] = state;

  for (genvar g = 0; g < G; g++) begin : g_level
    rfsm_level #(.L(L), .R(R), .S(S), .DW(DW)) u_level (
      .clk(clk),
      .we (we_a[g]),
      .wem(wem_a[g]),
      .di (di[DW-1:0]),
      .ar (ar),
      .x  (x),
      .ds (dummy_state[g]),
      .t  (dummy_state[g+1])
    );
  end

  assign next_state = dummy_state[G];

  rfsm_ram #(.N(N), .DEEP(2 ** R), .R(R)) u_output_ram (
    .clk (clk),
    .we  (weo),
    .di  (di),
    .addr(state),
    .ar  (ar[R-1:0]),
    .dout(y)
  );

endmodule
