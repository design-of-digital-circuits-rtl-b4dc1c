// ht_count_ones: hardware template instance that counts ones in a vector.
//
// Three parts: a reconfiguration handler (RH), a cascaded reprogrammable FSM
// and a datapath. On reset the RH copies its program, 56 words from a file,
// into the RFSM's RAMs and then releases the RFSM. From then on the RFSM runs
// the counting algorithm: state a0 outputs the count (y1); a1 clears the
// counters (y2); a2 steps to the next bit (y3); a3 steps and counts a one
// (y3, y4). From a1, a2 and a3 the RFSM tests x1 (all bits done -> a0)
// and, if not done, x2 (bit value) in its second level, going to a3 on a one
// and a2 on a zero. The RFSM changes state on the rising clock edge, the
// datapath acts on the falling edge. A different program file (parameter
// INIT_FILE) turns the same circuit into another bit-vector operation.
//
// Timing with the default program: one vector takes 2 + VEC cycles; result
// is loaded on the falling edge within each a0 cycle (y[0] high) and holds
// the count of the vector seen during the previous a1..a3 cycles. The first
// a0 after reset outputs 0. in_vector must be stable from the a0 falling edge
// until the next one.
//
// Following the reference design: the three parts and their connection, the
// RFSM shape (8 inputs, 3 state bits, 4 outputs, 2 levels) and the program.
// This design's choices: flags x1/x2 enter the RFSM on inputs 1/2 (the
// program's mux RAMs select those inputs), the datapath is reset together
// with the RFSM, and y, state and ready are brought out for observation.
module ht_count_ones #(
  parameter int unsigned VEC       = 8,
  parameter int unsigned WORDS     = 56,
  parameter string       INIT_FILE = "rtl/rh_count_ones.hex"
) (
  input  logic                       clk,
  input  logic                       reset,
  input  logic [VEC-1:0]             in_vector,
  output logic [3:0]                 result,
  output logic [rfsm_pkg::RFSM_N-1:0] y,
  output logic [rfsm_pkg::RFSM_R-1:0] state,
  output logic                       ready
);

  import rfsm_pkg::*;

  localparam int unsigned L = RFSM_L;
  localparam int unsigned R = RFSM_R;
  localparam int unsigned N = RFSM_N;
  localparam int unsigned G = RFSM_G;

  logic [G-1:0] we_a, wem_a;
  logic         weo;
  logic [N-1:0] di;
  logic [R:0]   ar;
  logic         rfsm_rst;
  logic [L-1:0] x;
  logic         x1, x2;

  reconfig_handler #(
    .R(R), .N(N), .G(G), .WORDS(WORDS), .INIT_FILE(INIT_FILE)
  ) u_rh (
    .clk     (clk),
    .reset   (reset),
    .we_a    (we_a),
    .wem_a   (wem_a),
    .weo     (weo),
    .di      (di),
    .ar      (ar),
    .rfsm_rst(rfsm_rst),
    .ready   (ready)
  );

  always_comb begin
    x         = '0;
    x[X_DONE] = x1;
    x[X_BIT]  = x2;
  end

  ram_fsm #(.L(L), .R(R), .N(N), .G(G)) u_rfsm (
    .clk  (clk),
    .rst  (rfsm_rst),
    .we_a (we_a),
    .wem_a(wem_a),
    .weo  (weo),
    .di   (di),
    .ar   (ar),
    .x    (x),
    .y    (y),
    .state(state)
  );

  count_ones_datapath #(.VEC(VEC), .RES_W(4)) u_dp (
    .clk      (clk),
    .rst      (rfsm_rst),
    .y        (y),
    .in_vector(in_vector),
    .result   (result),
    .x1       (x1),
    .x2       (x2)
  );

endmodule
