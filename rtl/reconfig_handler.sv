// reconfig_handler: reconfiguration handler (RH) for a cascaded RFSM.
//
// Joins the memory block and its controller. The controller's address reads
// the memory block; each word read is split into
//   {weo, wem_a[G-1:0], we_a[G-1:0], di[N-1:0]}
// (level G's enables above level 1's), and the enables are passed to the
// RFSM only while the controller is loading. The RFSM write address ar is the
// low R+1 bits of the memory address, so a program lays out each RAM's
// contents at addresses that agree with the RAM's locations in those bits.
// When the copy is done, the RH resets the RFSM into working mode.
//
// Timing: see rh_controller; the RFSM is writable for WORDS cycles after
// reset, then held in reset for one cycle.
//
// The word layout and the address sharing follow the reference design's
// ones-counting program; gating the enables with `loading` is this design's
// choice.
module reconfig_handler #(
  parameter int unsigned R         = 3,
  parameter int unsigned N         = 4,
  parameter int unsigned G         = 2,
  parameter int unsigned WORDS     = 56,
  parameter string       INIT_FILE = "rtl/rh_count_ones.hex"
) (
  input  logic         clk,
  input  logic         reset,
  output logic [G-1:0] we_a,
  output logic [G-1:0] wem_a,
  output logic         weo,
  output logic [N-1:0] di,
  output logic [R:0]   ar,
  output logic         rfsm_rst,
  output logic         ready
);

  localparam int unsigned W  = rfsm_pkg::rh_word_width(G, N);
  localparam int unsigned AW0 = (WORDS > 1) ? $clog2(WORDS) : 1;
  // The address counter is at least as wide as the RFSM write address.
  localparam int unsigned AW = (AW0 > R + 1) ? AW0 : R + 1;

  logic [AW-1:0] addr;
  logic [W-1:0]  word;
  logic          loading;

  rh_controller #(.WORDS(WORDS), .AW(AW)) u_ctrl (
    .clk     (clk),
    .reset   (reset),
    .addr    (addr),
    .loading (loading),
    .rfsm_rst(rfsm_rst),
    .ready   (ready)
  );

  rh_memory #(.WORDS(WORDS), .W(W), .INIT_FILE(INIT_FILE), .AW(AW)) u_mem (
    .addr(addr),
    .data(word)
  );

  assign di    = word[N-1:0];
  assign we_a  = loading ? word[N +: G]     : '0;
  assign wem_a = loading ? word[N+G +: G]   : '0;
  assign weo   = loading ? word[N+2*G]      : 1'b0;
  assign ar    = addr[R:0];

endmodule
