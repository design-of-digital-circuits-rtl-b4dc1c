// rfsm_pkg: constants shared by the reprogrammable-FSM hardware template.
//
// Holds the default shape of the cascaded RFSM (L inputs, R state bits, N
// outputs, G levels), the layout of one reconfiguration word, and the signal
// assignment of the ones-counting example (which RFSM output drives which
// datapath command, which RFSM input carries which datapath flag).
//
// The defaults L=8, R=3, N=4, G=2 and the 9-bit word layout
// {WE output RAM, WE mux RAM G..1, WE level RAM G..1, data} follow the
// reference design. Placing flag x1 on input 1 and x2 on input 2 is read off
// the example's reconfiguration table, whose multiplexer RAMs select inputs 1
// and 2; input 0 is unused and tied low.
package rfsm_pkg;

  // Default RFSM shape.
  localparam int unsigned RFSM_L = 8;  // number of inputs x0..xL-1
  localparam int unsigned RFSM_R = 3;  // state register width
  localparam int unsigned RFSM_N = 4;  // number of outputs y0..yN-1
  localparam int unsigned RFSM_G = 2;  // number of reprogrammable levels

  // Width of one reconfiguration word: one enable for the output RAM, one per
  // mux RAM, one per level RAM, then N data bits.
  function automatic int unsigned rh_word_width(int unsigned g, int unsigned n);
    return 1 + 2 * g + n;
  endfunction

  // Ones-counting example: RFSM output bits (y1..y4 on bits 0..3).
  localparam int unsigned Y_RESULT   = 0;  // y1: copy count to result
  localparam int unsigned Y_CLEAR    = 1;  // y2: clear tmp and count_ones
  localparam int unsigned Y_INC_TMP  = 2;  // y3: increment tmp
  localparam int unsigned Y_INC_ONES = 3;  // y4: increment count_ones

  // Ones-counting example: RFSM input bits.
  localparam int unsigned X_DONE = 1;  // x1: all bits tested
  localparam int unsigned X_BIT  = 2;  // x2: value of the selected bit

endpackage
