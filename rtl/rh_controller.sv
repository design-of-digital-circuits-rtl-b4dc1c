// rh_controller: controller of the reconfiguration handler.
//
// After the external reset it walks the memory block once, address 0 to
// WORDS-1, one word per clock cycle, with `loading` high so that each word's
// enables reach the RFSM RAMs. Then it holds the RFSM in reset for one more
// cycle and releases it: the RFSM starts in state 0 in working mode and
// `ready` goes high. A new reset starts a new reload.
//
// Timing: reset is asynchronous. With reset released before rising edge 0,
// words are written at edges 0..WORDS-1, rfsm_rst falls after edge WORDS and
// the RFSM's first transition is at edge WORDS+1.
//
// Copying words to the RFSM RAMs and then resetting the RFSM follows the
// reference design; the one-word-per-cycle schedule, the extra reset cycle
// and the ready output are this design's choices.
module rh_controller #(
  parameter int unsigned WORDS = 56,
  parameter int unsigned AW    = (WORDS > 1) ? $clog2(WORDS) : 1
) (
  input  logic          clk,
  input  logic          reset,
  output logic [AW-1:0] addr,     // address of the memory block and RFSM RAMs
  output logic          loading,  // the current word is to be written
  output logic          rfsm_rst, // holds the RFSM in its initial state
  output logic          ready     // RFSM in working mode
);

  typedef enum logic [1:0] {LOAD, RELEASE, RUN} rh_state_e;

  rh_state_e st;

  always_ff @(posedge clk or posedge reset) begin
    if (reset) begin
      st   <= LOAD;
      addr <= '0;
    end else begin
      unique case (st)
        LOAD: begin
          if (32'(addr) == WORDS - 1) st <= RELEASE;
          else                        addr <= addr + 1'b1;
        end
        RELEASE: st <= RUN;
        default: st <= RUN;
      endcase
    end
  end

  assign loading  = (st == LOAD) && !reset;
  assign rfsm_rst = (st != RUN) || reset;
  assign ready    = (st == RUN) && !reset;

  // The RFSM may not be in working mode while its RAMs are being loaded.
  a_no_run_while_loading: assert property (@(posedge clk) !(loading && ready))
    else $error("rh_controller: RFSM in working mode while loading");

endmodule
