// rh_memory: memory block of the reconfiguration handler.
//
// A read-only table of WORDS words of W bits, filled from the hex file
// INIT_FILE at start-up (one word per line). Each word carries the write
// enables of the RFSM RAMs in its upper bits and the data to write in its
// lower bits; the word's address, reduced to the RFSM address width, is the
// RAM location it is written to. The read is combinational.
//
// A memory block filled from a file follows the reference design, as do the
// defaults: 56 nine-bit words holding the ones-counting program. The
// combinational read is this design's choice (on an FPGA, a distributed ROM).
module rh_memory #(
  parameter int unsigned WORDS     = 56,
  parameter int unsigned W         = 9,
  parameter string       INIT_FILE = "rtl/rh_count_ones.hex",
  parameter int unsigned AW        = (WORDS > 1) ? $clog2(WORDS) : 1
) (
  input  logic [AW-1:0] addr,
  output logic [W-1:0]  data
);

  logic [W-1:0] rom [WORDS];

  initial begin
    $readmemh(INIT_FILE, rom);
  end

  assign data = (32'(addr) < WORDS) ? rom[addr] : '0;

endmodule
