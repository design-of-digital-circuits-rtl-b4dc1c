// rfsm_ram: one reloadable RAM block of the reprogrammable FSM.
//
// A DEEP x N memory with a synchronous write port (we, ar, di) and an
// independent asynchronous read port (addr -> dout). The RFSM is built only
// from such blocks, a register and multiplexers; changing their contents
// changes the machine's behaviour without touching the circuit.
//
// Timing: a write takes effect at the rising clock edge while we is high; the
// read is combinational, so a chain of these RAMs can compute a whole state
// transition within one clock cycle, as the cascaded RFSM requires.
//
// The parameter names (N data width, DEEP words, R address bits) and their
// defaults (3, 16, 4, those of a level RAM) follow the reference design. The
// asynchronous read (an FPGA distributed RAM) is this design's choice, made
// so that a transition through all levels fits in one cycle. The contents
// are not reset; they are written by the reconfiguration handler.
module rfsm_ram #(
  parameter int unsigned N    = 3,
  parameter int unsigned DEEP = 16,
  parameter int unsigned R    = 4
) (
  input  logic         clk,
  input  logic         we,    // write enable
  input  logic [N-1:0] di,    // write data
  input  logic [R-1:0] addr,  // read address
  input  logic [R-1:0] ar,    // write address
  output logic [N-1:0] dout   // read data
);

  logic [N-1:0] mem [DEEP];

  always_ff @(posedge clk) begin
    if (we && (32'(ar) < DEEP)) mem[ar] <= di;
  end

  assign dout = (32'(addr) < DEEP) ? mem[addr] : '0;

endmodule
