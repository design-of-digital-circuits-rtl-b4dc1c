// rfsm_state_reg: state register of the RFSM.
//
// R D flip-flops with asynchronous clear: q takes d at each rising clock
// edge, and rst forces q to 0 (the initial state a0) at once.
//
// The register of R clear-able flip-flops follows the reference design, which
// builds it from FPGA library flip-flops; here it is written behaviourally.
module rfsm_state_reg #(
  parameter int unsigned R = 3
) (
  input  logic         clk,
  input  logic         rst,
  input  logic [R-1:0] d,
  output logic [R-1:0] q
);

  always_ff @(posedge clk or posedge rst) begin
    if (rst) q <= '0;
    else     q <= d;
  end

endmodule
