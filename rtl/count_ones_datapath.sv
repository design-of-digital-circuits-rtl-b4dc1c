// count_ones_datapath: datapath of the ones-counting hardware template.
//
// Counts the ones in in_vector under the control of an RFSM. It holds a bit
// index tmp and a counter count_ones and executes the RFSM's commands:
//   y[0] (y1) copy count_ones to result
//   y[1] (y2) clear tmp and count_ones
//   y[2] (y3) increment tmp
//   y[3] (y4) increment count_ones
// and reports two flags back: x1 = all VEC bits tested (tmp > VEC-1) and
// x2 = in_vector[tmp] (0 once tmp is past the last bit).
//
// Timing: everything updates on the falling clock edge, half a cycle after
// the RFSM changes state on the rising edge, so the commands of the current
// state are executed and the flags are ready for the next rising edge. The
// commands take effect in the order listed, and the flags are computed from
// the updated tmp. rst clears the counters, result and flags asynchronously.
//
// Following the reference design: the commands, flags, the falling-edge
// update and the 8-bit vector with a 4-bit result. This design's choices:
// clearing result and flags on reset, and x2 = 0 past the last bit.
module count_ones_datapath #(
  parameter int unsigned VEC   = 8,
  parameter int unsigned CNT_W = $clog2(VEC + 1),
  parameter int unsigned RES_W = 4
) (
  input  logic             clk,
  input  logic             rst,
  input  logic [3:0]       y,          // RFSM commands y1..y4
  input  logic [VEC-1:0]   in_vector,
  output logic [RES_W-1:0] result,
  output logic             x1,         // all bits tested
  output logic             x2          // value of the selected bit
);

  import rfsm_pkg::*;

  localparam int unsigned IW = (VEC > 1) ? $clog2(VEC) : 1;

  logic [CNT_W-1:0] tmp, count_ones;
  logic [CNT_W-1:0] tmp_n, count_n;

  always_comb begin
    tmp_n   = tmp;
    count_n = count_ones;
    if (y[Y_CLEAR]) begin
      tmp_n   = '0;
      count_n = '0;
    end
    if (y[Y_INC_TMP])  tmp_n   = tmp_n + 1'b1;
    if (y[Y_INC_ONES]) count_n = count_n + 1'b1;
  end

  always_ff @(negedge clk or posedge rst) begin
    if (rst) begin
      tmp        <= '0;
      count_ones <= '0;
      result     <= '0;
      x1         <= 1'b0;
      x2         <= 1'b0;
    end else begin
      if (y[Y_RESULT]) result <= RES_W'(count_ones);
      tmp        <= tmp_n;
      count_ones <= count_n;
      x1         <= (32'(tmp_n) > VEC - 1);
      x2         <= (32'(tmp_n) < VEC) ? in_vector[tmp_n[IW-1:0]] : 1'b0;
    end
  end

endmodule
