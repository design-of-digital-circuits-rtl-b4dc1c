// tb_count_ones_datapath: self-checking test of the ones-counting datapath
// (8-bit vector).
//
// Drives the command lines y1..y4 directly, the way the controlling FSM
// would, and checks after each falling edge: clear (y2) resets the index and
// the count (x1 low, x2 = bit 0); step (y3) and step-and-count (y3+y4) walk
// through the bits, with x2 always equal to the bit at the new index and x1
// rising exactly after the last bit; output (y1) loads result with the count.
// The expected values are computed here from the vector. Also checks that
// with no command nothing changes, and that rst clears result.
module tb_count_ones_datapath;

  localparam int VEC = 8;

  logic           clk = 1'b0;
  logic           rst;
  logic [3:0]     y;
  logic [VEC-1:0] in_vector;
  logic [3:0]     result;
  logic           x1, x2;

  int checks = 0, failures = 0;

  count_ones_datapath #(.VEC(VEC)) dut (
    .clk(clk), .rst(rst), .y(y), .in_vector(in_vector), .result(result),
    .x1(x1), .x2(x2)
  );

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  // Applies command c for one falling edge, then waits a little.
  task automatic cmd(input logic [3:0] c);
    @(posedge clk);
    y = c;
    @(negedge clk);
    #1;
  endtask

  initial begin
    int cnt;
    rst = 1'b0; y = '0; in_vector = '0;
    #1 rst = 1'b1;
    #2;
    check(result == 0 && !x1 && !x2, "reset values");
    @(posedge clk);
    rst = 1'b0;
    for (int v = 0; v < 30; v++) begin
      in_vector = (v == 0) ? 8'h00 : (v == 1) ? 8'hff : VEC'($urandom);
      cmd(4'b0010);                                   // y2: clear
      check(!x1 && x2 == in_vector[0], "after clear");
      cnt = 0;
      for (int i = 0; i < VEC; i++) begin
        if (x2) begin
          cmd(4'b1100);                               // y3+y4
          cnt++;
        end else begin
          cmd(4'b0100);                               // y3
        end
        if (i < VEC - 1)
          check(!x1 && x2 == in_vector[i+1], $sformatf("vector %h bit %0d flags", in_vector, i + 1));
        else
          check(x1, "x1 after the last bit");
      end
      cmd(4'b0000);                                   // idle: nothing changes
      check(x1, "x1 held");
      cmd(4'b0001);                                   // y1: output
      check(32'(result) == $countones(in_vector),
            $sformatf("vector %h result %0d expected %0d", in_vector, result, $countones(in_vector)));
    end
    rst = 1'b1; #1;
    check(result == 0, "rst clears result");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
