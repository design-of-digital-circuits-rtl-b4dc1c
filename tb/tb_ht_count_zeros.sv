// tb_ht_count_zeros: the same hardware template loaded with another program.
//
// Instantiates the ones-counting circuit unchanged except for the program
// file, which swaps the two branches of the level-2 test of x2, so that the
// count-and-step state a3 is entered on a zero bit. The result must then be
// the number of zeros in each vector, checked here against VEC minus the
// popcount, with the same 2+VEC cycles per vector. This exercises reloading
// as the way to change what the circuit computes.
module tb_ht_count_zeros;

  localparam int VEC = 8;

  logic           clk = 1'b0;
  logic           reset;
  logic [VEC-1:0] in_vector;
  logic [3:0]     result;
  logic [3:0]     y;
  logic [2:0]     state;
  logic           ready;

  int checks = 0, failures = 0;

  ht_count_ones #(.INIT_FILE("tb/rh_count_zeros.hex")) dut (
    .clk(clk), .reset(reset), .in_vector(in_vector), .result(result),
    .y(y), .state(state), .ready(ready)
  );

  always #5 clk = ~clk;

  initial begin
    logic [VEC-1:0] prev;
    int             since, expected;
    bit             first;
    in_vector = '0;
    reset = 1'b0;
    #1 reset = 1'b1;
    repeat (2) @(negedge clk);
    reset = 1'b0;
    wait (ready);
    first = 1'b1;
    prev  = '0;
    since = 0;
    for (int k = 0; k <= 30; ) begin
      @(negedge clk);
      #1;
      since++;
      if (y[0]) begin
        expected = first ? 0 : VEC - $countones(prev);
        checks++;
        if (32'(result) != expected || (!first && since != 2 + VEC)) begin
          failures++;
          $display("FAIL: vector %b result %0d expected %0d, %0d cycles", prev, result, expected, since);
        end
        first = 1'b0;
        since = 0;
        in_vector = (k == 0) ? '0 : (k == 1) ? '1 : VEC'($urandom);
        prev = in_vector;
        k++;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
