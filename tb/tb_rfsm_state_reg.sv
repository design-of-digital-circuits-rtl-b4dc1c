// tb_rfsm_state_reg: self-checking test of the 3-bit RFSM state register.
//
// Checks that q follows d one rising edge later for random values, that q
// does not change between edges, and that rst clears q at once, without a
// clock edge, and holds it at 0 while high.
module tb_rfsm_state_reg;

  localparam int R = 3;

  logic         clk = 1'b0;
  logic         rst;
  logic [R-1:0] d, q;

  int checks = 0, failures = 0;

  rfsm_state_reg #(.R(R)) dut (.clk(clk), .rst(rst), .d(d), .q(q));

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  initial begin
    logic [R-1:0] v;
    rst = 1'b0; d = 3'd5;
    #1 rst = 1'b1;
    #1;
    check(q == '0, "not cleared by rst");
    @(posedge clk); #1;
    check(q == '0, "loaded while rst high");
    @(negedge clk); rst = 1'b0;
    for (int k = 0; k < 50; k++) begin
      v = R'($urandom);
      @(negedge clk); d = v;
      @(posedge clk); #1;
      check(q == v, $sformatf("q=%0d expected %0d", q, v));
      d = ~v; #2;
      check(q == v, "q changed between edges");
    end
    @(negedge clk); d = 3'd7;
    @(posedge clk); #1;
    check(q == 3'd7, "load 7");
    #1 rst = 1'b1; #1;
    check(q == '0, "asynchronous clear");
    #1 rst = 1'b0;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
