// tb_rh_controller: self-checking test of the reconfiguration controller
// (56 words).
//
// After reset, the controller must present addresses 0..55 on consecutive
// cycles with loading high and the RFSM held in reset, then one cycle with
// loading low and the RFSM still in reset, then ready with the RFSM
// released, and stay there. A second reset in the middle of a load must
// restart from address 0.
module tb_rh_controller;

  localparam int WORDS = 56, AW = 6;

  logic          clk = 1'b0;
  logic          reset;
  logic [AW-1:0] addr;
  logic          loading, rfsm_rst, ready;

  int checks = 0, failures = 0;

  rh_controller #(.WORDS(WORDS), .AW(AW)) dut (
    .clk(clk), .reset(reset), .addr(addr), .loading(loading),
    .rfsm_rst(rfsm_rst), .ready(ready)
  );

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  task automatic do_reset();
    @(negedge clk);
    reset = 1'b1;
    #1;
    check(rfsm_rst && !ready && !loading, "outputs during reset");
    @(negedge clk);
    reset = 1'b0;
  endtask

  task automatic expect_load(input int upto);
    for (int a = 0; a < upto; a++) begin
      #1;
      check(loading && rfsm_rst && !ready && 32'(addr) == a,
            $sformatf("load cycle %0d: addr %0d loading %b rfsm_rst %b", a, addr, loading, rfsm_rst));
      @(negedge clk);
    end
  endtask

  initial begin
    reset = 1'b0;
    do_reset();
    expect_load(20);
    do_reset();
    expect_load(WORDS);
    #1;
    check(!loading && rfsm_rst && !ready, "release cycle");
    for (int c = 0; c < 30; c++) begin
      @(negedge clk);
      #1;
      check(!loading && !rfsm_rst && ready, "working mode");
    end
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
