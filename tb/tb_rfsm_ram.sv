// tb_rfsm_ram: self-checking test of the RFSM RAM block at its default size
// (16 words of 3 bits, 4 address bits).
//
// Writes random data to every word, reads all words back through the
// asynchronous port and compares with a shadow copy kept here. Then checks
// that a cycle with we low leaves the contents unchanged, and that reading
// one address while writing another returns the old data of the read address
// in the same cycle (read and write ports are independent).
module tb_rfsm_ram;

  localparam int N = 3, DEEP = 16, R = 4;

  logic         clk = 1'b0;
  logic         we;
  logic [N-1:0] di, dout;
  logic [R-1:0] addr, ar;
  logic [N-1:0] shadow [DEEP];

  int checks = 0, failures = 0;

  rfsm_ram #(.N(N), .DEEP(DEEP), .R(R)) dut (
    .clk(clk), .we(we), .di(di), .addr(addr), .ar(ar), .dout(dout)
  );

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  initial begin
    we = 1'b0; di = '0; addr = '0; ar = '0;
    for (int pass = 0; pass < 3; pass++) begin
      for (int a = 0; a < DEEP; a++) begin
        @(negedge clk);
        we = 1'b1; ar = R'(a); di = N'($urandom); shadow[a] = di;
      end
      @(negedge clk);
      we = 1'b0;
      for (int a = 0; a < DEEP; a++) begin
        addr = R'(a);
        #1;
        check(dout == shadow[a], $sformatf("pass %0d word %0d: %0d, expected %0d", pass, a, dout, shadow[a]));
      end
    end
    // we low: no write.
    @(negedge clk);
    ar = 4'd5; di = ~shadow[5]; we = 1'b0;
    @(negedge clk);
    addr = 4'd5; #1;
    check(dout == shadow[5], "write happened with we low");
    // Simultaneous write to 3 and read of 9.
    @(negedge clk);
    we = 1'b1; ar = 4'd3; di = ~shadow[3]; addr = 4'd9; #1;
    check(dout == shadow[9], "read port disturbed by write");
    @(negedge clk);
    we = 1'b0; shadow[3] = ~shadow[3]; addr = 4'd3; #1;
    check(dout == shadow[3], "write to 3 lost");
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
