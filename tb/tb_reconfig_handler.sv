// tb_reconfig_handler: checks what the reconfiguration handler writes into
// an RFSM.
//
// Records every write the handler issues after reset into shadow copies of
// the five RFSM RAMs (two level RAMs, two mux RAMs, output RAM), exactly as
// the RFSM would store them, then compares the shadows with the ones-counting
// machine written out here from its description: states a0..a3, dummy state
// a4, level 1 tests x1 (input 1), level 2 tests x2 (input 2), outputs
// a0=y1, a1=y2, a2=y3, a3=y3+y4. Also checks the load time and that the RFSM
// reset is released only after the last write.
module tb_reconfig_handler;

  localparam int R = 3, N = 4, G = 2, WORDS = 56;

  logic         clk = 1'b0;
  logic         reset;
  logic [G-1:0] we_a, wem_a;
  logic         weo;
  logic [N-1:0] di;
  logic [R:0]   ar;
  logic         rfsm_rst, ready;

  logic [R-1:0] lram [G][16];
  logic [2:0]   mram [G][8];
  logic [N-1:0] oram [8];
  int           writes = 0, cycles = 0;
  bit           write_after_release = 1'b0;

  int checks = 0, failures = 0;

  reconfig_handler #(.R(R), .N(N), .G(G), .WORDS(WORDS)) dut (
    .clk(clk), .reset(reset), .we_a(we_a), .wem_a(wem_a), .weo(weo),
    .di(di), .ar(ar), .rfsm_rst(rfsm_rst), .ready(ready)
  );

  always #5 clk = ~clk;

  always @(posedge clk) begin
    for (int g = 0; g < G; g++) begin
      if (we_a[g])  lram[g][ar] <= di[R-1:0];
      if (wem_a[g]) mram[g][ar[R-1:0]] <= di[2:0];
    end
    if (weo) oram[ar[R-1:0]] <= di;
    if (we_a != 0 || wem_a != 0 || weo) begin
      writes++;
      if (!rfsm_rst) write_after_release = 1'b1;
    end
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  // Expected next dummy state of level 1 for state s and tested bit b.
  function automatic int exp_l1(int s, int b);
    if (s == 0) return 1;             // a0 -> a1 unconditionally
    if (s >= 1 && s <= 3) return (b != 0) ? 0 : 4;  // x1=1 -> a0, else dummy a4
    if (s == 4) return 4;
    return 0;
  endfunction

  function automatic int exp_l2(int s, int b);
    if (s <= 3) return s;             // real states pass through
    if (s == 4) return (b != 0) ? 3 : 2;     // x2=1 -> a3, x2=0 -> a2
    return 0;
  endfunction

  initial begin
    for (int g = 0; g < G; g++) begin
      foreach (lram[g][a]) lram[g][a] = 3'h7;
      foreach (mram[g][a]) mram[g][a] = 3'h7;
    end
    foreach (oram[a]) oram[a] = 4'hf;
    reset = 1'b0;
    #1 reset = 1'b1;
    @(negedge clk);
    reset = 1'b0;
    while (!ready) begin
      @(posedge clk);
      #1;
      cycles++;
    end
    check(cycles == WORDS + 1, $sformatf("load took %0d cycles", cycles));
    check(writes == WORDS, $sformatf("%0d writes, expected %0d", writes, WORDS));
    repeat (5) @(posedge clk);
    check(!write_after_release, "write issued after the RFSM was released");
    for (int s = 0; s < 8; s++)
      for (int b = 0; b < 2; b++) begin
        check(32'(lram[0][2*s+b]) == exp_l1(s, b), $sformatf("level 1 [%0d,%0d] = %0d", s, b, lram[0][2*s+b]));
        check(32'(lram[1][2*s+b]) == exp_l2(s, b), $sformatf("level 2 [%0d,%0d] = %0d", s, b, lram[1][2*s+b]));
      end
    for (int s = 1; s <= 3; s++)
      check(mram[0][s] == 3'd1, $sformatf("level 1 mux of a%0d tests input %0d", s, mram[0][s]));
    check(mram[1][4] == 3'd2, "level 2 mux of a4 must test input 2");
    check(oram[0] == 4'b0001, "a0 outputs");
    check(oram[1] == 4'b0010, "a1 outputs");
    check(oram[2] == 4'b0100, "a2 outputs");
    check(oram[3] == 4'b1100, "a3 outputs");
    for (int s = 4; s < 8; s++) check(oram[s] == 4'b0000, "unused state outputs");
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
