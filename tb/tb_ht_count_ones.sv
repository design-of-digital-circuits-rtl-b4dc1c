// tb_ht_count_ones: end-to-end test of the ones-counting hardware template at
// its default sizes.
//
// Resets the circuit, checks that the reconfiguration handler loads the RFSM
// in WORDS+1 cycles, then feeds a series of 8-bit vectors (all zeros, all
// ones, alternating patterns, random values) and checks every result against
// a popcount computed here, and that each vector takes 2+VEC cycles (states
// a0, a1 and one a2/a3 cycle per bit). Halfway through, reset is raised again
// in the middle of a vector to force a second reload; counting must resume
// correctly. Counts how often each mechanism occurred (reload, state a2 =
// skip a zero, state a3 = count a one, exit through x1) and fails if one never
// did. The dummy state a4 must never appear in the state register.
module tb_ht_count_ones;

  localparam int VEC   = 8;
  localparam int WORDS = 56;
  localparam int NVEC  = 40;

  logic           clk = 1'b0;
  logic           reset;
  logic [VEC-1:0] in_vector;
  logic [3:0]     result;
  logic [3:0]     y;
  logic [2:0]     state;
  logic           ready;

  int checks = 0, failures = 0;
  int n_reload = 0, n_a2 = 0, n_a3 = 0, n_exit = 0;

  ht_count_ones dut (
    .clk      (clk),
    .reset    (reset),
    .in_vector(in_vector),
    .result   (result),
    .y        (y),
    .state    (state),
    .ready    (ready)
  );

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  // Mechanism counters, sampled in working mode.
  always @(posedge clk) begin
    if (ready) begin
      if (state == 3'd2) n_a2++;
      if (state == 3'd3) n_a3++;
      if (state == 3'd4) begin
        failures++;
        $display("FAIL: dummy state a4 stored in the state register");
      end
    end
  end

  // Reset, then check the load time.
  task automatic reload();
    int cycles;
    reset = 1'b1;
    repeat (3) @(posedge clk);
    @(negedge clk);
    reset = 1'b0;
    cycles = 0;
    while (!ready) begin
      @(posedge clk);
      #1;
      cycles++;
    end
    check(cycles == WORDS + 1, $sformatf("load took %0d cycles, expected %0d", cycles, WORDS + 1));
    n_reload++;
  endtask

  // Runs vectors; on each a0 cycle checks the result of the previous vector.
  task automatic run_vectors(input int count, input int seed_kind);
    logic [VEC-1:0] prev;
    int             since, expected;
    bit             first;
    first = 1'b1;
    prev  = '0;
    since = 0;
    for (int k = 0; k <= count; ) begin
      @(negedge clk);
      #1;
      since++;
      if (y[0]) begin
        expected = first ? 0 : $countones(prev);
        check(32'(result) == expected,
              $sformatf("vector %b: result %0d, expected %0d", prev, result, expected));
        if (!first) begin
          check(since == 2 + VEC, $sformatf("vector took %0d cycles, expected %0d", since, 2 + VEC));
          n_exit++;
        end
        first = 1'b0;
        since = 0;
        unique case (k % 5)
          0: in_vector = '0;
          1: in_vector = '1;
          2: in_vector = (seed_kind == 0) ? 8'b1010_0101 : 8'b0111_1110;
          default: in_vector = VEC'($urandom);
        endcase
        prev = in_vector;
        k++;
      end
    end
  endtask

  initial begin
    in_vector = '0;
    reload();
    run_vectors(NVEC / 2, 0);
    // Reset in the middle of a vector: forces a full reload.
    repeat (4) @(negedge clk);
    reload();
    run_vectors(NVEC / 2, 1);
    check(n_reload == 2, "reload count");
    check(n_a2 > 0, "state a2 (zero bit) never visited");
    check(n_a3 > 0, "state a3 (one bit) never visited");
    check(n_exit >= NVEC, "too few vectors completed");
    $display("mechanisms: reloads=%0d a2=%0d a3=%0d exits=%0d", n_reload, n_a2, n_a3, n_exit);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
