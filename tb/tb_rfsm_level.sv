// tb_rfsm_level: self-checking test of one RFSM level (8 inputs, 3 state
// bits).
//
// Loads random contents into the level RAM (16 words) and the multiplexer
// RAM (8 words) through the shared write port, then for every dummy state
// and random inputs checks t = level[{ds, x[mux[ds]]}] against the shadow
// copies kept here. Also checks that writing one RAM leaves the other alone.
module tb_rfsm_level;

  localparam int L = 8, R = 3, S = 3, DW = 3;

  logic          clk = 1'b0;
  logic          we, wem;
  logic [DW-1:0] di;
  logic [R:0]    ar;
  logic [L-1:0]  x;
  logic [R-1:0]  ds, t;
  logic [R-1:0]  lram [2**(R+1)];
  logic [S-1:0]  mram [2**R];

  int checks = 0, failures = 0;

  rfsm_level #(.L(L), .R(R), .S(S), .DW(DW)) dut (
    .clk(clk), .we(we), .wem(wem), .di(di), .ar(ar), .x(x), .ds(ds), .t(t)
  );

  always #5 clk = ~clk;

  task automatic check_all();
    logic b;
    for (int s = 0; s < 2**R; s++) begin
      ds = R'(s);
      for (int k = 0; k < 6; k++) begin
        x = L'($urandom);
        #1;
        b = x[mram[s]];
        checks++;
        if (t !== lram[{R'(s), b}]) begin
          failures++;
          $display("FAIL: ds=%0d x=%b t=%0d expected %0d", s, x, t, lram[{R'(s), b}]);
        end
      end
    end
  endtask

  initial begin
    we = 1'b0; wem = 1'b0; di = '0; ar = '0; x = '0; ds = '0;
    for (int pass = 0; pass < 3; pass++) begin
      for (int a = 0; a < 2**(R+1); a++) begin
        @(negedge clk);
        we = 1'b1; wem = 1'b0; ar = (R+1)'(a); di = DW'($urandom); lram[a] = di;
      end
      for (int a = 0; a < 2**R; a++) begin
        @(negedge clk);
        we = 1'b0; wem = 1'b1; ar = (R+1)'(a); di = DW'($urandom); mram[a] = di;
      end
      @(negedge clk);
      we = 1'b0; wem = 1'b0;
      check_all();
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
