// tb_prog_mux: self-checking test of the programmable multiplexer (8 inputs,
// 3 state bits).
//
// Writes a random input index for each of the 8 states, then for every state
// and random input words checks that m_out equals the input whose index was
// stored for that state. Reprograms and repeats.
module tb_prog_mux;

  localparam int L = 8, R = 3, S = 3;

  logic         clk = 1'b0;
  logic         wem;
  logic [S-1:0] di;
  logic [R-1:0] ar, ds;
  logic [L-1:0] x;
  logic         m_out;
  logic [S-1:0] idx [2**R];

  int checks = 0, failures = 0;

  prog_mux #(.L(L), .R(R), .S(S)) dut (
    .clk(clk), .wem(wem), .di(di), .ar(ar), .ds(ds), .x(x), .m_out(m_out)
  );

  always #5 clk = ~clk;

  initial begin
    wem = 1'b0; di = '0; ar = '0; ds = '0; x = '0;
    for (int pass = 0; pass < 4; pass++) begin
      for (int s = 0; s < 2**R; s++) begin
        @(negedge clk);
        wem = 1'b1; ar = R'(s);
        di = (pass == 0) ? S'(s) : S'($urandom);
        idx[s] = di;
      end
      @(negedge clk);
      wem = 1'b0;
      for (int s = 0; s < 2**R; s++) begin
        ds = R'(s);
        for (int t = 0; t < 8; t++) begin
          x = L'($urandom);
          #1;
          checks++;
          if (m_out !== x[idx[s]]) begin
            failures++;
            $display("FAIL: state %0d index %0d x=%b m_out=%b", s, idx[s], x, m_out);
          end
        end
      end
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
